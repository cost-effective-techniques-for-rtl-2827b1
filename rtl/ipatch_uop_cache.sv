// ipatch_uop_cache: micro-op cache with iPatch patch entries.
//
// A set-associative store of decoded micro-ops, one entry per 8-byte fetch
// block, looked up by fetch address before the L1 instruction cache; a hit
// means the i-cache is not read, so an entry decoded from a disabled
// i-cache subblock "patches" it. Such entries carry a patch bit, set at
// fill time from the fault bit the i-cache side supplies with the
// instructions. Replacement keeps patches: if the number of patch entries
// in the set is below patch_threshold_i, the victim is the least recently
// used non-patch entry; otherwise plain LRU. An invalid way is always used
// first. The threshold is an input because it is tuned per operating
// voltage.
// Lookup is combinational; fills and LRU updates happen at the clock edge.
// Sizes (32 sets x 8 ways), the patch bit and the threshold rule are the
// document's; the micro-op payload width UOP_W (the document does not give
// the micro-op format), the 8-byte fetch block and true LRU are this
// design's choices.
module ipatch_uop_cache
  import ipatch_pkg::*;
#(
  parameter int unsigned SETS  = 32,
  parameter int unsigned WAYS  = 8,
  parameter int unsigned UOP_W = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(WAYS):0]   patch_threshold_i,   // entries per set
  input  logic                    flush_i,
  // lookup
  input  logic                    lk_i,
  input  waddr_t                  lk_addr_i,
  output logic                    lk_hit_o,
  output logic [UOP_W-1:0]        lk_uops_o,
  output logic                    lk_patch_o,
  // fill from the decoder
  input  logic                    fill_i,
  input  waddr_t                  fill_addr_i,
  input  logic [UOP_W-1:0]        fill_uops_i,
  input  logic                    fill_patch_i,
  output logic                    fill_evict_patch_o,  // victim was a patch entry
  output logic [$clog2(WAYS):0]   fill_set_patches_o   // patch entries in the fill set
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);

  logic [WAYS-1:0]  valid [SETS];
  logic [WAYS-1:0]  patch [SETS];
  waddr_t           tag   [SETS][WAYS];
  logic [WAY_W-1:0] age   [SETS][WAYS];
  logic [UOP_W-1:0] uops  [SETS*WAYS];

  // ---- lookup ----
  logic [SET_W-1:0] lset;
  logic [WAY_W-1:0] lway;
  always_comb begin
    lset     = lk_addr_i[SET_W-1:0];
    lk_hit_o = 1'b0;
    lway     = '0;
    for (int w = 0; w < WAYS; w++)
      if (lk_i && valid[lset][w] && tag[lset][w] == lk_addr_i) begin lk_hit_o = 1'b1; lway = WAY_W'(w); end
    lk_uops_o  = uops[int'(lset) * WAYS + int'(lway)];
    lk_patch_o = lk_hit_o && patch[lset][lway];
  end

  // ---- victim ----
  logic [SET_W-1:0] fset;
  logic [WAY_W-1:0] vway;
  logic             fdup;
  logic [WAY_W-1:0] dway;
  always_comb begin
    logic             inv, favor;
    logic             have;
    logic [WAY_W-1:0] best;
    fset = fill_addr_i[SET_W-1:0];
    have = 1'b0;
    best = '0;
    fill_set_patches_o = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[fset][w] && patch[fset][w]) fill_set_patches_o = fill_set_patches_o + 1'b1;
    favor = fill_set_patches_o < patch_threshold_i;
    fdup = 1'b0;
    dway = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[fset][w] && tag[fset][w] == fill_addr_i) begin fdup = 1'b1; dway = WAY_W'(w); end
    inv  = 1'b0;
    vway = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[fset][w]) begin inv = 1'b1; vway = WAY_W'(w); end
    if (!inv) begin
      // LRU among non-patch entries when below the threshold
      if (favor)
        for (int w = 0; w < WAYS; w++)
          if (!patch[fset][w] && (!have || age[fset][w] > best)) begin have = 1'b1; best = age[fset][w]; vway = WAY_W'(w); end
      if (!have)
        for (int w = 0; w < WAYS; w++)
          if (!have || age[fset][w] > best) begin have = 1'b1; best = age[fset][w]; vway = WAY_W'(w); end
    end
    if (fdup) vway = dway;
    fill_evict_patch_o = fill_i && !fdup && valid[fset][vway] && patch[fset][vway];
  end

  task automatic touch(input logic [SET_W-1:0] s, input logic [WAY_W-1:0] w);
    for (int i = 0; i < WAYS; i++)
      if (age[s][i] < age[s][w]) age[s][i] <= age[s][i] + 1'b1;
    age[s][w] <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        patch[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          age[s][w] <= WAY_W'(w);
          tag[s][w] <= '0;
        end
      end
    end else if (flush_i) begin
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
    end else if (fill_i) begin
      valid[fset][vway] <= 1'b1;
      patch[fset][vway] <= fill_patch_i;
      tag[fset][vway]   <= fill_addr_i;
      touch(fset, vway);
    end else if (lk_hit_o) begin
      touch(lset, lway);
    end
  end

  always_ff @(posedge clk) begin
    if (fill_i && !flush_i) uops[int'(fset) * WAYS + int'(vway)] <= fill_uops_i;
  end
endmodule
