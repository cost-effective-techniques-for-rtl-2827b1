// ipatch_mshr: miss status handling registers whose fill buffers are kept
// as patches.
//
// Each MSHR tracks one outstanding line miss and owns a 64-byte fill
// buffer with a valid bit per 8-byte subblock. Loads (or fetches) that
// match a buffered subblock are served from it, and an MSHR hit takes
// precedence over the L1. When all subblocks have arrived the line is
// offered to the cache (done_valid_o / done_ready_i). With iPatch the MSHR
// is then not freed if the way the line goes to has disabled subblocks
// (done_keep_i): it stays valid with its patch bit set, as a fault-free
// copy of the line. A reference bit is set whenever a patch entry serves a
// load. A new miss takes a free MSHR; if there is none it overwrites a
// patch entry whose reference bit is clear, and if every patch entry has
// been referenced all reference bits are cleared first. Patches therefore
// never take an MSHR away from a real miss. A store to a patched line
// invalidates the patch (the cache copy has changed). A miss to a line
// already tracked merges into that MSHR.
//
// Interface timing: lookups and the allocation answer are combinational,
// state changes at the clock edge. One L2 subblock return per cycle
// (fill_*), one completed line offered per cycle (lowest index first).
// The patch and reference bits, their policy and store invalidation are
// the document's; keeping only lines that land on a way with disabled
// subblocks, the merge and the port structure are this design's choices.
module ipatch_mshr
  import ipatch_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // allocation on an L1 miss or false hit
  input  logic                 alloc_i,
  input  laddr_t               alloc_laddr_i,
  output logic                 alloc_ok_o,      // allocated or merged
  output logic                 alloc_new_o,     // a new request must go to L2
  output logic [$clog2(N)-1:0] alloc_idx_o,
  output logic                 alloc_evict_o,   // a patch entry was overwritten
  // data returned from L2, one subblock per cycle
  input  logic                 fill_i,
  input  logic [$clog2(N)-1:0] fill_idx_i,
  input  logic [SUB_W-1:0]     fill_sub_i,
  input  word_t                fill_data_i,
  // completed line to the cache
  output logic                 done_valid_o,
  output laddr_t               done_laddr_o,
  output line_t                done_data_o,
  input  logic                 done_ready_i,
  input  logic                 done_keep_i,     // destination way has disabled subblocks
  // load lookup
  input  logic                 lk_i,
  input  waddr_t               lk_addr_i,
  output logic                 lk_hit_o,
  output word_t                lk_data_o,
  output logic                 lk_patch_o,      // served by a patch entry
  // store invalidation
  input  logic                 st_i,
  input  waddr_t               st_addr_i,
  // status
  output logic [N-1:0]         patch_o,
  output logic [N-1:0]         busy_o           // tracking an outstanding miss
);
  localparam int unsigned IW = $clog2(N);

  typedef struct packed {
    logic          valid;
    logic          patch;
    logic          refb;
    logic          written;    // line handed to the cache
    laddr_t        laddr;
    fault_t        subv;
  } mshr_t;

  mshr_t ent [N];
  line_t buf_q [N];

  // ---- lookup ----
  always_comb begin
    lk_hit_o   = 1'b0;
    lk_patch_o = 1'b0;
    lk_data_o  = '0;
    for (int i = 0; i < N; i++) begin
      if (lk_i && ent[i].valid && ent[i].laddr == line_of(lk_addr_i) && ent[i].subv[sub_of(lk_addr_i)]) begin
        lk_hit_o   = 1'b1;
        lk_patch_o = ent[i].patch;
        lk_data_o  = buf_q[i][64*sub_of(lk_addr_i) +: 64];
      end
    end
  end

  // ---- allocation ----
  logic          merge_hit, free_found, nru_found, any_patch, all_ref;
  logic [IW-1:0] merge_idx, free_idx, nru_idx, patch_idx;
  always_comb begin
    merge_hit = 1'b0; free_found = 1'b0; nru_found = 1'b0; any_patch = 1'b0; all_ref = 1'b1;
    merge_idx = '0; free_idx = '0; nru_idx = '0; patch_idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (ent[i].valid && !ent[i].patch && ent[i].laddr == alloc_laddr_i) begin merge_hit = 1'b1; merge_idx = IW'(i); end
      if (!ent[i].valid) begin free_found = 1'b1; free_idx = IW'(i); end
      if (ent[i].valid && ent[i].patch) begin
        any_patch = 1'b1;
        patch_idx = IW'(i);
        if (!ent[i].refb) begin nru_found = 1'b1; nru_idx = IW'(i); end
      end
    end
    for (int i = 0; i < N; i++) if (ent[i].valid && ent[i].patch && !ent[i].refb) all_ref = 1'b0;
    alloc_ok_o    = alloc_i && (merge_hit || free_found || any_patch);
    alloc_new_o   = alloc_i && !merge_hit && (free_found || any_patch);
    alloc_evict_o = alloc_new_o && !free_found;
    alloc_idx_o   = merge_hit ? merge_idx : free_found ? free_idx : nru_found ? nru_idx : patch_idx;
  end

  // ---- completion ----
  logic          done_found;
  logic [IW-1:0] done_idx;
  always_comb begin
    done_found = 1'b0;
    done_idx   = '0;
    for (int i = N - 1; i >= 0; i--)
      if (ent[i].valid && !ent[i].patch && !ent[i].written && ent[i].subv == '1) begin
        done_found = 1'b1;
        done_idx   = IW'(i);
      end
  end
  assign done_valid_o = done_found;
  assign done_laddr_o = ent[done_idx].laddr;
  assign done_data_o  = buf_q[done_idx];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      patch_o[i] = ent[i].valid && ent[i].patch;
      busy_o[i]  = ent[i].valid && !ent[i].patch;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ent[i] <= '0;
    end else begin
      // reference bit on a patch hit
      for (int i = 0; i < N; i++)
        if (lk_i && ent[i].valid && ent[i].patch && ent[i].laddr == line_of(lk_addr_i) && ent[i].subv[sub_of(lk_addr_i)])
          ent[i].refb <= 1'b1;
      // store to a patched line
      for (int i = 0; i < N; i++)
        if (st_i && ent[i].valid && ent[i].patch && ent[i].laddr == line_of(st_addr_i))
          ent[i].valid <= 1'b0;
      // completion
      if (done_found && done_ready_i) begin
        if (done_keep_i) begin
          ent[done_idx].patch   <= 1'b1;
          ent[done_idx].refb    <= 1'b0;
          ent[done_idx].written <= 1'b1;
        end else begin
          ent[done_idx].valid <= 1'b0;
        end
      end
      // L2 data
      if (fill_i && ent[fill_idx_i].valid && !ent[fill_idx_i].patch)
        ent[fill_idx_i].subv[fill_sub_i] <= 1'b1;
      // allocation (overrides the updates above for the chosen entry)
      if (alloc_new_o) begin
        if (!free_found && !nru_found)
          for (int i = 0; i < N; i++) ent[i].refb <= 1'b0;
        ent[alloc_idx_o] <= '{valid: 1'b1, patch: 1'b0, refb: 1'b0, written: 1'b0,
                              laddr: alloc_laddr_i, subv: '0};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_i) buf_q[fill_idx_i][64*fill_sub_i +: 64] <= fill_data_i;
  end

  // a fill must target an MSHR that is tracking a miss
  a_fill_busy: assert property (@(posedge clk) disable iff (!rst_n)
    fill_i |-> (ent[fill_idx_i].valid && !ent[fill_idx_i].patch));
endmodule
