// ipatch_store_queue: unordered store queue that keeps completed stores
// and patch entries (iPatch store-queue patching).
//
// Entries are 8-byte words {address, data}; each has a store colour
// (sequence number), a completed bit (data already written to the L1/L2),
// a patch bit (completed, and its L1 subblock is disabled) and a reference
// bit (has forwarded data to a load). Because allocation is unordered,
// completed entries are not removed when they complete; they stay until
// their slot is needed:
//  * st_alloc: a new store takes a free slot, else a completed entry is
//    invalidated, preferring untouched/non-patch, then touched/non-patch,
//    then untouched/patch, then touched/patch. If all patch entries have
//    their reference bits set when a candidate is sought, all reference
//    bits are cleared. If only pending stores are held, st_full_o.
//  * st_complete: the store with that colour is marked completed. An older
//    completed entry for the same word is removed, and if it was a patch
//    the new entry inherits the patch bit; otherwise it is not a patch.
//  * pi (patch insert, from the MSHR fill buffer): inserted as a completed
//    patch entry only when no store uses the write port that cycle, into a
//    free slot or over an untouched non-patch completed entry; if the word
//    is already held completed, that entry becomes the patch. Otherwise
//    the patch is dropped.
//  * ld: a load with colour c is forwarded from the youngest pending store
//    with a colour not after c, else from the completed entry for the word;
//    the entry's reference bit is set.
//  * inv: coherence invalidation of a line removes its completed entries.
// Lookups are combinational, updates at the clock edge. Colours are
// compared modulo 2**COLOR_W (window of half the range).
// The entry metadata, the eviction order, inheritance and patch insertion
// follow the document; full 8-byte entries, the colour width and the
// rules for insert conflicts are this design's choices.
module ipatch_store_queue
  import ipatch_pkg::*;
#(
  parameter int unsigned N       = 36,
  parameter int unsigned COLOR_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // new store
  input  logic               st_alloc_i,
  input  waddr_t             st_addr_i,
  input  word_t              st_data_i,
  input  logic [COLOR_W-1:0] st_color_i,
  output logic               st_full_o,
  // store written to the cache
  input  logic               st_complete_i,
  input  logic [COLOR_W-1:0] st_complete_color_i,
  // patch insertion
  input  logic               pi_valid_i,
  input  waddr_t             pi_addr_i,
  input  word_t              pi_data_i,
  output logic               pi_ready_o,
  // load forwarding
  input  logic               ld_i,
  input  waddr_t             ld_addr_i,
  input  logic [COLOR_W-1:0] ld_color_i,
  output logic               ld_hit_o,
  output word_t              ld_data_o,
  output logic               ld_patch_o,
  // coherence invalidation of a line
  input  logic               inv_i,
  input  laddr_t             inv_laddr_i,
  // status
  output logic [N-1:0]       patch_o,
  output logic [N-1:0]       completed_o,
  output logic               evict_o          // a completed entry was freed for a store
);
  localparam int unsigned IW = $clog2(N);

  typedef struct packed {
    logic               valid;
    logic               done;     // completed
    logic               patch;
    logic               refb;
    logic [COLOR_W-1:0] color;
    waddr_t             addr;
    word_t              data;
  } sq_t;

  sq_t q [N];

  // a is not after b, modulo the colour range
  function automatic logic not_after(input logic [COLOR_W-1:0] a, input logic [COLOR_W-1:0] b);
    logic [COLOR_W-1:0] d;
    d = b - a;
    return !d[COLOR_W-1];
  endfunction

  // ---- forwarding ----
  logic          fw_found;
  logic [IW-1:0] fw_idx;
  always_comb begin
    logic               pend;
    logic [COLOR_W-1:0] best;
    fw_found = 1'b0;
    fw_idx   = '0;
    pend     = 1'b0;
    best     = '0;
    for (int i = 0; i < N; i++) begin
      if (ld_i && q[i].valid && q[i].addr == ld_addr_i) begin
        if (!q[i].done && not_after(q[i].color, ld_color_i)) begin
          if (!pend || not_after(best, q[i].color)) begin
            pend = 1'b1; best = q[i].color; fw_found = 1'b1; fw_idx = IW'(i);
          end
        end else if (q[i].done && !pend) begin
          fw_found = 1'b1; fw_idx = IW'(i);
        end
      end
    end
    ld_hit_o   = fw_found;
    ld_data_o  = q[fw_idx].data;
    ld_patch_o = fw_found && q[fw_idx].patch;
  end

  // ---- replacement candidate ----
  logic          free_found, cand_found;
  logic [IW-1:0] free_idx, cand_idx;
  logic          all_patch_ref, any_patch;
  logic          un_np_found;            // untouched non-patch completed entry
  logic [IW-1:0] un_np_idx;
  always_comb begin
    logic [1:0] best_cls;
    logic [1:0] cls;
    free_found = 1'b0; cand_found = 1'b0; free_idx = '0; cand_idx = '0;
    all_patch_ref = 1'b1; any_patch = 1'b0; un_np_found = 1'b0; un_np_idx = '0;
    best_cls = '1;
    cls = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!q[i].valid) begin free_found = 1'b1; free_idx = IW'(i); end
      if (q[i].valid && q[i].patch) begin
        any_patch = 1'b1;
        if (!q[i].refb) all_patch_ref = 1'b0;
      end
      if (q[i].valid && q[i].done && !q[i].patch && !q[i].refb) begin un_np_found = 1'b1; un_np_idx = IW'(i); end
    end
    for (int i = N - 1; i >= 0; i--) begin
      if (q[i].valid && q[i].done) begin
        cls = {q[i].patch, q[i].refb};   // 00 < 01 < 10 < 11 in preference
        if (!cand_found || cls <= best_cls) begin
          cand_found = 1'b1; best_cls = cls; cand_idx = IW'(i);
        end
      end
    end
  end

  logic          st_take;
  logic [IW-1:0] st_idx;
  assign st_take    = st_alloc_i && (free_found || cand_found);
  assign st_full_o  = st_alloc_i && !st_take;
  assign st_idx     = free_found ? free_idx : cand_idx;
  assign evict_o    = st_take && !free_found;
  assign pi_ready_o = !st_alloc_i;

  // existing completed entry for the patch word
  logic          pi_dup;
  logic [IW-1:0] pi_dup_idx;
  always_comb begin
    pi_dup = 1'b0;
    pi_dup_idx = '0;
    for (int i = 0; i < N; i++)
      if (q[i].valid && q[i].done && q[i].addr == pi_addr_i) begin pi_dup = 1'b1; pi_dup_idx = IW'(i); end
  end

  // completing store and older completed copy of its word
  logic          cp_found, old_found;
  logic [IW-1:0] cp_idx, old_idx;
  always_comb begin
    cp_found = 1'b0; cp_idx = '0; old_found = 1'b0; old_idx = '0;
    for (int i = 0; i < N; i++)
      if (st_complete_i && q[i].valid && !q[i].done && q[i].color == st_complete_color_i) begin
        cp_found = 1'b1; cp_idx = IW'(i);
      end
    for (int i = 0; i < N; i++)
      if (cp_found && q[i].valid && q[i].done && q[i].addr == q[cp_idx].addr) begin
        old_found = 1'b1; old_idx = IW'(i);
      end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      patch_o[i]     = q[i].valid && q[i].patch;
      completed_o[i] = q[i].valid && q[i].done;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else begin
      if (fw_found) q[fw_idx].refb <= 1'b1;
      // clear reference bits when all patch entries are referenced and a
      // replacement candidate is being sought
      if (st_alloc_i && !free_found && any_patch && all_patch_ref)
        for (int i = 0; i < N; i++) q[i].refb <= 1'b0;
      if (inv_i)
        for (int i = 0; i < N; i++)
          if (q[i].done && line_of(q[i].addr) == inv_laddr_i) q[i].valid <= 1'b0;
      if (cp_found) begin
        q[cp_idx].done  <= 1'b1;
        q[cp_idx].patch <= old_found && q[old_idx].patch;
        q[cp_idx].refb  <= 1'b0;
        if (old_found) q[old_idx].valid <= 1'b0;
      end
      if (st_take) begin
        q[st_idx] <= '{valid: 1'b1, done: 1'b0, patch: 1'b0, refb: 1'b0,
                       color: st_color_i, addr: st_addr_i, data: st_data_i};
      end else if (pi_valid_i && pi_ready_o) begin
        if (pi_dup) q[pi_dup_idx].patch <= 1'b1;
        else if (free_found || un_np_found)
          q[free_found ? free_idx : un_np_idx] <= '{valid: 1'b1, done: 1'b1, patch: 1'b1, refb: 1'b0,
                                                   color: '0, addr: pi_addr_i, data: pi_data_i};
      end
    end
  end

  // a store must not complete twice or be unknown
  a_complete_known: assert property (@(posedge clk) disable iff (!rst_n)
    st_complete_i |-> cp_found);
endmodule
