// ipatch_load_select: source selection for a load (data side of iPatch).
//
// A load looks up the store queue, the data-cache MSHRs and the L1 in
// parallel and takes its data, in order of preference, from the store
// queue, then an MSHR fill buffer, then the L1. Only when none of them can
// supply it does the load go to L2: an L1 miss, or a false hit (tag match
// on a disabled subblock). patched_o marks a false hit that was avoided
// because a preferred structure supplied the data, which is the effect
// iPatch exists to create. Combinational. The order comes from the
// document's figure of the load/store path; the outputs are this design's.
module ipatch_load_select
  import ipatch_pkg::*;
(
  input  logic        ld_i,
  input  logic        sq_hit_i,
  input  word_t       sq_data_i,
  input  logic        mshr_hit_i,
  input  word_t       mshr_data_i,
  input  logic        l1_hit_i,
  input  logic        l1_false_hit_i,
  input  word_t       l1_data_i,
  output logic        done_o,        // data available now
  output word_t       data_o,
  output logic [1:0]  src_o,         // 0 SQ, 1 MSHR, 2 L1, 3 none
  output logic        to_l2_o,       // miss or unpatched false hit
  output logic        false_hit_o,   // unpatched false hit
  output logic        patched_o      // false hit avoided by SQ or MSHR
);
  always_comb begin
    done_o      = 1'b0;
    data_o      = '0;
    src_o       = 2'd3;
    if (ld_i) begin
      if (sq_hit_i)        begin done_o = 1'b1; data_o = sq_data_i;   src_o = 2'd0; end
      else if (mshr_hit_i) begin done_o = 1'b1; data_o = mshr_data_i; src_o = 2'd1; end
      else if (l1_hit_i)   begin done_o = 1'b1; data_o = l1_data_i;   src_o = 2'd2; end
    end
    to_l2_o     = ld_i && !done_o;
    false_hit_o = ld_i && !done_o && l1_false_hit_i;
    patched_o   = ld_i && (sq_hit_i || mshr_hit_i) && l1_false_hit_i;
  end
endmodule
