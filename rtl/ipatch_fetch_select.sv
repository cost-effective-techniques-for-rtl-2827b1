// ipatch_fetch_select: source selection for instruction fetch (front end
// of iPatch).
//
// A fetch block comes, in order of preference, decoded from the micro-op
// cache, or undecoded from an i-cache MSHR fill buffer, or from the L1
// i-cache; otherwise (miss or false hit) it must come from L2. For
// undecoded instructions the i-cache side also tells the decoder whether
// the block maps to a disabled subblock (fault_o): the block's subblock of
// the line it was read from or is being filled into. The decoder passes
// that bit on when it writes the micro-ops into the micro-op cache, where
// it becomes the patch bit. patched_o marks a false hit that the micro-op
// cache or an MSHR avoided. Combinational. Order and fault-pattern path
// come from the document's figure of the front end; the outputs are this
// design's.
module ipatch_fetch_select
  import ipatch_pkg::*;
#(
  parameter int unsigned UOP_W = 128
) (
  input  logic             fetch_i,
  input  logic [SUB_W-1:0] sub_i,          // subblock of the fetch address
  input  logic             uc_hit_i,
  input  logic [UOP_W-1:0] uc_uops_i,
  input  logic             mshr_hit_i,
  input  word_t            mshr_data_i,
  input  logic             l1_hit_i,
  input  logic             l1_false_hit_i,
  input  word_t            l1_data_i,
  input  fault_t           line_fault_i,   // fault pattern of the line (current or destination way)
  output logic             uops_valid_o,
  output logic [UOP_W-1:0] uops_o,
  output logic             inst_valid_o,   // undecoded words to the decoder
  output word_t            inst_o,
  output logic             fault_o,        // words map to a disabled subblock
  output logic [1:0]       src_o,          // 0 uop cache, 1 MSHR, 2 L1, 3 none
  output logic             to_l2_o,
  output logic             patched_o
);
  always_comb begin
    uops_valid_o = 1'b0;
    inst_valid_o = 1'b0;
    uops_o       = uc_uops_i;
    inst_o       = '0;
    src_o        = 2'd3;
    if (fetch_i) begin
      if (uc_hit_i)        begin uops_valid_o = 1'b1; src_o = 2'd0; end
      else if (mshr_hit_i) begin inst_valid_o = 1'b1; inst_o = mshr_data_i; src_o = 2'd1; end
      else if (l1_hit_i)   begin inst_valid_o = 1'b1; inst_o = l1_data_i;   src_o = 2'd2; end
    end
    fault_o   = inst_valid_o && line_fault_i[sub_i];
    to_l2_o   = fetch_i && !uops_valid_o && !inst_valid_o;
    patched_o = fetch_i && (uc_hit_i || mshr_hit_i) && l1_false_hit_i;
  end
endmodule
