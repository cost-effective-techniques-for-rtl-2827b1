// llc_alias_victim: last-level-cache victim choice for COP.
//
// Blocks that COP may not write to DRAM (incompressible aliases: raw data
// in which 3 or more words look like valid code words) carry an alias bit
// in the LLC and must stay there, patching the stale copy in DRAM. This
// selector picks, in one set, an invalid way if there is one, otherwise
// the least recently used way whose alias bit is clear. If every way holds
// an alias the set has overflowed: overflow_o is raised and no victim is
// given (the document leaves the handling of this very rare case to
// per-page compression disable or to a spill region; neither is built here).
// Ages are LRU ranks supplied by the cache (larger = older).
// Combinational. The rule comes from the document; the age encoding is
// this design's choice. WAYS = 16 is the document's L3 associativity.
module llc_alias_victim #(
  parameter int unsigned WAYS  = 16,
  parameter int unsigned AGE_W = $clog2(WAYS)
) (
  input  logic [WAYS-1:0]            valid_i,
  input  logic [WAYS-1:0]            alias_i,
  input  logic [WAYS-1:0][AGE_W-1:0] age_i,
  output logic [$clog2(WAYS)-1:0]    victim_o,
  output logic                       victim_ok_o,
  output logic                       overflow_o
);
  always_comb begin
    logic             have;
    logic [AGE_W-1:0] best;
    have     = 1'b0;
    best     = '0;
    victim_o = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_i[w] && !alias_i[w] && (!have || age_i[w] > best)) begin
        have     = 1'b1;
        best     = age_i[w];
        victim_o = $clog2(WAYS)'(w);
      end
    end
    // an invalid way always wins
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_i[w]) begin
        have     = 1'b1;
        victim_o = $clog2(WAYS)'(w);
      end
    end
    victim_ok_o = have;
    overflow_o  = !have;
  end
endmodule
