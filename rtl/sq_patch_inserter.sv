// sq_patch_inserter: copies patch segments of a newly filled d-cache line
// from the MSHR fill buffer into the store queue.
//
// When the data-cache MSHRs hand a completed line to the L1, the fault
// pattern of its destination way tells which 8-byte segments land on
// disabled subblocks. This block takes the line and pattern (in_valid_i /
// in_ready_o), then offers one segment per cycle to the store queue's
// patch-insert port (pi_valid_o / pi_ready_i), which only accepts when no
// store uses the write port, lowest segment first. It holds one line at a
// time and accepts the next once all segments of the current one are sent.
// The path and the use of the fault pattern follow the document; the
// one-line buffer and the handshake are this design's choices.
module sq_patch_inserter
  import ipatch_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid_i,
  output logic   in_ready_o,
  input  laddr_t in_laddr_i,
  input  line_t  in_data_i,
  input  fault_t in_fault_i,
  output logic   pi_valid_o,
  output waddr_t pi_addr_o,
  output word_t  pi_data_o,
  input  logic   pi_ready_i
);
  laddr_t laddr_q;
  line_t  data_q;
  fault_t todo_q;

  logic [SUB_W-1:0] seg;
  always_comb begin
    seg = '0;
    for (int s = NSUB - 1; s >= 0; s--) if (todo_q[s]) seg = SUB_W'(s);
  end

  assign in_ready_o = (todo_q == '0);
  assign pi_valid_o = (todo_q != '0);
  assign pi_addr_o  = {laddr_q, seg};
  assign pi_data_o  = data_q[64*seg +: 64];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      laddr_q <= '0;
      data_q  <= '0;
      todo_q  <= '0;
    end else if (in_valid_i && in_ready_o) begin
      laddr_q <= in_laddr_i;
      data_q  <= in_data_i;
      todo_q  <= in_fault_i;
    end else if (pi_valid_o && pi_ready_i) begin
      todo_q[seg] <= 1'b0;
    end
  end
endmodule
