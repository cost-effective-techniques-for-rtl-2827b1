// sbd_remap: performance-predictability mechanism of subblock disabling.
//
// Every PERIOD cycles (500,000 in the document) the L1 is invalidated and a
// remap counter advances; the L1 then indexes its sets with
// (set index XOR counter), so each address meets a different pattern of
// disabled subblocks over time. flush_o is a one-cycle pulse; remap_o
// changes in the same cycle. With a write-through L1 there is nothing to
// write back before the flush. Period and XOR hash follow the document;
// the counter width (the set-index width) is this design's choice.
module sbd_remap #(
  parameter int unsigned PERIOD = 500_000,
  parameter int unsigned SET_W  = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_i,
  output logic             flush_o,
  output logic [SET_W-1:0] remap_o
);
  localparam int unsigned CW = $clog2(PERIOD);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      flush_o <= 1'b0;
      remap_o <= '0;
    end else begin
      flush_o <= 1'b0;
      if (en_i) begin
        if (cnt == CW'(PERIOD - 1)) begin
          cnt     <= '0;
          flush_o <= 1'b1;
          remap_o <= remap_o + 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
