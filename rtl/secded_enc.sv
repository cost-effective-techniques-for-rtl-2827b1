// secded_enc: check-bit generator for an extended Hamming code.
//
// K data bits produce R Hamming check bits, plus one overall parity bit
// when EXT=1 (single-error correct, double-error detect). Check bit j is
// the XOR of the data bits whose Hamming position has bit j set; the
// overall parity bit makes the XOR of the whole code word zero. Purely
// combinational. Defaults give the (128,120) code that COP uses for each
// quarter of a 64-byte block; the code construction itself is this
// design's choice (see ecc_pkg).
module secded_enc #(
  parameter int unsigned K   = 120,
  parameter int unsigned R   = ecc_pkg::hamming_r(K),
  parameter bit          EXT = 1'b1
) (
  input  logic [K-1:0]       data_i,
  output logic [R+EXT-1:0]   check_o
);
  logic [R-1:0] contrib [K];

  for (genvar i = 0; i < K; i++) begin : g_pos
    localparam logic [R-1:0] POS = R'(ecc_pkg::data_pos(i));
    assign contrib[i] = POS & {R{data_i[i]}};
  end

  logic [R-1:0] ham;
  always_comb begin
    ham = '0;
    for (int i = 0; i < K; i++) ham ^= contrib[i];
  end

  if (EXT) begin : g_ext
    assign check_o = {(^data_i) ^ (^ham), ham};
  end else begin : g_noext
    assign check_o = ham;
  end
endmodule
