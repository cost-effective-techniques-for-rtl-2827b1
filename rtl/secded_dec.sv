// secded_dec: syndrome check and single-bit correction for the extended
// Hamming code produced by secded_enc.
//
// The Hamming syndrome is the stored check bits XOR the check bits
// recomputed from the data. With EXT=1 the overall parity of the word
// separates a single error (odd parity: corrected, whether it hit a data
// bit, a check bit or the parity bit) from a double error (even parity,
// non-zero syndrome: detected, not corrected). With EXT=0 the code only
// corrects a single error. zero_o is the "valid code word" test that COP
// uses to decide whether a block read from DRAM is compressed.
// Purely combinational.
module secded_dec #(
  parameter int unsigned K   = 120,
  parameter int unsigned R   = ecc_pkg::hamming_r(K),
  parameter bit          EXT = 1'b1
) (
  input  logic [K-1:0]     data_i,
  input  logic [R+EXT-1:0] check_i,
  output logic [K-1:0]     data_o,     // corrected data
  output logic             zero_o,     // zero syndrome: a valid code word
  output logic             single_o,   // one error, corrected
  output logic             double_o    // uncorrectable error
);
  logic [R+EXT-1:0] recomputed;
  secded_enc #(.K(K), .R(R), .EXT(EXT)) u_enc (.data_i(data_i), .check_o(recomputed));

  logic [R-1:0] syn;
  logic         par;
  assign syn = check_i[R-1:0] ^ recomputed[R-1:0];

  if (EXT) begin : g_ext
    // parity over the whole received word
    assign par = (^data_i) ^ (^check_i);
  end else begin : g_noext
    assign par = |syn;
  end

  // a syndrome that names no position of the shortened code is uncorrectable
  logic hits_data;
  logic [K-1:0] flip;
  for (genvar i = 0; i < K; i++) begin : g_fix
    localparam logic [R-1:0] POS = R'(ecc_pkg::data_pos(i));
    assign flip[i] = (syn == POS);
  end
  assign hits_data = |flip;

  logic syn_is_check;
  assign syn_is_check = (syn == '0) || ((syn & (syn - 1'b1)) == '0);

  always_comb begin
    zero_o   = (syn == '0) && !par;
    single_o = par && (hits_data || syn_is_check);
    double_o = (syn != '0) && !single_o;
    data_o   = single_o ? (data_i ^ flip) : data_i;
  end
endmodule
