// cop_cw_counter: the code-word check at the heart of COP's compression
// tracking.
//
// The 512-bit block is taken as four 128-bit words {check[7:0], data[119:0]}.
// Each has its static hash removed (XOR with cop_pkg::seg_hash) and goes
// through a (128,120) SECDED decoder. count_o is the number of words with a
// zero syndrome; a block counts as compressed when it reaches 3. Per-word
// corrected data and error flags are passed on for the decoder.
// Combinational. The four-code-word split and the per-word hash follow the
// document.
module cop_cw_counter
  import cop_pkg::*;
(
  input  block_t                  blk_i,
  output logic [2:0]              count_o,
  output logic [NSEG-1:0]         zero_o,
  output logic [NSEG-1:0]         single_o,
  output logic [NSEG-1:0]         double_o,
  output payload_t                payload_o   // corrected data bits of the 4 words
);
  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    logic [SEG_BITS-1:0] cw;
    assign cw = blk_i[SEG_BITS*k +: SEG_BITS] ^ seg_hash(k);
    secded_dec #(.K(SEG_DATA), .EXT(1'b1)) u_dec (
      .data_i  (cw[SEG_DATA-1:0]),
      .check_i (cw[SEG_BITS-1:SEG_DATA]),
      .data_o  (payload_o[SEG_DATA*k +: SEG_DATA]),
      .zero_o  (zero_o[k]),
      .single_o(single_o[k]),
      .double_o(double_o[k])
    );
  end

  always_comb begin
    count_o = '0;
    for (int k = 0; k < NSEG; k++) count_o += 3'(zero_o[k]);
  end
endmodule
