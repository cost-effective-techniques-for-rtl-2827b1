// tb_secded_enc: compares the check bits of secded_enc with the reference
// model for the (128,120) default and for a (34,28) single-error code.
module tb_secded_enc;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [119:0] d1;
  logic [7:0]   c1;
  logic [27:0]  d2;
  logic [5:0]   c2;
  secded_enc dut (.data_i(d1), .check_o(c1));
  secded_enc #(.K(28), .EXT(1'b0)) dut_sec (.data_i(d2), .check_o(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] r;
    for (int t = 0; t < 400; t++) begin
      d1 = {$urandom, $urandom, $urandom, $urandom};
      if (t < 120) d1 = 120'b1 << t;
      d2 = 28'($urandom);
      #1;
      r = ham_check({904'b0, d1}, 120, 1);
      checks++;
      if (c1 !== r[7:0]) begin failures++; $display("FAIL 120 t=%0d %h vs %h", t, c1, r[7:0]); end
      r = ham_check({996'b0, d2}, 28, 0);
      checks++;
      if (c2 !== r[5:0]) begin failures++; $display("FAIL 28 t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
