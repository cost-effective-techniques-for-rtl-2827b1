// tb_secded_dec: encodes with the reference model, injects zero, one or
// two bit errors anywhere in the (128,120) word and checks the corrected
// data and the zero/single/double flags.
module tb_secded_dec;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [119:0] d, dout;
  logic [7:0]   c;
  logic zero, single, dbl;
  secded_dec dut (.data_i(d), .check_i(c), .data_o(dout), .zero_o(zero), .single_o(single), .double_o(dbl));

  task automatic expect_ok(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [119:0] orig;
    logic [127:0] w;
    logic [11:0]  r;
    int nerr, p1, p2;
    for (int t = 0; t < 600; t++) begin
      orig = {$urandom, $urandom, $urandom, $urandom};
      r    = ham_check({904'b0, orig}, 120, 1);
      w    = {r[7:0], orig};
      nerr = t % 3;
      p1 = $urandom_range(0, 127);
      do p2 = $urandom_range(0, 127); while (p2 == p1);
      if (nerr >= 1) w[p1] = ~w[p1];
      if (nerr == 2) w[p2] = ~w[p2];
      d = w[119:0];
      c = w[127:120];
      #1;
      case (nerr)
        0: begin
          expect_ok(zero && !single && !dbl, "clean flags");
          expect_ok(dout == orig, "clean data");
        end
        1: begin
          expect_ok(!zero && single && !dbl, "single flags");
          expect_ok(dout == orig, "single corrected");
        end
        default: expect_ok(!zero && !single && dbl, "double flags");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
