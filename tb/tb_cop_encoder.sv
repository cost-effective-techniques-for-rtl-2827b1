// tb_cop_encoder: checks scheme choice against the independent
// compressibility predicates, that compressed output holds four valid
// hashed code words, that raw blocks pass unchanged, and that
// incompressible blocks with 3 or 4 valid code words raise alias_o while
// those with 2 or fewer do not.
module tb_cop_encoder;
  import tb_ref_pkg::*;
  import cop_pkg::*;
  int checks = 0, failures = 0;
  int n_scheme [4];

  block_t  blk, out;
  logic    compressed, alias_f;
  scheme_e scheme;
  cop_encoder dut (.blk_i(blk), .blk_o(out), .compressed_o(compressed), .scheme_o(scheme), .alias_o(alias_f));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scheme_e exp;
    for (int t = 0; t < 2000; t++) begin
      blk = gen_block(t % 5);
      #1;
      exp = msb_ok(blk) ? SCHEME_MSB : rle_ok(blk) ? SCHEME_RLE : txt_ok(blk) ? SCHEME_TXT : SCHEME_NONE;
      chk(scheme == exp, $sformatf("scheme t=%0d", t));
      chk(compressed == (exp != SCHEME_NONE), "compressed flag");
      n_scheme[int'(scheme)]++;
      if (compressed) begin
        chk(cw_count_ref(out) == 4, "four code words");
        chk(!alias_f, "no alias when compressed");
      end else begin
        chk(out == blk, "raw passthrough");
        chk(alias_f == (cw_count_ref(blk) >= 3), "alias rule");
      end
    end
    for (int t = 0; t < 100; t++) begin
      int n;
      n = t % 5;
      blk = alias_block(n);
      #1;
      chk(!compressed, "alias block incompressible");
      chk(alias_f == (n >= 3), $sformatf("alias n=%0d", n));
    end
    for (int s = 0; s < 4; s++) chk(n_scheme[s] > 0, $sformatf("scheme %0d seen", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
