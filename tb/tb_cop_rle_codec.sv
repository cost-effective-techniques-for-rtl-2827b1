// tb_cop_rle_codec: random and targeted blocks; checks the compressor's
// success flag against an independent predicate and that decompressing the
// body returns the original block whenever compression succeeded.
module tb_cop_rle_codec;
  import tb_ref_pkg::*;
  import cop_pkg::*;
  int checks = 0, failures = 0, succeeded = 0;

  block_t blk, back;
  body_t  body;
  logic   ok;
  cop_rle_codec dut (.blk_i(blk), .ok_o(ok), .body_o(body), .body_i(body), .blk_o(back));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    for (int t = 0; t < 3000; t++) begin
      blk = gen_block(t % 5);
      if (t == 0) blk = '0;
      if (t == 1) blk = '1;
      #1;
      exp = rle_ok(blk);
      checks++;
      if (ok !== exp) begin failures++; $display("FAIL ok t=%0d got %0d exp %0d", t, ok, exp); end
      if (ok) begin
        succeeded++;
        checks++;
        if (back !== blk) begin failures++; $display("FAIL roundtrip t=%0d", t); end
      end
    end
    checks++;
    if (succeeded < 100) begin failures++; $display("FAIL too few compressible blocks %0d", succeeded); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
