// tb_cop_decoder: blocks go through cop_encoder, optionally get one or two
// bit flips (as from DRAM soft errors), then through the decoder. Checks:
// the original data comes back, single errors are corrected, a double error
// in one code word is flagged, raw blocks pass unchanged, and each result
// appears exactly LATENCY (4) cycles after its input.
module tb_cop_decoder;
  import tb_ref_pkg::*;
  import cop_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  block_t blk, enc, dram, dout;
  logic compressed, alias_f, vin, vout, dcomp, dcorr, dunc;
  scheme_e scheme;
  cop_encoder u_enc (.blk_i(blk), .blk_o(enc), .compressed_o(compressed), .scheme_o(scheme), .alias_o(alias_f));
  cop_decoder dut (.clk(clk), .rst_n(rst_n), .valid_i(vin), .blk_i(dram), .valid_o(vout), .blk_o(dout),
                   .compressed_o(dcomp), .corrected_o(dcorr), .uncorrectable_o(dunc));

  // expected results, indexed by issue cycle
  block_t exp_blk [$];
  bit     exp_comp [$], exp_corr [$], exp_unc [$];
  int     exp_cyc [$];
  int     cyc = 0;
  int     n_corr = 0, n_unc = 0, n_raw = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && vout) begin
      chk(exp_blk.size() > 0, "unexpected output");
      if (exp_blk.size() > 0) begin
        chk(cyc - exp_cyc.pop_front() == 4, "latency 4");
        if (exp_unc[0]) chk(dunc, "uncorrectable flagged");
        else chk(dout == exp_blk[0], "data");
        chk(dcomp == exp_comp[0], "compressed flag");
        chk(dcorr == exp_corr[0], "corrected flag");
        void'(exp_blk.pop_front()); void'(exp_comp.pop_front());
        void'(exp_corr.pop_front()); void'(exp_unc.pop_front());
      end
    end
  end

  initial begin
    vin = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int mode;
      @(negedge clk);
      blk = gen_block(t % 5);
      #1;
      if (alias_f) begin vin = 0; continue; end
      dram = enc;
      mode = compressed ? (t % 4) : 0;   // 0 clean, 1 one flip, 2 two flips in one word, 3 clean
      if (mode == 1) begin int p; p = $urandom_range(0, 511); dram[p] = ~dram[p]; n_corr++; end
      if (mode == 2) begin
        int w, p1, p2;
        w = $urandom_range(0, 3);
        p1 = $urandom_range(0, 127);
        do p2 = $urandom_range(0, 127); while (p2 == p1);
        dram[128*w+p1] = ~dram[128*w+p1];
        dram[128*w+p2] = ~dram[128*w+p2];
        n_unc++;
      end
      if (!compressed) n_raw++;
      vin = 1;
      exp_blk.push_back(blk);
      exp_comp.push_back(compressed);
      exp_corr.push_back(mode == 1);
      exp_unc.push_back(mode == 2);
      exp_cyc.push_back(cyc);
      if (t % 7 == 3) begin @(negedge clk); vin = 0; end
    end
    @(negedge clk); vin = 0;
    repeat (8) @(posedge clk);
    chk(exp_blk.size() == 0, "all results seen");
    chk(n_corr > 0 && n_unc > 0 && n_raw > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
