// tb_llc_alias_victim: random sets of a 16-way LLC with distinct LRU ages,
// random valid and alias bits; the chosen way is compared with a reference
// choice, and all-alias sets must report overflow.
module tb_llc_alias_victim;
  int checks = 0, failures = 0;
  logic [15:0] valid, alias_b;
  logic [15:0][3:0] age;
  logic [3:0] victim;
  logic ok, ovf;
  int n_ovf = 0, n_skip = 0;
  llc_alias_victim dut (.valid_i(valid), .alias_i(alias_b), .age_i(age), .victim_o(victim), .victim_ok_o(ok), .overflow_o(ovf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [16];
      int exp;
      for (int i = 0; i < 16; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < 16; i++) age[i] = 4'(perm[i]);
      valid   = (t % 4 == 0) ? 16'($urandom) | 16'hF0F0 : 16'hFFFF;
      alias_b = (t % 5 == 0) ? 16'hFFFF : 16'($urandom) & 16'($urandom) & 16'($urandom);
      #1;
      exp = -1;
      for (int i = 0; i < 16; i++) if (!valid[i]) begin exp = i; break; end
      if (exp < 0) begin
        int best;
        best = -1;
        for (int i = 0; i < 16; i++) if (!alias_b[i] && int'(age[i]) > best) begin best = int'(age[i]); exp = i; end
        if (exp >= 0 && exp != perm.find_first_index(x) with (x == 15)[0]) n_skip++;
      end
      checks++;
      if (exp < 0) begin
        n_ovf++;
        if (!ovf || ok) begin failures++; $display("FAIL overflow t=%0d", t); end
      end else if (!ok || ovf || int'(victim) != exp) begin
        failures++; $display("FAIL t=%0d victim %0d exp %0d", t, victim, exp);
      end
    end
    checks++;
    if (n_ovf == 0 || n_skip == 0) begin failures++; $display("FAIL cases not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
