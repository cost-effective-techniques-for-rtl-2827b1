// tb_ipatch_fetch_select: exhaustive over the hit/false-hit flags and
// random subblock and fault patterns, comparing against the micro-op
// cache > MSHR > L1 priority, the fault flag for words on a disabled
// subblock, and the miss and patched flags.
module tb_ipatch_fetch_select;
  import ipatch_pkg::*;
  int checks = 0, failures = 0;

  logic f, uh, mh, l1h, l1f, uv, iv, flt, to_l2, patched;
  logic [SUB_W-1:0] sub;
  logic [127:0] uu, uo;
  word_t md, l1d, inst;
  fault_t lf;
  logic [1:0] src;

  ipatch_fetch_select dut (.fetch_i(f), .sub_i(sub), .uc_hit_i(uh), .uc_uops_i(uu), .mshr_hit_i(mh),
    .mshr_data_i(md), .l1_hit_i(l1h), .l1_false_hit_i(l1f), .l1_data_i(l1d), .line_fault_i(lf),
    .uops_valid_o(uv), .uops_o(uo), .inst_valid_o(iv), .inst_o(inst), .fault_o(flt), .src_o(src),
    .to_l2_o(to_l2), .patched_o(patched));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++)
      for (int v = 0; v < 32; v++) begin
        logic e_iv; word_t e_i; logic [1:0] e_src;
        {f, uh, mh, l1h, l1f} = 5'(v);
        if (l1h && l1f) l1f = 0;
        sub = SUB_W'($urandom()); lf = fault_t'($urandom());
        uu = {$urandom(), $urandom(), $urandom(), $urandom()};
        md = {$urandom(), $urandom()}; l1d = {$urandom(), $urandom()};
        #1;
        e_iv = f && !uh && (mh || l1h);
        e_src = !f ? 2'd3 : uh ? 2'd0 : mh ? 2'd1 : l1h ? 2'd2 : 2'd3;
        e_i = !e_iv ? '0 : mh ? md : l1d;
        chk(uv == (f && uh) && src == e_src, "source");
        chk(!uv || uo == uu, "uops pass through");
        chk(iv == e_iv && inst == e_i, "inst");
        chk(flt == (e_iv && lf[sub]), "fault flag");
        chk(to_l2 == (f && !uh && !mh && !l1h), "to_l2");
        chk(patched == (f && (uh || mh) && l1f), "patched");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
