// tb_ipatch_load_select: exhaustive over the hit/false-hit flags with
// random data, comparing against the store queue > MSHR > L1 priority
// and the derived miss, false-hit and patched flags.
module tb_ipatch_load_select;
  import ipatch_pkg::*;
  int checks = 0, failures = 0;

  logic ld, sqh, mh, l1h, l1f, done, to_l2, fh, patched;
  word_t sqd, md, l1d, d;
  logic [1:0] src;

  ipatch_load_select dut (.ld_i(ld), .sq_hit_i(sqh), .sq_data_i(sqd), .mshr_hit_i(mh), .mshr_data_i(md),
    .l1_hit_i(l1h), .l1_false_hit_i(l1f), .l1_data_i(l1d), .done_o(done), .data_o(d), .src_o(src),
    .to_l2_o(to_l2), .false_hit_o(fh), .patched_o(patched));

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
        logic e_done; word_t e_d; logic [1:0] e_src;
        {ld, sqh, mh, l1h, l1f} = 5'(v);
        if (l1h && l1f) l1f = 0;    // a line cannot hit and false-hit at once
        sqd = {$urandom(), $urandom()}; md = {$urandom(), $urandom()}; l1d = {$urandom(), $urandom()};
        #1;
        e_done = ld && (sqh || mh || l1h);
        e_src = !ld ? 2'd3 : sqh ? 2'd0 : mh ? 2'd1 : l1h ? 2'd2 : 2'd3;
        e_d = !e_done ? '0 : sqh ? sqd : mh ? md : l1d;
        chk(done == e_done && src == e_src && d == e_d, "select");
        chk(to_l2 == (ld && !e_done), "to_l2");
        chk(fh == (ld && !e_done && l1f), "false hit");
        chk(patched == (ld && (sqh || mh) && l1f), "patched");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
