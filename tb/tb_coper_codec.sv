// tb_coper_codec: formats random blocks with random pointers, then reads
// them back through both read steps with no error, one flipped bit in the
// pointer field, one in the data or entry, and two in the data, checking
// pointer recovery, data recovery and the error flags.
module tb_coper_codec;
  import coper_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [511:0] blk, stored, rstored, rblk;
  ptr_t ptr, rptr;
  entry_t ent, rent;
  logic perr, corr, unc;
  coper_codec dut (.wr_blk_i(blk), .wr_ptr_i(ptr), .wr_stored_o(stored), .wr_entry_o(ent),
                   .rd_stored_i(rstored), .rd_ptr_o(rptr), .rd_ptr_err_o(perr),
                   .rd_entry_i(rent), .rd_blk_o(rblk), .rd_corrected_o(corr), .rd_uncorrectable_o(unc));

  task automatic chk(input bit cond, input string what);
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
    logic [11:0] r;
    for (int t = 0; t < 400; t++) begin
      int mode, p;
      blk = rand_block();
      ptr = ptr_t'(28'($urandom));
      #1;
      // independent check of the formats
      chk(stored[511:34] == blk[511:34], "upper bits kept");
      chk(stored[33:6] == ptr, "pointer placed");
      r = ham_check({996'b0, ptr}, 28, 0);
      chk(stored[5:0] == r[5:0], "pointer check bits");
      r = ham_check({512'b0, blk}, 512, 1);
      chk(ent.valid && ent.data == blk[33:0] && ent.ecc == r[10:0], "entry fields");
      rstored = stored;
      rent = ent;
      mode = t % 4;
      if (mode == 1) begin p = $urandom_range(0, 33); rstored[p] = ~rstored[p]; end
      if (mode == 2) begin
        p = $urandom_range(0, 511);
        if (p < 478) rstored[34 + p] = ~rstored[34 + p];
        else rent.data[p - 478] = ~rent.data[p - 478];
      end
      if (mode == 3) begin
        rstored[100] = ~rstored[100];
        rstored[200 + (t % 100)] = ~rstored[200 + (t % 100)];
      end
      #1;
      chk(rptr == ptr && !perr, $sformatf("pointer recovered t=%0d", t));
      if (mode == 3) chk(unc && !corr, "double detected");
      else begin
        chk(rblk[511:34] == blk[511:34] && !unc, "data recovered");
        if (mode == 2) chk(corr && rblk == blk, "single corrected");
        if (mode == 0) chk(!corr && rblk == blk, "clean");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
