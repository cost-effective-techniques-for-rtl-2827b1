// tb_cop_cw_counter: blocks built with exactly 0..4 valid hashed code
// words (and random blocks) are checked against the reference count.
module tb_cop_cw_counter;
  import tb_ref_pkg::*;
  import cop_pkg::*;
  int checks = 0, failures = 0;

  block_t blk;
  logic [2:0] count;
  logic [3:0] zero, single, dbl;
  payload_t payload;
  cop_cw_counter dut (.blk_i(blk), .count_o(count), .zero_o(zero), .single_o(single), .double_o(dbl), .payload_o(payload));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int n;
      n = t % 5;
      blk = alias_block(n);
      #1;
      checks++;
      if (int'(count) != n) begin failures++; $display("FAIL t=%0d count %0d exp %0d", t, count, n); end
      checks++;
      if (zero[0] !== (n > 0)) begin failures++; $display("FAIL zero flag t=%0d", t); end
      if (n > 0) begin
        checks++;
        if (payload[119:0] !== (blk[119:0] ^ hash_ref(0)[119:0])) begin failures++; $display("FAIL payload t=%0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
