// tb_sbd_remap: with a period of 100 cycles, checks that flush pulses come
// exactly every 100 enabled cycles, that the remap value advances with
// each, and that the counter holds while disabled.
module tb_sbd_remap;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic flush;
  logic [5:0] remap;
  sbd_remap #(.PERIOD(100)) dut (.clk(clk), .rst_n(rst_n), .en_i(en), .flush_o(flush), .remap_o(remap));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int en_cycles, last, pulses;
    en_cycles = 0; last = 0; pulses = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      en = !(c >= 300 && c < 350);
      @(posedge clk);
      if (en) en_cycles++;
      #1;
      if (flush) begin
        pulses++;
        checks++;
        if (en_cycles - last != 100) begin failures++; $display("FAIL period %0d", en_cycles - last); end
        last = en_cycles;
        checks++;
        if (int'(remap) != pulses) begin failures++; $display("FAIL remap %0d", remap); end
      end
    end
    checks++;
    if (pulses != 9) begin failures++; $display("FAIL pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
