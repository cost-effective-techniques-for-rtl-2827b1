// tb_sq_patch_inserter: random lines and fault patterns are handed to the
// inserter while the store-queue side accepts with random stalls. The
// bench checks that exactly the faulty segments come out, lowest first,
// with the right word address and data, and that no new line is taken
// before the current one is drained.
module tb_sq_patch_inserter;
  import ipatch_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, pi_valid, pi_ready;
  laddr_t in_laddr;
  line_t in_data;
  fault_t in_fault;
  waddr_t pi_addr;
  word_t pi_data;

  sq_patch_inserter dut (.clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .in_laddr_i(in_laddr), .in_data_i(in_data), .in_fault_i(in_fault),
    .pi_valid_o(pi_valid), .pi_addr_o(pi_addr), .pi_data_o(pi_data), .pi_ready_i(pi_ready));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  waddr_t exp_a[$];
  word_t  exp_d[$];

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; pi_ready = 0; in_laddr = '0; in_data = '0; in_fault = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // drive inputs for this cycle
      in_valid = ($urandom_range(0, 2) == 0);
      in_laddr = laddr_t'({$urandom(), $urandom()});
      for (int i = 0; i < 16; i++) in_data[32*i +: 32] = $urandom();
      in_fault = fault_t'($urandom());
      if ($urandom_range(0, 3) == 0) in_fault = '0;
      pi_ready = ($urandom_range(0, 3) != 0);
      #1;
      chk(in_ready == (exp_a.size() == 0), "ready only when drained");
      chk(pi_valid == (exp_a.size() != 0), "valid while segments remain");
      if (pi_valid && pi_ready) begin
        chk(pi_addr == exp_a[0] && pi_data == exp_d[0], "segment address/data");
        void'(exp_a.pop_front()); void'(exp_d.pop_front());
      end
      if (in_valid && in_ready)
        for (int s = 0; s < NSUB; s++)
          if (in_fault[s]) begin
            exp_a.push_back({in_laddr, SUB_W'(s)});
            exp_d.push_back(in_data[64*s +: 64]);
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
