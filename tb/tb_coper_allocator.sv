// tb_coper_allocator: runs the allocator with a fan-out of 4 (64 ECC
// blocks, 704 entries) against a DRAM model with random response delays.
// It fills the region completely (the next ALLOC must report full), frees
// and re-allocates entries at random, updates entries in place, and checks
// that pointers are unique, that every entry lands in the block and slot
// its pointer names, that freed entries are found again, that tree walks
// happen, and finally that every valid bit of the tree matches the blocks
// below it.
module tb_coper_allocator;
  import coper_pkg::*;
  localparam int F = 4;
  localparam int VPAR = 4;
  localparam int G3 = 1 + F, G2 = 1 + F * G3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req, ack, full, err, walked;
  logic [1:0] op;
  ptr_t ptr_in, ptr_out;
  entry_t ent;
  logic mreq, mwe, mready, mrvalid;
  logic [31:0] maddr;
  logic [511:0] mwdata, mrdata;

  coper_allocator #(.F(F), .VPAR(VPAR)) dut (
    .clk(clk), .rst_n(rst_n), .req_i(req), .op_i(op), .ptr_i(ptr_in), .entry_i(ent),
    .ack_o(ack), .ptr_o(ptr_out), .full_o(full), .err_o(err), .walked_o(walked),
    .mem_req_o(mreq), .mem_we_o(mwe), .mem_addr_o(maddr), .mem_wdata_o(mwdata),
    .mem_ready_i(mready), .mem_rvalid_i(mrvalid), .mem_rdata_i(mrdata));

  // DRAM model: zero-initialised blocks, random ready and read latency
  logic [511:0] mem [int];
  int rd_pending = -1;
  int rd_delay = 0;
  always @(posedge clk) begin
    mrvalid <= 1'b0;
    if (rd_pending >= 0) begin
      if (rd_delay == 0) begin
        mrvalid <= 1'b1;
        mrdata  <= mem.exists(rd_pending) ? mem[rd_pending] : '0;
        rd_pending = -1;
      end else rd_delay--;
    end
    if (mreq && mready) begin
      if (mwe) mem[int'(maddr)] = mwdata;
      else begin rd_pending = int'(maddr); rd_delay = $urandom_range(0, 3); end
    end
    mready <= ($urandom_range(0, 3) != 0);
  end

  function automatic int eaddr(input int n);
    int jj, kk, mm;
    mm = n % F; kk = (n / F) % F; jj = n / (F * F);
    return 3 + jj * G2 + kk * G3 + mm;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_op(input logic [1:0] o, input ptr_t p, input entry_t e);
    @(negedge clk);
    req = 1; op = o; ptr_in = p; ent = e;
    @(negedge clk);
    req = 0;
    while (!ack) @(negedge clk);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit     used [int];     // entry index n*EPB+slot -> allocated
  entry_t content [int];
  int n_walk = 0;

  initial begin
    entry_t e;
    req = 0; op = 0; ptr_in = '0; ent = '0; mready = 0; mrvalid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill
    for (int t = 0; t < F * F * F * EPB; t++) begin
      int key;
      e = '{valid: 1'b1, data: {2'b0, $urandom}, ecc: 11'($urandom)};
      do_op(2'd0, '0, e);
      chk(!full && !err, $sformatf("alloc %0d ok", t));
      key = int'(ptr_out.blknum) * EPB + int'(ptr_out.slot);
      chk(!used.exists(key), $sformatf("unique pointer %0d", t));
      chk(ptr_out.slot < EPB && int'(ptr_out.blknum) < F * F * F, "pointer in range");
      used[key] = 1; content[key] = e;
      if (walked) n_walk++;
    end
    do_op(2'd0, '0, e);
    chk(full, "region full reported");
    // free and reallocate at random
    for (int t = 0; t < 300; t++) begin
      int key, n, s;
      n = $urandom_range(0, F * F * F - 1);
      s = $urandom_range(0, EPB - 1);
      key = n * EPB + s;
      if (used.exists(key)) begin
        if (t % 3 == 0) begin
          e = '{valid: 1'b1, data: {2'b0, $urandom}, ecc: 11'($urandom)};
          do_op(2'd2, '{blknum: BLKNUM_W'(n), slot: SLOT_W'(s)}, e);
          content[key] = e;
        end else begin
          do_op(2'd1, '{blknum: BLKNUM_W'(n), slot: SLOT_W'(s)}, '0);
          used.delete(key); content.delete(key);
          chk(!err, "free ok");
          if (t % 2 == 0) begin
            e = '{valid: 1'b1, data: {2'b0, $urandom}, ecc: 11'($urandom)};
            do_op(2'd0, '0, e);
            chk(!full && !err, $sformatf("realloc ok full=%0d err=%0d", full, err));
            key = int'(ptr_out.blknum) * EPB + int'(ptr_out.slot);
            chk(!used.exists(key), "realloc unique");
            used[key] = 1; content[key] = e;
            if (walked) n_walk++;
          end
        end
      end
    end
    // memory contents against the model
    for (int n = 0; n < F * F * F; n++) begin
      logic [511:0] b;
      b = mem.exists(eaddr(n)) ? mem[eaddr(n)] : '0;
      for (int s = 0; s < EPB; s++) begin
        int key;
        key = n * EPB + s;
        chk(b[ENTRY_W*s + ENTRY_W - 1] == used.exists(key), $sformatf("entry valid n=%0d s=%0d", n, s));
        if (used.exists(key)) chk(b[ENTRY_W*s +: ENTRY_W] == content[key], "entry content");
      end
    end
    // tree invariants
    for (int jj = 0; jj < F; jj++) begin
      logic [511:0] l2;
      bit all2;
      all2 = 1;
      l2 = mem.exists(1 + jj * G2) ? mem[1 + jj * G2] : '0;
      for (int kk = 0; kk < F; kk++) begin
        logic [511:0] l3;
        bit all3;
        all3 = 1;
        l3 = mem.exists(2 + jj * G2 + kk * G3) ? mem[2 + jj * G2 + kk * G3] : '0;
        for (int mm = 0; mm < F; mm++) begin
          bit fullb;
          fullb = 1;
          for (int s = 0; s < EPB; s++) if (!used.exists(((jj * F + kk) * F + mm) * EPB + s)) fullb = 0;
          chk(l3[mm] == fullb, "L3 bit");
          all3 &= fullb;
        end
        chk(l2[kk] == all3, "L2 bit");
        all2 &= all3;
      end
      chk((mem.exists(0) ? mem[0][jj] : 1'b0) == all2, "L1 bit");
    end
    chk(n_walk > 0, "tree walk happened");
    $display("walks=%0d", n_walk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
