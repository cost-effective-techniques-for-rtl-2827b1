// tb_ref_pkg: reference models and stimulus generators shared by the
// testbenches. The models are written independently of the RTL, position
// by position, so that a testbench compares the RTL with a separate
// description of the same code.
package tb_ref_pkg;

  // Check bits of the extended Hamming code over k data bits (k <= 1024),
  // built by laying the data out on Hamming positions.
  function automatic logic [11:0] ham_check(input logic [1023:0] d, input int k, input bit ext);
    logic [11:0] c;
    int r;
    int p;
    int i;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    c = '0;
    i = 0;
    p = 1;
    while (i < k) begin
      if ((p & (p - 1)) != 0) begin
        for (int j = 0; j < r; j++)
          if (((p >> j) & 1) == 1) c[j] = c[j] ^ d[i];
        i++;
      end
      p++;
    end
    if (ext) begin
      logic par;
      par = 1'b0;
      for (int q = 0; q < k; q++) par ^= d[q];
      for (int j = 0; j < r; j++) par ^= c[j];
      c[r] = par;
    end
    return c;
  endfunction

  function automatic logic [511:0] rand_block();
    logic [511:0] b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
    return b;
  endfunction

  // kind: 0 random, 1 text, 2 similar 64-bit values, 3 sparse zeros, 4 zero words
  function automatic logic [511:0] gen_block(input int kind);
    logic [511:0] b;
    b = rand_block();
    case (kind)
      1: for (int i = 0; i < 64; i++) b[8*i+7] = 1'b0;
      2: begin
        logic [4:0] e;
        e = 5'($urandom);
        for (int i = 0; i < 8; i++) b[64*i+58 +: 5] = e;
      end
      3: begin
        for (int i = 0; i < 6; i++) begin
          int w;
          w = $urandom_range(0, 31);
          b[16*w +: 16] = ($urandom_range(0, 1) == 1) ? 16'hFFFF : 16'h0000;
          if ($urandom_range(0, 1) == 1 && w < 31) b[16*w+16 +: 8] = b[16*w +: 8];
        end
      end
      4: for (int i = 0; i < 16; i++) if ($urandom_range(0, 2) == 0) b[32*i +: 32] = '0;
      default: ;
    endcase
    return b;
  endfunction

  function automatic bit txt_ok(input logic [511:0] b);
    for (int i = 0; i < 64; i++) if (b[8*i+7]) return 0;
    return 1;
  endfunction

  function automatic bit msb_ok(input logic [511:0] b);
    for (int i = 1; i < 8; i++) if (b[64*i+58 +: 5] != b[58 +: 5]) return 0;
    return 1;
  endfunction

  // greedy run search: byte index walk, runs start on even bytes
  function automatic bit rle_ok(input logic [511:0] b);
    int bits;
    int pos;
    bits = 0;
    pos = 0;
    while (pos < 63 && bits < 34) begin
      logic [7:0] x0, x1, x2;
      x0 = b[8*pos +: 8];
      x1 = b[8*pos+8 +: 8];
      x2 = (pos + 2 < 64) ? b[8*pos+16 +: 8] : 8'h3C;
      if ((x0 == 8'h00 || x0 == 8'hFF) && x1 == x0) begin
        if (pos + 2 < 64 && x2 == x0) begin bits += 17; pos += 4; end
        else begin bits += 9; pos += 2; end
      end else pos += 2;
    end
    return bits >= 34;
  endfunction

  // the static hash of code word k, as specified for the design
  function automatic logic [127:0] hash_ref(input int k);
    logic [31:0] w;
    logic [127:0] h;
    w = 32'h9E37_79B9 * (k + 1) + 32'h7F4A_7C15;
    for (int j = 0; j < 4; j++) begin
      h[32*j +: 32] = w;
      w = (w * 32'h0019_660D) + 32'h3C6E_F35F;
    end
    return h;
  endfunction

  // number of words of b that are valid hashed (128,120) code words
  function automatic int cw_count_ref(input logic [511:0] b);
    int n;
    n = 0;
    for (int k = 0; k < 4; k++) begin
      logic [127:0] w;
      logic [11:0]  c;
      w = b[128*k +: 128] ^ hash_ref(k);
      c = ham_check({904'b0, w[119:0]}, 120, 1);
      if (c[7:0] == w[127:120]) n++;
    end
    return n;
  endfunction

  // build an incompressible block with exactly n valid code words
  function automatic logic [511:0] alias_block(input int n);
    logic [511:0] b;
    logic [11:0]  c;
    do begin
      b = rand_block();
      b[7] = 1'b1; // not text
      for (int k = 0; k < n; k++) begin
        logic [127:0] w;
        w = b[128*k +: 128] ^ hash_ref(k);
        c = ham_check({904'b0, w[119:0]}, 120, 1);
        w[127:120] = c[7:0];
        b[128*k +: 128] = w ^ hash_ref(k);
      end
    end while (msb_ok(b) || rle_ok(b) || txt_ok(b) || cw_count_ref(b) != n);
    return b;
  endfunction

endpackage
