// ecc_pkg: helper functions for the extended Hamming (SECDED) codes used
// throughout the design: the (128,120) code that COP places in every
// compressed DRAM block, the (523,512) code that COP-ER keeps for
// incompressible blocks, the (34,28) pointer code and the (512,501) code
// that protects a block of COP-ER valid bits.
//
// Layout of every code word is {check bits, data bits}. Data bit i sits at
// Hamming position data_pos(i), the i-th position (counting from 3) that is
// not a power of two; Hamming check bit j covers every position with bit j
// set; with EXT=1 one more bit holds the parity of the whole word. The
// document names these codes and their sizes but prints no H-matrix in a
// readable form, so this classic construction is this design's own choice.
package ecc_pkg;

  // Number of Hamming check bits for k data bits: smallest r with
  // 2**r >= k + r + 1.
  function automatic int unsigned hamming_r(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Hamming position (1-based) of data bit i.
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned cnt;
    int unsigned p;
    cnt = 0;
    p   = 3;
    for (int unsigned q = 3; q < 32'h0010_0000; q++) begin
      if ((q & (q - 1)) != 0) begin
        if (cnt == i) begin
          p = q;
          break;
        end
        cnt++;
      end
    end
    return p;
  endfunction

endpackage
