// coper_allocator: COP-ER ECC-entry allocator (memory-controller side).
//
// The ECC region in DRAM holds 64-byte blocks of 11 ECC entries and, above
// them, a three-level tree of valid-bit blocks. Each valid-bit block has
// F (501) valid bits and 11 SECDED check bits; an L3 valid bit is set when
// its block of ECC entries is full, an L2 bit when its L3 valid-bit block
// is all set, an L1 bit when its L2 block is all set. Region layout, in
// 64-byte block offsets: the L1 block at 0, then for every L2 block j a
// group {L2 block, F x {L3 block, F ECC-entry blocks}}.
//
// Operations (one at a time, req/ack):
//  ALLOC  - look for a 0 bit in the L3 block last used; if it is all set,
//           walk L1 -> L2 -> L3 to find one. Write the new entry into a free
//           slot of that ECC block and return its pointer. If the block
//           became full, set its L3 bit, and the L2 and L1 bits above when
//           their blocks became all set.
//  FREE   - clear the entry's valid bit; if its block was full, clear the
//           L3 bit, and the L2/L1 bits above when their blocks were all set.
//  UPDATE - rewrite an existing entry in place.
// Every valid-bit block read is checked and corrected with its code, and
// is written back re-encoded. Memory port: a request is held until
// mem_ready_i; a read returns one cycle or more later with mem_rvalid_i.
//
// The tree, its fan-out of 501, the 11 parity bits and the "most recently
// used L3 block" pointer are the document's. The layout order, the
// pointer format and the limit MAX_L2 (only L2 groups whose entries a
// 24-bit block number can reach are used) are this design's choices.
module coper_allocator
  import coper_pkg::*;
#(
  parameter int unsigned F      = 501,
  parameter int unsigned VPAR   = 11,
  parameter int unsigned MAX_L2 = (1 << BLKNUM_W) / (F * F),
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              req_i,
  input  logic [1:0]        op_i,        // 0 ALLOC, 1 FREE, 2 UPDATE
  input  ptr_t              ptr_i,       // FREE/UPDATE
  input  entry_t            entry_i,     // ALLOC/UPDATE (valid forced to 1)
  output logic              ack_o,
  output ptr_t              ptr_o,       // ALLOC result
  output logic              full_o,      // ALLOC failed: region full
  output logic              err_o,       // uncorrectable valid-bit block
  output logic              walked_o,    // ALLOC needed a tree walk
  // memory port to the ECC region
  output logic              mem_req_o,
  output logic              mem_we_o,
  output logic [ADDR_W-1:0] mem_addr_o,
  output logic [511:0]      mem_wdata_o,
  input  logic              mem_ready_i,
  input  logic              mem_rvalid_i,
  input  logic [511:0]      mem_rdata_i
);
  localparam int unsigned G3  = 1 + F;        // L3 group size
  localparam int unsigned G2  = 1 + F * G3;   // L2 group size
  localparam int unsigned IW  = $clog2(F + 1);
  localparam int unsigned VR  = VPAR - 1;

  typedef enum logic [1:0] {OP_ALLOC = 2'd0, OP_FREE = 2'd1, OP_UPDATE = 2'd2} op_e;
  typedef enum logic [2:0] {
    ST_L3_FIND, ST_L1_FIND, ST_L2_FIND, ST_ENTRY, ST_MARK3, ST_MARK2, ST_MARK1
  } step_e;
  typedef enum logic [2:0] {PH_IDLE, PH_RD, PH_RWAIT, PH_WR, PH_ACK} phase_e;

  phase_e ph;
  step_e  step;
  op_e    op;
  logic   prop;         // the next level of the tree must change
  logic [IW-1:0] cur_j, cur_k;   // most recently used L3 block
  logic [IW-1:0] j, k, m;        // target of the current operation
  logic [SLOT_W-1:0] slot;
  entry_t entry_q;
  logic [511:0] wbuf;
  logic   walked;

  function automatic logic [ADDR_W-1:0] addr_l2(input logic [IW-1:0] jj);
    return ADDR_W'(1 + int'(jj) * G2);
  endfunction
  function automatic logic [ADDR_W-1:0] addr_l3(input logic [IW-1:0] jj, input logic [IW-1:0] kk);
    return ADDR_W'(2 + int'(jj) * G2 + int'(kk) * G3);
  endfunction
  function automatic logic [ADDR_W-1:0] addr_e(input logic [IW-1:0] jj, input logic [IW-1:0] kk,
                                               input logic [IW-1:0] mm);
    return ADDR_W'(3 + int'(jj) * G2 + int'(kk) * G3 + int'(mm));
  endfunction

  function automatic logic [ADDR_W-1:0] step_addr(input step_e s);
    case (s)
      ST_L3_FIND, ST_MARK3: return addr_l3(j, k);
      ST_L1_FIND, ST_MARK1: return '0;
      ST_L2_FIND, ST_MARK2: return addr_l2(j);
      default:              return addr_e(j, k, m);
    endcase
  endfunction

  // ---- check and correct a valid-bit block as it arrives ----
  logic [F-1:0]    vbits;
  logic            v_single, v_double, v_zero;
  secded_dec #(.K(F), .R(VR), .EXT(1'b1)) u_vdec (
    .data_i(mem_rdata_i[F-1:0]), .check_i(mem_rdata_i[F +: VPAR]),
    .data_o(vbits), .zero_o(v_zero), .single_o(v_single), .double_o(v_double));

  logic [F-1:0]    vnew;
  logic [VPAR-1:0] vnew_chk;
  secded_enc #(.K(F), .R(VR), .EXT(1'b1)) u_venc (.data_i(vnew), .check_o(vnew_chk));

  // first zero bit; at level 1 only L2 groups below MAX_L2 count
  logic          z_found;
  logic [IW-1:0] z_idx;
  always_comb begin
    z_found = 1'b0;
    z_idx   = '0;
    for (int i = F - 1; i >= 0; i--) begin
      if (!vbits[i] && (step != ST_L1_FIND || i < int'(MAX_L2))) begin
        z_found = 1'b1;
        z_idx   = IW'(i);
      end
    end
  end

  // free slot in an ECC-entry block
  logic              s_found;
  logic [SLOT_W-1:0] s_idx;
  logic [EPB-1:0]    s_valid;
  always_comb begin
    s_found = 1'b0;
    s_idx   = '0;
    for (int s = 0; s < EPB; s++) s_valid[s] = mem_rdata_i[ENTRY_W*s + ENTRY_W - 1];
    for (int s = EPB - 1; s >= 0; s--) begin
      if (!s_valid[s]) begin
        s_found = 1'b1;
        s_idx   = SLOT_W'(s);
      end
    end
  end

  // bit that the MARK steps change
  logic [IW-1:0] mark_idx;
  always_comb begin
    case (step)
      ST_MARK3: mark_idx = m;
      ST_MARK2: mark_idx = k;
      default:  mark_idx = j;
    endcase
    vnew = vbits;
    vnew[mark_idx] = (op == OP_ALLOC);
  end

  logic [BLKNUM_W-1:0] blknum;
  assign blknum = BLKNUM_W'((int'(j) * F + int'(k)) * F + int'(m));

  assign mem_req_o   = (ph == PH_RD) || (ph == PH_WR);
  assign mem_we_o    = (ph == PH_WR);
  assign mem_addr_o  = step_addr(step);
  assign mem_wdata_o = wbuf;
  assign ack_o       = (ph == PH_ACK);
  assign walked_o    = walked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= PH_IDLE;
      step     <= ST_L3_FIND;
      op       <= OP_ALLOC;
      prop <= 1'b1;
      cur_j    <= '0;
      cur_k    <= '0;
      j        <= '0;
      k        <= '0;
      m        <= '0;
      slot     <= '0;
      entry_q  <= '0;
      wbuf     <= '0;
      walked   <= 1'b0;
      ptr_o    <= '0;
      full_o   <= 1'b0;
      err_o    <= 1'b0;
    end else begin
      unique case (ph)
        PH_IDLE: if (req_i) begin
          op      <= op_e'(op_i);
          entry_q <= entry_i;
          full_o  <= 1'b0;
          err_o   <= 1'b0;
          walked  <= 1'b0;
          ph      <= PH_RD;
          if (op_e'(op_i) == OP_ALLOC) begin
            j        <= cur_j;
            k        <= cur_k;
            step     <= ST_L3_FIND;
            prop <= 1'b1;
          end else begin
            // split the pointer into tree coordinates
            j        <= IW'(int'(ptr_i.blknum) / (F * F));
            k        <= IW'((int'(ptr_i.blknum) / F) % F);
            m        <= IW'(int'(ptr_i.blknum) % F);
            slot     <= ptr_i.slot;
            step     <= ST_ENTRY;
            prop <= 1'b0;
          end
        end
        PH_RD: if (mem_ready_i) ph <= PH_RWAIT;
        PH_RWAIT: if (mem_rvalid_i) begin
          unique case (step)
            ST_L3_FIND: begin
              if (v_double) begin err_o <= 1'b1; ph <= PH_ACK; end
              else if (z_found) begin m <= z_idx; step <= ST_ENTRY; ph <= PH_RD; end
              else begin step <= ST_L1_FIND; walked <= 1'b1; ph <= PH_RD; end
            end
            ST_L1_FIND: begin
              if (v_double) begin err_o <= 1'b1; ph <= PH_ACK; end
              else if (z_found) begin j <= z_idx; step <= ST_L2_FIND; ph <= PH_RD; end
              else begin full_o <= 1'b1; ph <= PH_ACK; end
            end
            ST_L2_FIND: begin
              if (v_double || !z_found) begin err_o <= 1'b1; ph <= PH_ACK; end
              else begin
                k     <= z_idx;
                cur_j <= j;
                cur_k <= z_idx;
                step  <= ST_L3_FIND;
                ph    <= PH_RD;
              end
            end
            ST_ENTRY: begin
              wbuf <= mem_rdata_i;
              ph   <= PH_WR;
              if (op == OP_ALLOC) begin
                if (!s_found) begin
                  // the L3 bit was stale; mark the block full and retry
                  err_o <= 1'b1;
                  ph    <= PH_ACK;
                end else begin
                  slot <= s_idx;
                  wbuf[ENTRY_W*s_idx +: ENTRY_W] <= {1'b1, entry_q.data, entry_q.ecc};
                  ptr_o <= '{blknum: blknum, slot: s_idx};
                end
              end else if (op == OP_FREE) begin
                wbuf[ENTRY_W*slot + ENTRY_W - 1] <= 1'b0;
              end else begin
                wbuf[ENTRY_W*slot +: ENTRY_W] <= {1'b1, entry_q.data, entry_q.ecc};
              end
              // remember whether the tree must change after the write
              if (op == OP_ALLOC) prop <= (s_valid | (EPB'(1) << s_idx)) == '1;
              else if (op == OP_FREE) prop <= (s_valid == '1);
              else prop <= 1'b0;
            end
            default: begin // ST_MARK3/2/1: read-modify-write a valid-bit block
              if (v_double) begin err_o <= 1'b1; ph <= PH_ACK; end
              else begin
                wbuf <= '0;
                wbuf[F-1:0] <= vnew;
                wbuf[F +: VPAR] <= vnew_chk;
                // propagate upward: ALLOC when the block is now all set,
                // FREE when it was all set
                prop <= (op == OP_ALLOC) ? (vnew == '1) : (vbits == '1);
                ph <= PH_WR;
              end
            end
          endcase
        end
        PH_WR: if (mem_ready_i) begin
          ph <= PH_ACK;
          // prop now says whether the next level up must change
          if (prop && op != OP_UPDATE) begin
            unique case (step)
              ST_ENTRY: begin step <= ST_MARK3; ph <= PH_RD; end
              ST_MARK3: begin step <= ST_MARK2; ph <= PH_RD; end
              ST_MARK2: begin step <= ST_MARK1; ph <= PH_RD; end
              default:  ph <= PH_ACK;
            endcase
          end
        end
        PH_ACK: ph <= PH_IDLE;
        default: ph <= PH_IDLE;
      endcase
    end
  end
endmodule
