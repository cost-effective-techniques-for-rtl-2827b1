// sbd_l1_cache: write-through L1 cache with subblock disabling.
//
// Each 64-byte line is split into 8 subblocks; a fault map holds one
// disable bit per subblock of every physical line, loaded after test for
// the current supply voltage (fm_* port). A read whose tag matches but
// whose subblock is disabled is a "false hit": it must be served elsewhere
// (store queue or MSHR patch, else L2). The line is then made most
// recently used, so that the refill from L2 goes to another way (the
// replacement policy picks the victim) and the old copy is dropped, which
// moves the line onto a physical line with a different fault pattern.
// Stores are write-through: they update the L1 copy only where its
// subblock is enabled. Sets are indexed by (line address XOR remap_i) and
// flush_i invalidates everything (see sbd_remap).
//
// Timing: reads are answered in the same cycle (combinational tag/data
// look-up, state updated at the clock edge); the document's 3-cycle L1
// latency is not modelled here. fill_way_o/fill_fault_o give, before a
// fill, the way it will land in and that way's fault pattern, so the MSHR
// can decide whether to keep the line as a patch and which segments to copy
// into the store queue. The line is the tag (whole line address).
// Subblock disabling, false hits and relocation on refill follow the
// document's description of the baseline it builds on; true LRU, the
// combinational read and the port structure are this design's choices.
module sbd_l1_cache
  import ipatch_pkg::*;
#(
  parameter int unsigned SETS = 64,     // 32 KB / 8 ways / 64 B
  parameter int unsigned WAYS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush_i,
  input  logic [$clog2(SETS)-1:0]   remap_i,
  // fault map load
  input  logic                      fm_we_i,
  input  logic [$clog2(SETS)-1:0]   fm_set_i,
  input  logic [$clog2(WAYS)-1:0]   fm_way_i,
  input  fault_t                    fm_bits_i,
  // read (load or fetch), one 8-byte subblock
  input  logic                      rd_i,
  input  waddr_t                    rd_addr_i,
  output logic                      hit_o,
  output logic                      false_hit_o,
  output word_t                     rd_data_o,
  output fault_t                    rd_fault_o,     // fault pattern of the matching line
  // write-through store
  input  logic                      wr_i,
  input  waddr_t                    wr_addr_i,
  input  word_t                     wr_data_i,
  // line fill from the MSHRs
  input  logic                      fill_i,
  input  laddr_t                    fill_laddr_i,
  input  line_t                     fill_data_i,
  output logic [$clog2(WAYS)-1:0]   fill_way_o,
  output fault_t                    fill_fault_o
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);

  logic   [WAYS-1:0]            valid [SETS];
  laddr_t                       tag   [SETS][WAYS];
  fault_t                       fmap  [SETS][WAYS];
  logic   [WAY_W-1:0]           age   [SETS][WAYS];
  line_t                        data  [SETS*WAYS];

  function automatic logic [SET_W-1:0] set_of(input laddr_t l);
    return l[SET_W-1:0] ^ remap_i;
  endfunction

  // ---- read ----
  logic [SET_W-1:0] rset;
  logic [WAY_W-1:0] rway;
  logic             rmatch;
  line_t            rline;
  always_comb begin
    rset   = set_of(line_of(rd_addr_i));
    rmatch = 1'b0;
    rway   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[rset][w] && tag[rset][w] == line_of(rd_addr_i)) begin
        rmatch = 1'b1;
        rway   = WAY_W'(w);
      end
    end
    rline       = data[int'(rset) * WAYS + int'(rway)];
    rd_data_o   = rline[64*sub_of(rd_addr_i) +: 64];
    rd_fault_o  = rmatch ? fmap[rset][rway] : '0;
    hit_o       = rd_i && rmatch && !fmap[rset][rway][sub_of(rd_addr_i)];
    false_hit_o = rd_i && rmatch &&  fmap[rset][rway][sub_of(rd_addr_i)];
  end

  // ---- write ----
  logic [SET_W-1:0] wset;
  logic [WAY_W-1:0] wway;
  logic             wmatch;
  always_comb begin
    wset   = set_of(line_of(wr_addr_i));
    wmatch = 1'b0;
    wway   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[wset][w] && tag[wset][w] == line_of(wr_addr_i)) begin
        wmatch = 1'b1;
        wway   = WAY_W'(w);
      end
    end
  end

  // ---- fill destination ----
  logic [SET_W-1:0] fset;
  logic             fmatch;
  logic [WAY_W-1:0] fold;
  always_comb begin
    logic found_inv;
    fset       = set_of(fill_laddr_i);
    fmatch     = 1'b0;
    fold       = '0;
    found_inv  = 1'b0;
    fill_way_o = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[fset][w] && tag[fset][w] == fill_laddr_i) begin
        fmatch = 1'b1;
        fold   = WAY_W'(w);
      end
    end
    // an invalid way, else the least recently used; never the old copy
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[fset][w] && !(fmatch && fold == WAY_W'(w))) begin
        found_inv  = 1'b1;
        fill_way_o = WAY_W'(w);
      end
    end
    if (!found_inv) begin
      for (int w = 0; w < WAYS; w++)
        if (age[fset][w] == WAY_W'(WAYS - 1) && !(fmatch && fold == WAY_W'(w))) fill_way_o = WAY_W'(w);
      // the old copy is MRU after its false hit, so it is not the oldest;
      // if it is (no false hit seen), take the second oldest
      if (fmatch && age[fset][fold] == WAY_W'(WAYS - 1)) begin
        for (int w = 0; w < WAYS; w++)
          if (age[fset][w] == WAY_W'(WAYS - 2)) fill_way_o = WAY_W'(w);
      end
    end
    fill_fault_o = fmap[fset][fill_way_o];
  end

  // ---- state ----
  task automatic touch(input logic [SET_W-1:0] s, input logic [WAY_W-1:0] w);
    for (int i = 0; i < WAYS; i++)
      if (age[s][i] < age[s][w]) age[s][i] <= age[s][i] + 1'b1;
    age[s][w] <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          fmap[s][w] <= '0;
          age[s][w]  <= WAY_W'(w);
          tag[s][w]  <= '0;
        end
      end
    end else begin
      if (fm_we_i) fmap[fm_set_i][fm_way_i] <= fm_bits_i;
      if (flush_i) begin
        for (int s = 0; s < SETS; s++) valid[s] <= '0;
      end else if (fill_i) begin
        if (fmatch) valid[fset][fold] <= 1'b0;
        valid[fset][fill_way_o] <= 1'b1;
        tag[fset][fill_way_o]   <= fill_laddr_i;
        touch(fset, fill_way_o);
      end else if (rd_i && rmatch) begin
        touch(rset, rway);
      end
    end
  end

  // data array: written by fills and by stores to enabled subblocks
  always_ff @(posedge clk) begin
    if (fill_i && !flush_i) begin
      data[int'(fset) * WAYS + int'(fill_way_o)] <= fill_data_i;
    end else if (wr_i && wmatch && !fmap[wset][wway][sub_of(wr_addr_i)]) begin
      data[int'(wset) * WAYS + int'(wway)][64*sub_of(wr_addr_i) +: 64] <= wr_data_i;
    end
  end
endmodule
