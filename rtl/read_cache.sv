// read_cache: set-associative read cache of the accelerator cache memory.
//
// Geometry follows the published first cache organisation: 8 KB in total,
// 64-byte blocks, 2-way set associative (NUM_SETS = 8192/64/2 = 64); the second
// organisation is NUM_WAYS = 4, NUM_SETS = 32. An address splits into
// tag | index | block offset. Replacement is LRU (see lru_update).
//
// Interface and timing (this design's choices):
//  - lookup: lk_addr is compared combinationally against the tags of its set;
//    lk_hit, lk_way and lk_rdata are valid in the same cycle. lk_touch marks a
//    hit as used (LRU update at the next edge).
//  - update: a store on the accelerator side is also written (byte enables)
//    into the read cache when its block is present, which keeps this cache
//    consistent with the write cache.
//  - replace: rep_valid starts the fetch of the block of rep_addr into the LRU
//    victim way. The block is read one word at a time over the memory ld/st
//    port; busy is high until the block is in and done pulses once.
//  - invalidate: inv_valid starts a scan over all lines; each line whose block
//    lies between the blocks of inv_lo and inv_hi (inclusive) is invalidated,
//    one line per cycle; busy is high during the scan and done pulses after.
// Reset clears the valid bits and LRU counters; tags and data need no reset.
module read_cache
  import vfc_pkg::*;
#(
  parameter int unsigned NUM_SETS    = 64,
  parameter int unsigned NUM_WAYS    = 2,
  parameter int unsigned BLOCK_BYTES = 64,
  localparam int unsigned WPB  = BLOCK_BYTES / BW,
  localparam int unsigned OFFW = $clog2(BLOCK_BYTES),
  localparam int unsigned IDXW = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  localparam int unsigned TAGW = AW - OFFW - IDXW,
  localparam int unsigned WW   = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1,
  localparam int unsigned CW   = WW,
  localparam int unsigned WOW  = (WPB > 1) ? $clog2(WPB) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup
  input  logic [AW-1:0] lk_addr,
  output logic          lk_hit,
  output logic [WW-1:0] lk_way,
  output logic [DW-1:0] lk_rdata,
  input  logic          lk_touch,
  // write update from stores
  input  logic          upd_valid,
  input  logic [AW-1:0] upd_addr,
  input  logic [DW-1:0] upd_wdata,
  input  logic [BW-1:0] upd_be,
  // replace (block fill)
  input  logic          rep_valid,
  input  logic [AW-1:0] rep_addr,
  // range invalidation
  input  logic          inv_valid,
  input  logic [AW-1:0] inv_lo,
  input  logic [AW-1:0] inv_hi,
  output logic          busy,
  output logic          done,
  // memory ld/st port
  output ldst_req_t     mem_req,
  input  mem_rsp_t      mem_rsp
);

  localparam int unsigned NLINES = NUM_SETS * NUM_WAYS;
  localparam int unsigned LW = $clog2(NLINES + 1);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_INV} state_e;
  state_e state;

  logic [TAGW-1:0] tag_q [NUM_SETS][NUM_WAYS];
  logic [NUM_SETS-1:0][NUM_WAYS-1:0]         vld_q;
  logic [NUM_SETS-1:0][NUM_WAYS-1:0][CW-1:0] lru_q;
  logic [DW-1:0] data_q [NLINES * WPB];

  function automatic logic [IDXW-1:0] idx_of(logic [AW-1:0] a);
    return (NUM_SETS > 1) ? a[OFFW +: IDXW] : '0;
  endfunction
  function automatic logic [TAGW-1:0] tag_of(logic [AW-1:0] a);
    return a[AW-1 -: TAGW];
  endfunction
  function automatic int unsigned word_index(logic [IDXW-1:0] s, logic [WW-1:0] w,
                                             logic [WOW-1:0] o);
    return (int'(s) * NUM_WAYS + int'(w)) * WPB + ((WPB > 1) ? int'(o) : 0);
  endfunction
  function automatic logic [WOW-1:0] woff_of(logic [AW-1:0] a);
    return (WPB > 1) ? a[$clog2(BW) +: WOW] : '0;
  endfunction

  // ---------------- lookup ----------------
  logic [IDXW-1:0] lk_set;
  assign lk_set = idx_of(lk_addr);
  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < NUM_WAYS; w++)
      if (vld_q[lk_set][w] && tag_q[lk_set][w] == tag_of(lk_addr)) begin
        lk_hit = 1'b1;
        lk_way = WW'(w);
      end
    lk_rdata = data_q[word_index(lk_set, lk_way, woff_of(lk_addr))];
  end

  logic [IDXW-1:0] up_set;
  logic            up_hit;
  logic [WW-1:0]   up_way;
  assign up_set = idx_of(upd_addr);
  always_comb begin
    up_hit = 1'b0;
    up_way = '0;
    for (int w = 0; w < NUM_WAYS; w++)
      if (vld_q[up_set][w] && tag_q[up_set][w] == tag_of(upd_addr)) begin
        up_hit = 1'b1;
        up_way = WW'(w);
      end
  end

  // ---------------- fill / invalidate engines ----------------
  logic [AW-1:0]   blk_addr_q;   // block-aligned address being filled
  logic [WW-1:0]   fill_way_q;
  logic [WOW:0]    fill_cnt_q;
  logic [LW-1:0]   scan_q;
  logic [AW-OFFW-1:0] lo_blk_q, hi_blk_q;

  logic [IDXW-1:0] scan_set;
  logic [WW-1:0]   scan_way;
  logic [AW-OFFW-1:0] scan_blk;
  logic            scan_match;
  assign scan_set = (NUM_SETS > 1) ? IDXW'(scan_q / LW'(NUM_WAYS)) : '0;
  assign scan_way = (NUM_WAYS > 1) ? WW'(scan_q % LW'(NUM_WAYS)) : '0;
  always_comb begin
    scan_blk = '0;
    scan_blk[AW-OFFW-1 -: TAGW] = tag_q[scan_set][scan_way];
    if (NUM_SETS > 1) scan_blk[IDXW-1:0] = scan_set;
    scan_match = vld_q[scan_set][scan_way] && scan_blk >= lo_blk_q && scan_blk <= hi_blk_q;
  end

  // one shared LRU next-state unit
  logic [IDXW-1:0]                   l_set;
  lru_op_e                           l_op;
  logic [WW-1:0]                     l_way;
  logic [NUM_WAYS-1:0][CW-1:0]       l_next;
  logic [WW-1:0]                     l_victim;
  logic                              l_full;
  logic                              fill_last;
  assign fill_last = state == S_FILL && mem_rsp.ack && fill_cnt_q == (WOW+1)'(WPB - 1);

  always_comb begin
    l_set = lk_set;
    l_op  = LRU_NONE;
    l_way = lk_way;
    unique case (state)
      S_IDLE: begin
        if (rep_valid) begin
          l_set = idx_of(rep_addr);
        end else if (lk_touch && lk_hit) begin
          l_op = LRU_HIT;
        end
      end
      S_FILL: begin
        l_set = idx_of(blk_addr_q);
        l_way = fill_way_q;
        if (fill_last) l_op = LRU_FILL;
      end
      S_INV: begin
        l_set = scan_set;
        l_way = scan_way;
        if (scan_match) l_op = LRU_INVAL;
      end
      default: ;
    endcase
  end

  lru_update #(.NUM_WAYS(NUM_WAYS)) u_lru (
    .valid   (vld_q[l_set]),
    .cnt     (lru_q[l_set]),
    .op      (l_op),
    .way     (l_way),
    .cnt_next(l_next),
    .victim  (l_victim),
    .set_full(l_full)
  );

  always_comb begin
    mem_req       = '0;
    mem_req.valid = state == S_FILL;
    mem_req.we    = 1'b0;
    mem_req.addr  = blk_addr_q + AW'(fill_cnt_q[WOW-1:0]) * AW'(BW);
    mem_req.be    = '1;
  end

  assign busy = state != S_IDLE;

  // control state, valid bits and LRU
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      vld_q      <= '0;
      lru_q      <= '0;
      done       <= 1'b0;
      fill_cnt_q <= '0;
      scan_q     <= '0;
      blk_addr_q <= '0;
      fill_way_q <= '0;
      lo_blk_q   <= '0;
      hi_blk_q   <= '0;
    end else begin
      done <= 1'b0;
      if (l_op != LRU_NONE) lru_q[l_set] <= l_next;
      unique case (state)
        S_IDLE: begin
          if (rep_valid) begin
            state      <= S_FILL;
            blk_addr_q <= {rep_addr[AW-1:OFFW], OFFW'(0)};
            fill_way_q <= l_victim;
            fill_cnt_q <= '0;
            vld_q[idx_of(rep_addr)][l_victim] <= 1'b0;
          end else if (inv_valid) begin
            state    <= S_INV;
            scan_q   <= '0;
            lo_blk_q <= inv_lo[AW-1:OFFW];
            hi_blk_q <= inv_hi[AW-1:OFFW];
          end
        end
        S_FILL: begin
          if (mem_rsp.ack) begin
            fill_cnt_q <= fill_cnt_q + 1'b1;
            if (fill_last) begin
              vld_q[idx_of(blk_addr_q)][fill_way_q] <= 1'b1;
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_INV: begin
          if (scan_match) vld_q[scan_set][scan_way] <= 1'b0;
          scan_q <= scan_q + 1'b1;
          if (scan_q == LW'(NLINES - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // tag and data arrays (no reset)
  always_ff @(posedge clk) begin
    if (state == S_FILL && mem_rsp.ack) begin
      data_q[word_index(idx_of(blk_addr_q), fill_way_q, fill_cnt_q[WOW-1:0])] <= mem_rsp.rdata;
      if (fill_last) tag_q[idx_of(blk_addr_q)][fill_way_q] <= tag_of(blk_addr_q);
    end else if (state == S_IDLE && upd_valid && up_hit) begin
      for (int b = 0; b < BW; b++)
        if (upd_be[b])
          data_q[word_index(up_set, up_way, woff_of(upd_addr))][8*b +: 8] <= upd_wdata[8*b +: 8];
    end
  end

endmodule
