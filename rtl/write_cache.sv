// write_cache: small write cache of the accelerator cache memory.
//
// Size follows the published organisation: 8 entries of 8-byte blocks. How the
// entries are organised is this design's choice: fully associative, with a
// byte-valid mask per entry so that only bytes the accelerator wrote are ever
// written back, and round-robin choice of the entry to evict.
//
// Interface and timing:
//  - store: st_ok (combinational) says a store to st_addr can be taken now,
//    either because its block is already held (bytes are merged) or because
//    an entry is free. A store is taken at the edge where st_valid && st_ok &&
//    !busy.
//  - probe: probe_hit is high when any held block lies between the blocks of
//    probe_lo and probe_hi (inclusive).
//  - commands (cmd_valid with cmd while not busy): WC_EVICT_ONE writes back and
//    frees the round-robin entry; WC_WB_RANGE writes back and frees every entry
//    in [cmd_lo, cmd_hi]; WC_DROP frees them without write back. Entries are
//    visited one per cycle; each word with written bytes costs one memory
//    write on the ld/st port (be = its byte mask). busy is high throughout and
//    done pulses at the end.
module write_cache
  import vfc_pkg::*;
#(
  parameter int unsigned WC_ENTRIES     = 8,
  parameter int unsigned WC_BLOCK_BYTES = 8,
  localparam int unsigned WPE  = WC_BLOCK_BYTES / BW,
  localparam int unsigned OFFW = $clog2(WC_BLOCK_BYTES),
  localparam int unsigned EW   = (WC_ENTRIES > 1) ? $clog2(WC_ENTRIES) : 1,
  localparam int unsigned WOW  = (WPE > 1) ? $clog2(WPE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // stores
  input  logic          st_valid,
  input  logic [AW-1:0] st_addr,
  input  logic [DW-1:0] st_wdata,
  input  logic [BW-1:0] st_be,
  output logic          st_ok,
  // probe
  input  logic [AW-1:0] probe_lo,
  input  logic [AW-1:0] probe_hi,
  output logic          probe_hit,
  // commands
  input  logic          cmd_valid,
  input  wc_cmd_e       cmd,
  input  logic [AW-1:0] cmd_lo,
  input  logic [AW-1:0] cmd_hi,
  output logic          busy,
  output logic          done,
  // memory ld/st port
  output ldst_req_t     mem_req,
  input  mem_rsp_t      mem_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_WB} state_e;
  state_e state;

  logic [WC_ENTRIES-1:0]                     vld_q;
  logic [WC_ENTRIES-1:0][AW-OFFW-1:0]        blk_q;
  logic [WC_ENTRIES-1:0][WPE-1:0][DW-1:0]    dat_q;
  logic [WC_ENTRIES-1:0][WPE-1:0][BW-1:0]    msk_q;
  logic [EW-1:0]   rr_q;      // next entry to evict
  logic [EW-1:0]   ev_q;      // entry chosen by the running EVICT_ONE
  logic [EW:0]     ent_q;     // entry being visited
  logic [WOW:0]    word_q;    // word being written back
  wc_cmd_e         cmd_q;
  logic [AW-OFFW-1:0] lo_q, hi_q;

  function automatic logic [WOW-1:0] woff_of(logic [AW-1:0] a);
    return (WPE > 1) ? a[$clog2(BW) +: WOW] : '0;
  endfunction

  // store lookup
  logic          s_hit, s_free;
  logic [EW-1:0] s_hit_e, s_free_e;
  always_comb begin
    s_hit = 1'b0; s_hit_e = '0; s_free = 1'b0; s_free_e = '0;
    for (int e = WC_ENTRIES - 1; e >= 0; e--) begin
      if (vld_q[e] && blk_q[e] == st_addr[AW-1:OFFW]) begin s_hit = 1'b1; s_hit_e = EW'(e); end
      if (!vld_q[e]) begin s_free = 1'b1; s_free_e = EW'(e); end
    end
  end
  assign st_ok = s_hit || s_free;

  always_comb begin
    probe_hit = 1'b0;
    for (int e = 0; e < WC_ENTRIES; e++)
      if (vld_q[e] && blk_q[e] >= probe_lo[AW-1:OFFW] && blk_q[e] <= probe_hi[AW-1:OFFW])
        probe_hit = 1'b1;
  end

  // engine
  logic [EW-1:0] cur;
  logic          cur_match;
  assign cur = EW'(ent_q);
  always_comb begin
    if (cmd_q == WC_EVICT_ONE) cur_match = vld_q[cur] && cur == ev_q;
    else cur_match = vld_q[cur] && blk_q[cur] >= lo_q && blk_q[cur] <= hi_q;
  end

  logic [WOW-1:0] wsel;
  assign wsel = WOW'(word_q);

  always_comb begin
    mem_req       = '0;
    mem_req.valid = state == S_WB && msk_q[cur][wsel] != '0;
    mem_req.we    = 1'b1;
    mem_req.addr  = {blk_q[cur], OFFW'(0)} + AW'(wsel) * AW'(BW);
    mem_req.wdata = dat_q[cur][wsel];
    mem_req.be    = msk_q[cur][wsel];
  end

  assign busy = state != S_IDLE;

  logic word_done;
  assign word_done = state == S_WB && (msk_q[cur][wsel] == '0 || mem_rsp.ack);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      vld_q  <= '0;
      rr_q   <= '0;
      ev_q   <= '0;
      ent_q  <= '0;
      word_q <= '0;
      done   <= 1'b0;
      cmd_q  <= WC_EVICT_ONE;
      lo_q   <= '0;
      hi_q   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            state <= S_SCAN;
            cmd_q <= cmd;
            ent_q <= '0;
            ev_q  <= rr_q;
            if (cmd == WC_EVICT_ONE) rr_q <= rr_q + 1'b1;
            lo_q  <= cmd_lo[AW-1:OFFW];
            hi_q  <= cmd_hi[AW-1:OFFW];
          end else if (st_valid && st_ok) begin
            if (s_hit) begin
              for (int b = 0; b < BW; b++)
                if (st_be[b]) begin
                  dat_q[s_hit_e][woff_of(st_addr)][8*b +: 8] <= st_wdata[8*b +: 8];
                  msk_q[s_hit_e][woff_of(st_addr)][b] <= 1'b1;
                end
            end else begin
              vld_q[s_free_e] <= 1'b1;
              blk_q[s_free_e] <= st_addr[AW-1:OFFW];
              msk_q[s_free_e] <= '0;
              for (int b = 0; b < BW; b++) begin
                dat_q[s_free_e][woff_of(st_addr)][8*b +: 8] <= st_wdata[8*b +: 8];
                msk_q[s_free_e][woff_of(st_addr)][b] <= st_be[b];
              end
            end
          end
        end
        S_SCAN: begin
          if (cur_match && cmd_q != WC_DROP) begin
            state  <= S_WB;
            word_q <= '0;
          end else begin
            if (cur_match) vld_q[cur] <= 1'b0;
            ent_q <= ent_q + 1'b1;
            if (ent_q == (EW+1)'(WC_ENTRIES - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_WB: begin
          if (word_done) begin
            word_q <= word_q + 1'b1;
            if (word_q == (WOW+1)'(WPE - 1)) begin
              vld_q[cur] <= 1'b0;
              ent_q <= ent_q + 1'b1;
              if (ent_q == (EW+1)'(WC_ENTRIES - 1)) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                state <= S_SCAN;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
