// cache_main_ctrl: main controller of the accelerator cache memory.
//
// It takes the accelerator's ld/st requests and the cache control commands and
// steers them to the read cache and the write cache:
//  - Load, read-cache hit: data returns with vf_ack[1] in the next cycle, so a
//    run of hits is served at one word per cycle.
//  - Load, miss: if the write cache holds bytes of the missing 64-byte block,
//    they are written back first (this keeps the fetched block up to date);
//    then the read cache is told to replace the block, and when it drops busy
//    the load is looked up again ("reload") and answered. This
//    miss/replace/reload order is the published one; the write-back step is
//    this design's way of keeping the two caches consistent.
//  - Store: merged into the write cache and, when the block is also in the
//    read cache, written there as well; vf_ack[0] follows in the next cycle.
//    When the write cache is full and the block is not held, the oldest entry
//    is evicted first.
//  - Cache control: CC_FLUSH writes back and frees write-cache entries in the
//    range and then invalidates read-cache lines in it; CC_INVALIDATE only
//    drops both. cc_done pulses when finished. The range is
//    [cc_addr, cc_addr + cc_len - 1]; cc_len = 0 completes at once.
// vf_busy is high whenever the controller is not idle; a request or command
// is taken in a cycle where it is low (a ld/st request has priority).
module cache_main_ctrl
  import vfc_pkg::*;
#(
  parameter int unsigned BLOCK_BYTES = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  // accelerator ld/st
  input  ldst_req_t     vf_req,
  output logic          vf_busy,
  output logic [1:0]    vf_ack,
  output logic [DW-1:0] vf_rdata,
  // cache control interface
  input  logic          cc_valid,
  input  cc_op_e        cc_op,
  input  logic [AW-1:0] cc_addr,
  input  logic [AW-1:0] cc_len,
  output logic          cc_busy,
  output logic          cc_done,
  // read cache
  output logic [AW-1:0] rc_lk_addr,
  input  logic          rc_lk_hit,
  input  logic [DW-1:0] rc_lk_rdata,
  output logic          rc_lk_touch,
  output logic          rc_upd_valid,
  output logic          rc_rep_valid,
  output logic [AW-1:0] rc_rep_addr,
  output logic          rc_inv_valid,
  output logic [AW-1:0] rc_inv_lo,
  output logic [AW-1:0] rc_inv_hi,
  input  logic          rc_done,
  // write cache
  output logic          wc_st_valid,
  output logic [AW-1:0] wc_st_addr,
  output logic [DW-1:0] wc_st_wdata,
  output logic [BW-1:0] wc_st_be,
  input  logic          wc_st_ok,
  output logic [AW-1:0] wc_probe_lo,
  output logic [AW-1:0] wc_probe_hi,
  input  logic          wc_probe_hit,
  output logic          wc_cmd_valid,
  output wc_cmd_e       wc_cmd,
  output logic [AW-1:0] wc_cmd_lo,
  output logic [AW-1:0] wc_cmd_hi,
  input  logic          wc_done
);

  localparam int unsigned OFFW = $clog2(BLOCK_BYTES);

  typedef enum logic [3:0] {
    S_IDLE, S_MISS, S_MISS_WB, S_REPLACE, S_RELOAD,
    S_EVICT, S_STORE, S_CC_WC, S_CC_RC
  } state_e;
  state_e state;

  ldst_req_t     req_q;
  cc_op_e        op_q;
  logic [AW-1:0] lo_q, hi_q;
  logic          started_q;   // sub-block command issued, waiting for done

  logic [AW-1:0] blk_lo, blk_hi;
  assign blk_lo = {req_q.addr[AW-1:OFFW], OFFW'(0)};
  assign blk_hi = {req_q.addr[AW-1:OFFW], {OFFW{1'b1}}};

  // combinational steering
  always_comb begin
    rc_lk_addr   = (state == S_IDLE) ? vf_req.addr : req_q.addr;
    rc_lk_touch  = 1'b0;
    rc_upd_valid = 1'b0;
    rc_rep_valid = state == S_REPLACE && !started_q;
    rc_rep_addr  = req_q.addr;
    rc_inv_valid = state == S_CC_RC && !started_q;
    rc_inv_lo    = lo_q;
    rc_inv_hi    = hi_q;
    wc_st_valid  = 1'b0;
    wc_st_addr   = (state == S_IDLE) ? vf_req.addr  : req_q.addr;
    wc_st_wdata  = (state == S_IDLE) ? vf_req.wdata : req_q.wdata;
    wc_st_be     = (state == S_IDLE) ? vf_req.be    : req_q.be;
    wc_probe_lo  = blk_lo;
    wc_probe_hi  = blk_hi;
    wc_cmd_valid = 1'b0;
    wc_cmd       = WC_EVICT_ONE;
    wc_cmd_lo    = lo_q;
    wc_cmd_hi    = hi_q;
    unique case (state)
      S_IDLE: begin
        if (vf_req.valid && !vf_req.we && rc_lk_hit) rc_lk_touch = 1'b1;
        if (vf_req.valid && vf_req.we && wc_st_ok) begin
          wc_st_valid  = 1'b1;
          rc_upd_valid = 1'b1;
        end
      end
      S_MISS_WB: begin
        wc_cmd_valid = !started_q;
        wc_cmd       = WC_WB_RANGE;
        wc_cmd_lo    = blk_lo;
        wc_cmd_hi    = blk_hi;
      end
      S_RELOAD: rc_lk_touch = rc_lk_hit;
      S_EVICT: begin
        wc_cmd_valid = !started_q;
        wc_cmd       = WC_EVICT_ONE;
      end
      S_STORE: begin
        wc_st_valid  = wc_st_ok;
        rc_upd_valid = wc_st_ok;
      end
      S_CC_WC: begin
        wc_cmd_valid = !started_q;
        wc_cmd       = (op_q == CC_FLUSH) ? WC_WB_RANGE : WC_DROP;
      end
      default: ;
    endcase
  end

  assign vf_busy = state != S_IDLE;
  assign cc_busy = state == S_CC_WC || state == S_CC_RC;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      req_q     <= '0;
      op_q      <= CC_FLUSH;
      lo_q      <= '0;
      hi_q      <= '0;
      started_q <= 1'b0;
      vf_ack    <= '0;
      vf_rdata  <= '0;
      cc_done   <= 1'b0;
    end else begin
      vf_ack  <= '0;
      cc_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          started_q <= 1'b0;
          if (vf_req.valid) begin
            req_q <= vf_req;
            if (!vf_req.we) begin
              if (rc_lk_hit) begin
                vf_ack[1] <= 1'b1;
                vf_rdata  <= rc_lk_rdata;
              end else begin
                state <= S_MISS;
              end
            end else begin
              if (wc_st_ok) vf_ack[0] <= 1'b1;
              else          state     <= S_EVICT;
            end
          end else if (cc_valid) begin
            op_q <= cc_op;
            lo_q <= cc_addr;
            hi_q <= cc_addr + cc_len - 1'b1;
            if (cc_len == '0) cc_done <= 1'b1;
            else              state   <= S_CC_WC;
          end
        end
        S_MISS: state <= wc_probe_hit ? S_MISS_WB : S_REPLACE;
        S_MISS_WB: begin
          started_q <= 1'b1;
          if (started_q && wc_done) begin
            started_q <= 1'b0;
            state     <= S_REPLACE;
          end
        end
        S_REPLACE: begin
          started_q <= 1'b1;
          if (started_q && rc_done) begin
            started_q <= 1'b0;
            state     <= S_RELOAD;
          end
        end
        S_RELOAD: begin
          // the block was just fetched, so the reload hits
          vf_ack[1] <= 1'b1;
          vf_rdata  <= rc_lk_rdata;
          state     <= S_IDLE;
        end
        S_EVICT: begin
          started_q <= 1'b1;
          if (started_q && wc_done) begin
            started_q <= 1'b0;
            state     <= S_STORE;
          end
        end
        S_STORE: begin
          if (wc_st_ok) begin
            vf_ack[0] <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_CC_WC: begin
          started_q <= 1'b1;
          if (started_q && wc_done) begin
            started_q <= 1'b0;
            state     <= S_CC_RC;
          end
        end
        S_CC_RC: begin
          started_q <= 1'b1;
          if (started_q && rc_done) begin
            started_q <= 1'b0;
            cc_done   <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The controller never asks a sub-cache for two things at once.
  assert property (@(posedge clk) disable iff (!rst_n) !(wc_cmd_valid && wc_st_valid));
  assert property (@(posedge clk) disable iff (!rst_n) !(rc_rep_valid && rc_inv_valid));

endmodule
