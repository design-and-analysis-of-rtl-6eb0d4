// vf_cache: cache memory between a hardware accelerator and the system bus.
//
// The accelerator sees a plain ld/st slave port and does not know a cache is
// there. Inside, loads and stores use separate caches: a set-associative read
// cache (default 8 KB, 64-byte blocks, 2 ways, LRU) and a small write cache
// (default 8 entries of 8 bytes). In streaming use the accelerator reads one
// FIFO buffer and writes another, so keeping the two streams apart removes the
// conflict misses they would cause in a shared cache. A main controller
// (cache_main_ctrl) sequences misses, evictions and the cache control
// interface, which writes back and/or invalidates an address range so that
// software-managed coherence can be kept at token boundaries. Sizes follow the
// published first cache organisation; the internal organisation, protocol and
// timing are this design's (see the sub-module headers).
//
// Ports: accelerator ld/st (vf_*), cache control (cc_*), and one memory ld/st
// master port per cache (rc_mem_*, wc_mem_*).
module vf_cache
  import vfc_pkg::*;
#(
  parameter int unsigned NUM_SETS       = 64,
  parameter int unsigned NUM_WAYS       = 2,
  parameter int unsigned BLOCK_BYTES    = 64,
  parameter int unsigned WC_ENTRIES     = 8,
  parameter int unsigned WC_BLOCK_BYTES = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ldst_req_t     vf_req,
  output logic          vf_busy,
  output logic [1:0]    vf_ack,
  output logic [DW-1:0] vf_rdata,
  input  logic          cc_valid,
  input  cc_op_e        cc_op,
  input  logic [AW-1:0] cc_addr,
  input  logic [AW-1:0] cc_len,
  output logic          cc_busy,
  output logic          cc_done,
  output ldst_req_t     rc_mem_req,
  input  mem_rsp_t      rc_mem_rsp,
  output ldst_req_t     wc_mem_req,
  input  mem_rsp_t      wc_mem_rsp
);

  localparam int unsigned WW = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1;

  logic [AW-1:0] rc_lk_addr, rc_rep_addr, rc_inv_lo, rc_inv_hi;
  logic          rc_lk_hit, rc_lk_touch, rc_upd_valid, rc_rep_valid, rc_inv_valid;
  logic          rc_busy, rc_done;
  logic [WW-1:0] rc_lk_way;
  logic [DW-1:0] rc_lk_rdata;
  logic          wc_st_valid, wc_st_ok, wc_probe_hit, wc_cmd_valid, wc_busy, wc_done;
  logic [AW-1:0] wc_st_addr, wc_probe_lo, wc_probe_hi, wc_cmd_lo, wc_cmd_hi;
  logic [DW-1:0] wc_st_wdata;
  logic [BW-1:0] wc_st_be;
  wc_cmd_e       wc_cmd;

  cache_main_ctrl #(.BLOCK_BYTES(BLOCK_BYTES)) u_ctrl (
    .clk, .rst_n,
    .vf_req, .vf_busy, .vf_ack, .vf_rdata,
    .cc_valid, .cc_op, .cc_addr, .cc_len, .cc_busy, .cc_done,
    .rc_lk_addr, .rc_lk_hit, .rc_lk_rdata, .rc_lk_touch, .rc_upd_valid,
    .rc_rep_valid, .rc_rep_addr, .rc_inv_valid, .rc_inv_lo, .rc_inv_hi, .rc_done,
    .wc_st_valid, .wc_st_addr, .wc_st_wdata, .wc_st_be, .wc_st_ok,
    .wc_probe_lo, .wc_probe_hi, .wc_probe_hit,
    .wc_cmd_valid, .wc_cmd, .wc_cmd_lo, .wc_cmd_hi, .wc_done
  );

  read_cache #(.NUM_SETS(NUM_SETS), .NUM_WAYS(NUM_WAYS), .BLOCK_BYTES(BLOCK_BYTES)) u_rc (
    .clk, .rst_n,
    .lk_addr (rc_lk_addr), .lk_hit(rc_lk_hit), .lk_way(rc_lk_way), .lk_rdata(rc_lk_rdata),
    .lk_touch(rc_lk_touch),
    .upd_valid(rc_upd_valid), .upd_addr(wc_st_addr), .upd_wdata(wc_st_wdata), .upd_be(wc_st_be),
    .rep_valid(rc_rep_valid), .rep_addr(rc_rep_addr),
    .inv_valid(rc_inv_valid), .inv_lo(rc_inv_lo), .inv_hi(rc_inv_hi),
    .busy(rc_busy), .done(rc_done),
    .mem_req(rc_mem_req), .mem_rsp(rc_mem_rsp)
  );

  write_cache #(.WC_ENTRIES(WC_ENTRIES), .WC_BLOCK_BYTES(WC_BLOCK_BYTES)) u_wc (
    .clk, .rst_n,
    .st_valid(wc_st_valid), .st_addr(wc_st_addr), .st_wdata(wc_st_wdata), .st_be(wc_st_be),
    .st_ok(wc_st_ok),
    .probe_lo(wc_probe_lo), .probe_hi(wc_probe_hi), .probe_hit(wc_probe_hit),
    .cmd_valid(wc_cmd_valid), .cmd(wc_cmd), .cmd_lo(wc_cmd_lo), .cmd_hi(wc_cmd_hi),
    .busy(wc_busy), .done(wc_done),
    .mem_req(wc_mem_req), .mem_rsp(wc_mem_rsp)
  );

  // the controller only issues a sub-cache command while that cache is idle
  assert property (@(posedge clk) disable iff (!rst_n) !(rc_busy && (rc_rep_valid || rc_inv_valid)));
  assert property (@(posedge clk) disable iff (!rst_n) !(wc_busy && wc_cmd_valid));

endmodule
