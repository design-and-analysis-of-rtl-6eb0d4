// wfifo_accel_system: the hardware side of a CPU-accelerator windowed-FIFO
// (WFIFO) system.
//
// A streaming accelerator exchanges data with software through WFIFO channels
// held in shared external memory. Synchronisation and data travel separately:
// the FIFO Interface Module (fim) updates the channel's control structs in the
// un-cached area (acquire / release of tokens), while token data is read and
// written through the accelerator cache (vf_cache), whose separate read and
// write caches keep the input and output streams from evicting each other.
// Coherence is kept at token boundaries: before a token is released the
// accelerator flushes (output) or invalidates (input) its range through the
// cache control interface. The accelerator here is wfifo_test_accel, which
// copies tokens from an input channel to an output channel.
//
// The CPU, the system bus and the multi-port memory controller are outside
// this RTL; the three memory ld/st master ports (read cache, write cache, FIM)
// are brought out where they would connect. Each port holds a request until
// its one-cycle ack and must complete its own requests in order, as a PLB port
// of the memory controller does.
module wfifo_accel_system
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
  input  logic          start,
  input  logic [AW-1:0] rport_addr,
  input  logic [AW-1:0] wport_addr,
  input  logic [15:0]   num_tokens,
  output logic          done,
  output ldst_req_t     rc_mem_req,
  input  mem_rsp_t      rc_mem_rsp,
  output ldst_req_t     wc_mem_req,
  input  mem_rsp_t      wc_mem_rsp,
  output ldst_req_t     fim_mem_req,
  input  mem_rsp_t      fim_mem_rsp
);

  logic          fim_port_valid, fim_rnw, fim_stop, fim_busy_ack;
  logic [AW-1:0] fim_port_addr, fim_token_addr, fim_token_length;
  fim_req_e      fim_request;
  ldst_req_t     vf_req;
  logic          vf_busy;
  logic [1:0]    vf_ack;
  logic [DW-1:0] vf_rdata;
  logic          cc_valid, cc_busy, cc_done;
  cc_op_e        cc_op;
  logic [AW-1:0] cc_addr, cc_len;

  wfifo_test_accel u_accel (
    .clk, .rst_n, .start, .rport_addr, .wport_addr, .num_tokens, .done,
    .fim_port_valid, .fim_port_addr, .fim_rnw, .fim_request, .fim_stop,
    .fim_busy_ack, .fim_token_addr, .fim_token_length,
    .vf_req, .vf_busy, .vf_ack, .vf_rdata,
    .cc_valid, .cc_op, .cc_addr, .cc_len, .cc_done
  );

  fim u_fim (
    .clk, .rst_n,
    .port_valid(fim_port_valid), .port_addr(fim_port_addr), .rnw(fim_rnw),
    .request(fim_request), .stop(fim_stop), .busy_ack(fim_busy_ack),
    .token_addr(fim_token_addr), .token_length(fim_token_length),
    .mem_req(fim_mem_req), .mem_rsp(fim_mem_rsp)
  );

  vf_cache #(
    .NUM_SETS(NUM_SETS), .NUM_WAYS(NUM_WAYS), .BLOCK_BYTES(BLOCK_BYTES),
    .WC_ENTRIES(WC_ENTRIES), .WC_BLOCK_BYTES(WC_BLOCK_BYTES)
  ) u_cache (
    .clk, .rst_n,
    .vf_req, .vf_busy, .vf_ack, .vf_rdata,
    .cc_valid, .cc_op, .cc_addr, .cc_len, .cc_busy, .cc_done,
    .rc_mem_req, .rc_mem_rsp, .wc_mem_req, .wc_mem_rsp
  );

endmodule
