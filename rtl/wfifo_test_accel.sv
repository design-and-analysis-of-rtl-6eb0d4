// wfifo_test_accel: a simple streaming accelerator that moves tokens from one
// WFIFO channel to another, used to exercise the SW-HW communication path.
//
// After start it programs the FIM with the read-port address (rnw = 1) and the
// write-port address (rnw = 0). Then, for each of num_tokens tokens, it follows
// the published SW-HW sequence: acquire a data token on the read port and a
// room token on the write port (FIM), copy min(data length, room length) bytes
// word by word through the cache's ld/st port, flush the room's range and
// invalidate the data token's range through the cache control interface, and
// finally release both tokens on the FIM. done stays high after the last
// token until the next start. The copy itself (no arithmetic on the data) and
// the one-request-at-a-time ld/st use are this design's choices.
module wfifo_test_accel
  import vfc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] rport_addr,
  input  logic [AW-1:0] wport_addr,
  input  logic [15:0]   num_tokens,
  output logic          done,
  // FIM interface
  output logic          fim_port_valid,
  output logic [AW-1:0] fim_port_addr,
  output logic          fim_rnw,
  output fim_req_e      fim_request,
  output logic          fim_stop,
  input  logic          fim_busy_ack,
  input  logic [AW-1:0] fim_token_addr,
  input  logic [AW-1:0] fim_token_length,
  // cache ld/st
  output ldst_req_t     vf_req,
  input  logic          vf_busy,
  input  logic [1:0]    vf_ack,
  input  logic [DW-1:0] vf_rdata,
  // cache control
  output logic          cc_valid,
  output cc_op_e        cc_op,
  output logic [AW-1:0] cc_addr,
  output logic [AW-1:0] cc_len,
  input  logic          cc_done
);

  typedef enum logic [4:0] {
    S_IDLE, S_CFG_R, S_CFG_W,
    S_ACQ_D, S_ACQ_D_W, S_ACQ_R, S_ACQ_R_W,
    S_LD, S_LD_W, S_ST, S_ST_W,
    S_FLUSH, S_FLUSH_W, S_INV, S_INV_W,
    S_REL_D, S_REL_D_W, S_REL_R, S_REL_R_W, S_DONE
  } state_e;
  state_e state;

  logic [AW-1:0] in_tok_q, in_len_q, out_tok_q, out_len_q;
  logic [AW-1:0] nwords_q, i_q;
  logic [DW-1:0] data_q;
  logic [15:0]   cnt_q;

  logic [AW-1:0] min_len;
  assign min_len = (fim_token_length < in_len_q) ? fim_token_length : in_len_q;

  always_comb begin
    fim_port_valid = state == S_CFG_R || state == S_CFG_W;
    fim_port_addr  = (state == S_CFG_W) ? wport_addr : rport_addr;
    fim_rnw        = state == S_CFG_R || state == S_ACQ_D || state == S_ACQ_D_W ||
                     state == S_REL_D || state == S_REL_D_W;
    fim_request    = FIM_NONE;
    if (state == S_ACQ_D || state == S_ACQ_R) fim_request = FIM_ACQUIRE;
    if (state == S_REL_D || state == S_REL_R) fim_request = FIM_RELEASE;
    fim_stop       = 1'b0;

    vf_req       = '0;
    vf_req.be    = '1;
    vf_req.valid = state == S_LD || state == S_ST;
    vf_req.we    = state == S_ST;
    vf_req.addr  = (state == S_ST) ? out_tok_q + (i_q << 2) : in_tok_q + (i_q << 2);
    vf_req.wdata = data_q;

    cc_valid = state == S_FLUSH || state == S_INV;
    cc_op    = (state == S_INV) ? CC_INVALIDATE : CC_FLUSH;
    cc_addr  = (state == S_INV) ? in_tok_q : out_tok_q;
    cc_len   = (state == S_INV) ? in_len_q : out_len_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      in_tok_q  <= '0;
      in_len_q  <= '0;
      out_tok_q <= '0;
      out_len_q <= '0;
      nwords_q  <= '0;
      i_q       <= '0;
      data_q    <= '0;
      cnt_q     <= '0;
      done      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          done  <= 1'b0;
          cnt_q <= '0;
          state <= S_CFG_R;
        end
        S_CFG_R: if (fim_busy_ack) state <= S_CFG_W;
        S_CFG_W: if (fim_busy_ack) state <= (num_tokens == '0) ? S_DONE : S_ACQ_D;
        S_ACQ_D: if (fim_busy_ack) state <= S_ACQ_D_W;
        S_ACQ_D_W: if (!fim_busy_ack) begin
          in_tok_q <= fim_token_addr;
          in_len_q <= fim_token_length;
          state    <= S_ACQ_R;
        end
        S_ACQ_R: if (fim_busy_ack) state <= S_ACQ_R_W;
        S_ACQ_R_W: if (!fim_busy_ack) begin
          out_tok_q <= fim_token_addr;
          out_len_q <= fim_token_length;
          nwords_q  <= min_len >> 2;
          i_q       <= '0;
          state     <= ((min_len >> 2) == '0) ? S_FLUSH : S_LD;
        end
        S_LD: if (!vf_busy) state <= S_LD_W;
        S_LD_W: if (vf_ack[1]) begin
          data_q <= vf_rdata;
          state  <= S_ST;
        end
        S_ST: if (!vf_busy) state <= S_ST_W;
        S_ST_W: if (vf_ack[0]) begin
          i_q   <= i_q + 1'b1;
          state <= (i_q + 1'b1 == nwords_q) ? S_FLUSH : S_LD;
        end
        S_FLUSH:   if (!vf_busy) state <= S_FLUSH_W;
        S_FLUSH_W: if (cc_done)  state <= S_INV;
        S_INV:     if (!vf_busy) state <= S_INV_W;
        S_INV_W:   if (cc_done)  state <= S_REL_D;
        S_REL_D:   if (fim_busy_ack)  state <= S_REL_D_W;
        S_REL_D_W: if (!fim_busy_ack) state <= S_REL_R;
        S_REL_R:   if (fim_busy_ack)  state <= S_REL_R_W;
        S_REL_R_W: if (!fim_busy_ack) begin
          cnt_q <= cnt_q + 1'b1;
          state <= (cnt_q + 1'b1 == num_tokens) ? S_DONE : S_ACQ_D;
        end
        S_DONE: begin
          done <= 1'b1;
          if (start) begin
            done  <= 1'b0;
            cnt_q <= '0;
            state <= S_CFG_R;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
