// fim: FIFO Interface Module.
//
// Lets a hardware accelerator take part in a windowed-FIFO (WFIFO) channel
// whose token buffer and control structs live in shared external memory. A
// master processor creates the channel and its ports; the accelerator only
// passes the FIM the addresses of a read-port struct and/or a write-port struct
// (one of each, possibly of different channels) and then issues acquire,
// release and availability requests. The FIM reads and updates the control
// structs over its own memory ld/st port, which must map the un-cached area.
//
// Channel struct (word offsets from vfc_pkg): base, limit, token_size, head,
// tail. Port struct: channel pointer, and the port's own pointer (next room to
// acquire for a write port, next data token for a read port). The layout is
// this design's choice. The FIFO rules are the published ones: the FIFO is
// empty when head == tail, and the token just before head is never written,
// so a room exists when next(room) != head; data exists when data != tail.
// Releasing on the write port advances tail and releasing on the read port
// advances head, so a release always frees the oldest acquired token.
//
// Interface timing (as published): to configure, hold port_addr, rnw and
// port_valid until busy_ack is high for one clock. For a request, hold
// request (00 none, 01 acquire, 10 release, 11 availability) and rnw (1 read
// port, 0 write port) until busy_ack rises; busy_ack stays high while the FIM
// works and its fall marks the result: token_addr and token_length of an
// acquired token, or for availability the lsb of token_length (1 = a token is
// available). An acquire blocks, polling the struct, until a token is there;
// holding stop high ends it without a token. A release with no token acquired,
// and an availability request on an unconfigured port, complete at once; an
// acquire on an unconfigured port stays busy until stop.
module fim
  import vfc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // FIM interface
  input  logic          port_valid,
  input  logic [AW-1:0] port_addr,
  input  logic          rnw,
  input  fim_req_e      request,
  input  logic          stop,
  output logic          busy_ack,
  output logic [AW-1:0] token_addr,
  output logic [AW-1:0] token_length,
  // memory ld/st port to the un-cached area
  output ldst_req_t     mem_req,
  input  mem_rsp_t      mem_rsp
);

  typedef enum logic [3:0] {
    S_IDLE, S_C_CHAN, S_C_BASE, S_C_LIMIT, S_C_TSIZE, S_C_PTR, S_C_ACK,
    S_A_POLL, S_A_WPTR, S_R_RD, S_R_WR, S_V_RD, S_HANG, S_FIN
  } state_e;
  state_e state;

  // per port: index 0 = write port, 1 = read port
  logic [1:0]          cfg_q;
  logic [1:0][AW-1:0]  paddr_q, chan_q, base_q, limit_q, tsize_q, ptr_q;
  logic [1:0][15:0]    nacq_q;
  logic                p_q;       // port of the current operation
  logic [AW-1:0]       upd_q;     // value to be written back

  function automatic logic [AW-1:0] next_tok(logic [AW-1:0] x, logic [AW-1:0] ts,
                                             logic [AW-1:0] b, logic [AW-1:0] l);
    logic [AW-1:0] n;
    n = x + ts;
    return (n >= l) ? b : n;
  endfunction

  logic [AW-1:0] own_nxt;   // the port's pointer moved on by one token
  logic [AW-1:0] rd_nxt;    // the word just read moved on by one token
  assign own_nxt = next_tok(ptr_q[p_q], tsize_q[p_q], base_q[p_q], limit_q[p_q]);
  assign rd_nxt  = next_tok(mem_rsp.rdata, tsize_q[p_q], base_q[p_q], limit_q[p_q]);

  // the shared pointer a port compares against / advances
  //   write port: acquire and availability read head, release advances tail
  //   read  port: acquire and availability read tail, release advances head
  logic [AW-1:0] peer_ptr_addr, own_ptr_addr;
  assign peer_ptr_addr = chan_q[p_q] + (p_q ? CH_TAIL : CH_HEAD);
  assign own_ptr_addr  = chan_q[p_q] + (p_q ? CH_HEAD : CH_TAIL);

  logic avail_now;  // evaluated with the peer pointer on mem_rsp.rdata
  assign avail_now = p_q ? (ptr_q[p_q] != mem_rsp.rdata) : (own_nxt != mem_rsp.rdata);

  always_comb begin
    mem_req       = '0;
    mem_req.be    = '1;
    unique case (state)
      S_C_CHAN:  begin mem_req.valid = 1'b1; mem_req.addr = paddr_q[p_q] + PT_CHAN; end
      S_C_BASE:  begin mem_req.valid = 1'b1; mem_req.addr = chan_q[p_q] + CH_BASE;  end
      S_C_LIMIT: begin mem_req.valid = 1'b1; mem_req.addr = chan_q[p_q] + CH_LIMIT; end
      S_C_TSIZE: begin mem_req.valid = 1'b1; mem_req.addr = chan_q[p_q] + CH_TSIZE; end
      S_C_PTR:   begin mem_req.valid = 1'b1; mem_req.addr = paddr_q[p_q] + PT_PTR;  end
      S_A_POLL, S_V_RD: begin mem_req.valid = 1'b1; mem_req.addr = peer_ptr_addr; end
      S_A_WPTR: begin
        mem_req.valid = 1'b1; mem_req.we = 1'b1;
        mem_req.addr  = paddr_q[p_q] + PT_PTR; mem_req.wdata = upd_q;
      end
      S_R_RD: begin mem_req.valid = 1'b1; mem_req.addr = own_ptr_addr; end
      S_R_WR: begin
        mem_req.valid = 1'b1; mem_req.we = 1'b1;
        mem_req.addr  = own_ptr_addr; mem_req.wdata = upd_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cfg_q        <= '0;
      paddr_q      <= '0;
      chan_q       <= '0;
      base_q       <= '0;
      limit_q      <= '0;
      tsize_q      <= '0;
      ptr_q        <= '0;
      nacq_q       <= '0;
      p_q          <= 1'b0;
      upd_q        <= '0;
      busy_ack     <= 1'b0;
      token_addr   <= '0;
      token_length <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (port_valid) begin
            p_q          <= rnw;
            paddr_q[rnw] <= port_addr;
            cfg_q[rnw]   <= 1'b0;
            nacq_q[rnw]  <= '0;
            state        <= S_C_CHAN;
          end else if (request != FIM_NONE) begin
            p_q      <= rnw;
            busy_ack <= 1'b1;
            unique case (request)
              FIM_ACQUIRE: state <= cfg_q[rnw] ? S_A_POLL : S_HANG;
              FIM_RELEASE: state <= (cfg_q[rnw] && nacq_q[rnw] != '0) ? S_R_RD : S_FIN;
              FIM_AVAIL: begin
                if (cfg_q[rnw]) state <= S_V_RD;
                else begin
                  state        <= S_FIN;
                  token_length <= '0;
                end
              end
              default: ;
            endcase
          end
        end
        // ---- configuration: read the port and channel structs ----
        S_C_CHAN:  if (mem_rsp.ack) begin chan_q[p_q]  <= mem_rsp.rdata; state <= S_C_BASE;  end
        S_C_BASE:  if (mem_rsp.ack) begin base_q[p_q]  <= mem_rsp.rdata; state <= S_C_LIMIT; end
        S_C_LIMIT: if (mem_rsp.ack) begin limit_q[p_q] <= mem_rsp.rdata; state <= S_C_TSIZE; end
        S_C_TSIZE: if (mem_rsp.ack) begin tsize_q[p_q] <= mem_rsp.rdata; state <= S_C_PTR;   end
        S_C_PTR: if (mem_rsp.ack) begin
          ptr_q[p_q] <= mem_rsp.rdata;
          // initial check: a usable channel has a non-empty buffer and tokens
          cfg_q[p_q] <= tsize_q[p_q] != '0 && limit_q[p_q] > base_q[p_q];
          busy_ack   <= 1'b1;
          state      <= S_C_ACK;
        end
        S_C_ACK: begin
          busy_ack <= 1'b0;
          state    <= S_IDLE;
        end
        // ---- acquire: poll until a token is there ----
        S_A_POLL: if (mem_rsp.ack) begin
          if (avail_now) begin
            token_addr   <= ptr_q[p_q];
            token_length <= tsize_q[p_q];
            ptr_q[p_q]   <= own_nxt;
            upd_q        <= own_nxt;
            nacq_q[p_q]  <= nacq_q[p_q] + 1'b1;
            state        <= S_A_WPTR;
          end else if (stop) begin
            busy_ack <= 1'b0;
            state    <= S_IDLE;
          end
        end
        S_A_WPTR: if (mem_rsp.ack) begin
          busy_ack <= 1'b0;
          state    <= S_IDLE;
        end
        S_HANG: if (stop) begin
          busy_ack <= 1'b0;
          state    <= S_IDLE;
        end
        // ---- release: advance tail (write port) or head (read port) ----
        S_R_RD: if (mem_rsp.ack) begin
          upd_q <= rd_nxt;
          state <= S_R_WR;
        end
        S_R_WR: if (mem_rsp.ack) begin
          nacq_q[p_q] <= nacq_q[p_q] - 1'b1;
          busy_ack    <= 1'b0;
          state       <= S_IDLE;
        end
        // ---- availability ----
        S_V_RD: if (mem_rsp.ack) begin
          token_addr   <= ptr_q[p_q];
          token_length <= {{(AW-1){1'b0}}, avail_now};
          busy_ack     <= 1'b0;
          state        <= S_IDLE;
        end
        S_FIN: begin
          busy_ack <= 1'b0;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a memory request is held until it is acknowledged
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req.valid && !mem_rsp.ack |=> mem_req.valid && $stable(mem_req.addr));

endmodule
