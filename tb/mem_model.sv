// mem_model: behavioural multi-port external memory for simulation only.
//
// Stands in for the multi-port memory controller and DDR memory. Each port
// takes one ld/st request at a time: after a random latency of LAT_MIN..LAT_MAX
// cycles it performs the access, as captured when it was accepted, on the shared word array and pulses ack for
// one cycle (with rdata for a load). Requests of one port therefore complete
// in order; the ports are independent. Addresses wrap modulo the array size.
// Testbenches may read and write mem[] directly, as software on a CPU would.
module mem_model
  import vfc_pkg::*;
#(
  parameter int unsigned NPORTS  = 1,
  parameter int unsigned WORDS   = 16384,
  parameter int unsigned LAT_MIN = 1,
  parameter int unsigned LAT_MAX = 4
) (
  input  logic                  clk,
  input  ldst_req_t [NPORTS-1:0] req,
  output mem_rsp_t  [NPORTS-1:0] rsp
);

  logic [DW-1:0] mem [WORDS];
  logic [NPORTS-1:0] busy;
  int unsigned       cnt [NPORTS];
  int unsigned       nreq [NPORTS];   // completed requests per port
  ldst_req_t         held [NPORTS];   // request as it was when accepted

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    busy = '0;
    for (int p = 0; p < NPORTS; p++) begin
      rsp[p] = '0;
      cnt[p] = 0;
      nreq[p] = 0;
    end
  end

  function automatic int unsigned widx(logic [AW-1:0] a);
    return int'((a >> 2) % WORDS);
  endfunction

  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      rsp[p].ack <= 1'b0;
      if (!busy[p]) begin
        if (req[p].valid && !rsp[p].ack) begin
          busy[p] <= 1'b1;
          held[p] <= req[p];
          cnt[p]  <= $urandom_range(LAT_MAX, LAT_MIN) - 1;
        end
      end else if (cnt[p] == 0) begin
        busy[p]    <= 1'b0;
        rsp[p].ack <= 1'b1;
        nreq[p]    <= nreq[p] + 1;
        if (held[p].we) begin
          for (int b = 0; b < BW; b++)
            if (held[p].be[b]) mem[widx(held[p].addr)][8*b +: 8] <= held[p].wdata[8*b +: 8];
        end else begin
          rsp[p].rdata <= mem[widx(held[p].addr)];
        end
      end else begin
        cnt[p] <= cnt[p] - 1;
      end
    end
  end

endmodule
