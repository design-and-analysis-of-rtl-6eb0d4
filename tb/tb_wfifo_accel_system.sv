// tb_wfifo_accel_system: end-to-end run of the CPU-accelerator WFIFO system at
// its default sizes. The testbench plays the master processor (it creates an
// input and an output channel and their ports in memory) and the software on
// both ends: a producer writes tokens into the input channel and a consumer
// reads and checks them from the output channel, each with random pauses. The
// accelerator copies every token from input to output through the FIM and the
// cache. Both channels wrap around several times, so stale cache contents
// would show up as wrong data. Every mechanism is counted and must occur:
// read-cache misses and hits, write-cache evictions, flushes, invalidations,
// acquires blocked on an empty input and on a full output, and wrap-around.
module tb_wfifo_accel_system;
  import vfc_pkg::*;

  localparam int unsigned MEMW = 65536;     // 256 KB behavioural memory
  localparam logic [31:0] CI = 32'h100, CO = 32'h180;
  localparam logic [31:0] WPI = 32'h200, RPI = 32'h220, WPO = 32'h240, RPO = 32'h260;
  localparam logic [31:0] BI = 32'h8000, BO = 32'hC000;
  localparam int unsigned TI = 256, NI = 4;  // input: 4 tokens of 256 bytes
  localparam int unsigned TO = 256, NO = 3;  // output: 3 tokens of 256 bytes
  localparam int unsigned NTOK = 12;
  // second transfer: different token lengths on the two channels
  localparam logic [31:0] BI2 = 32'h10000, BO2 = 32'h14000;
  localparam int unsigned TI2 = 96, NI2 = 5;  // input: 5 tokens of 96 bytes
  localparam int unsigned TO2 = 160, NO2 = 3; // output: 3 tokens of 160 bytes
  localparam int unsigned NTOK2 = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  logic [15:0] ntok_s = '0;
  ldst_req_t rc_req, wc_req, fim_req_s;
  mem_rsp_t  rc_rsp, wc_rsp, fim_rsp;
  ldst_req_t [2:0] mreq;
  mem_rsp_t  [2:0] mrsp;
  assign mreq = {fim_req_s, wc_req, rc_req};
  assign {fim_rsp, wc_rsp, rc_rsp} = mrsp;

  wfifo_accel_system dut (
    .clk, .rst_n, .start, .rport_addr(RPI), .wport_addr(WPO), .num_tokens(ntok_s), .done,
    .rc_mem_req(rc_req), .rc_mem_rsp(rc_rsp), .wc_mem_req(wc_req), .wc_mem_rsp(wc_rsp),
    .fim_mem_req(fim_req_s), .fim_mem_rsp(fim_rsp));

  mem_model #(.NPORTS(3), .WORDS(MEMW), .LAT_MIN(2), .LAT_MAX(8)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic logic [31:0] rd(logic [31:0] a); return u_mem.mem[(a >> 2) % MEMW]; endfunction
  task automatic wr(input logic [31:0] a, input logic [31:0] d); u_mem.mem[(a >> 2) % MEMW] = d; endtask
  function automatic logic [31:0] payload(int k, int j); return k * 32'h0100_0000 + j * 32'h0001_0003 + 32'h55; endfunction
  function automatic logic [31:0] nxt(logic [31:0] x, logic [31:0] c);
    logic [31:0] n;
    n = x + rd(c + 8);
    return (n >= rd(c + 4)) ? rd(c) : n;
  endfunction

  // ---- mechanism counters ----
  int n_fill = 0, n_hit = 0, n_evict = 0, n_flush = 0, n_inval = 0;
  int n_block_empty = 0, n_block_full = 0, n_wrap_in = 0, n_wrap_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cache.rc_rep_valid && !dut.u_cache.u_rc.busy) n_fill++;
    if (dut.u_cache.u_ctrl.state == dut.u_cache.u_ctrl.S_IDLE && dut.u_cache.vf_req.valid &&
        !dut.u_cache.vf_req.we && dut.u_cache.rc_lk_hit) n_hit++;
    if (dut.u_cache.wc_cmd_valid && dut.u_cache.wc_cmd == WC_EVICT_ONE) n_evict++;
    if (dut.u_cache.cc_valid && !dut.u_cache.vf_busy) begin
      if (dut.u_cache.cc_op == CC_FLUSH) n_flush++; else n_inval++;
    end
    if (dut.u_fim.state == dut.u_fim.S_A_POLL && fim_rsp.ack && !dut.u_fim.avail_now) begin
      if (dut.u_fim.p_q) n_block_empty++; else n_block_full++;
    end
  end

  int consumed = 0, partial_ok = 0;

  // One transfer: the master processor creates an input channel of ni tokens
  // of ti bytes and an output channel of no tokens of to bytes (at the fixed
  // port addresses), the accelerator is started for ntok tokens, and software
  // produces and consumes them. The accelerator copies min(ti, to) bytes; the
  // rest of an output token must keep what was there before.
  task automatic transfer(input logic [31:0] bi, ni, ti, bo, no, to, ntok, tag);
    logic [31:0] cp;
    cp = (ti < to) ? ti : to;
    wr(CI + 0, bi); wr(CI + 4, bi + ni * ti); wr(CI + 8, ti); wr(CI + 12, bi); wr(CI + 16, bi);
    wr(CO + 0, bo); wr(CO + 4, bo + no * to); wr(CO + 8, to); wr(CO + 12, bo); wr(CO + 16, bo);
    wr(WPI, CI); wr(WPI + 4, bi); wr(RPI, CI); wr(RPI + 4, bi);
    wr(WPO, CO); wr(WPO + 4, bo); wr(RPO, CO); wr(RPO + 4, bo);
    // stale junk where tokens will go, and a marker in the output buffer
    for (int j = 0; j < int'(ni * ti / 4); j++) wr(bi + 4 * j, 32'hDEAD_0000 + j);
    for (int j = 0; j < int'(no * to / 4); j++) wr(bo + 4 * j, 32'hA5A5_0000 + j);
    ntok_s = 16'(ntok);
    @(negedge clk); start = 1; @(negedge clk); start = 0;

    fork
      // software producer on the input channel
      begin
        logic [31:0] room;
        for (int k = 0; k < int'(ntok); k++) begin
          room = rd(WPI + 4);
          while (nxt(room, CI) == rd(CI + 12)) @(negedge clk);   // wait for room
          if (k < 4 || k > 8) repeat ($urandom_range(1500, 600)) @(negedge clk);
          for (int j = 0; j < int'(ti / 4); j++) wr(room + 4 * j, payload(k + tag, j));
          if (nxt(room, CI) < room) n_wrap_in++;
          wr(WPI + 4, nxt(room, CI));
          wr(CI + 16, nxt(rd(CI + 16), CI));                        // release data: tail
        end
      end
      // software consumer on the output channel
      begin
        logic [31:0] dp;
        for (int k = 0; k < int'(ntok); k++) begin
          dp = rd(RPO + 4);
          while (dp == rd(CO + 16)) @(negedge clk);               // wait for data
          if (k >= 4 && k <= 8) repeat ($urandom_range(3000, 1500)) @(negedge clk);
          begin
            int bad = 0, kept = 0;
            for (int j = 0; j < int'(cp / 4); j++) if (rd(dp + 4 * j) != payload(k + tag, j)) bad++;
            for (int j = int'(cp / 4); j < int'(to / 4); j++)
              if (rd(dp + 4 * j) == 32'hA5A5_0000 + (dp - bo) / 4 + j) kept++;
            check(bad == 0, $sformatf("output token %0d at %h: %0d words wrong", k + tag, dp, bad));
            check(kept == int'((to - cp) / 4), $sformatf("output token %0d: words past the copy changed", k + tag));
            if (cp < to) partial_ok++;
          end
          if (nxt(dp, CO) < dp) n_wrap_out++;
          wr(RPO + 4, nxt(dp, CO));
          wr(CO + 12, nxt(rd(CO + 12), CO));                        // release room: head
          consumed++;
        end
      end
    join

    repeat (20) @(negedge clk);
    check(done, "accelerator reports done");
    check(rd(CI + 12) == rd(CI + 16), "input channel drained (head == tail)");
    check(rd(CO + 12) == rd(CO + 16), "output channel drained (head == tail)");
  endtask

  initial begin
    start = 0;
    // stay in reset until a request left over from the random power-up state
    // has drained, then load the memory (the model clears it at time 0)
    repeat (12) @(posedge clk);
    repeat (4) @(posedge clk);
    rst_n = 1;

    // equal token sizes, then an output token longer than the input token
    transfer(BI, NI, TI, BO, NO, TO, NTOK, 0);
    transfer(BI2, NI2, TI2, BO2, NO2, TO2, NTOK2, 100);

    check(consumed == NTOK + NTOK2, "all tokens consumed");
    $display("fills %0d hits %0d wc-evictions %0d flushes %0d invalidates %0d",
             n_fill, n_hit, n_evict, n_flush, n_inval);
    $display("acquire polls: empty input %0d, full output %0d; wraps in %0d out %0d; partly filled rooms %0d; %0d cycles",
             n_block_empty, n_block_full, n_wrap_in, n_wrap_out, partial_ok, cyc);
    check(n_fill > 0, "read-cache block fills happened");
    check(n_hit > 0, "read-cache hits happened");
    check(n_evict > 0, "write-cache evictions happened");
    check(n_flush == NTOK + NTOK2 && n_inval == NTOK + NTOK2, "one flush and one invalidate per token");
    check(n_block_empty > 0, "acquire blocked on an empty input channel");
    check(n_block_full > 0, "acquire blocked on a full output channel");
    check(n_wrap_in > 0 && n_wrap_out > 0, "both channels wrapped around");
    check(partial_ok == NTOK2, "rooms longer than the data token were released partly filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
