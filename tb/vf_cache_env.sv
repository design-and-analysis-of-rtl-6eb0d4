// vf_cache_env: one run of the accelerator-cache check, for one cache
// organisation (NUM_WAYS x NUM_SETS, 64-byte blocks). It drives a vf_cache
// instance and its own behavioural memory, and compares against a byte-level
// reference of what the accelerator must observe. Random loads, stores (random
// byte enables), flushes and block-aligned invalidations run over a region
// four times the 8 KB read-cache size, so misses, LRU replacement, write-cache
// evictions and read misses on blocks with pending writes all occur; each is
// counted and must occur. Loads must return the last value stored; after a
// flush the memory must hold it. A directed part checks that after a miss the
// cache serves eight loads to the same block in eight consecutive cycles.
// Ports: clk; checks, failures and finished report to the enclosing testbench.
module vf_cache_env
  import vfc_pkg::*;
#(
  parameter int unsigned NUM_WAYS = 2,
  parameter int unsigned NUM_SETS = 64
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   finished
);

  localparam int unsigned MEMW = 16384;          // 64 KB behavioural memory
  localparam int unsigned REGION = 32768;        // bytes used by the random test

  logic rst_n = 0;

  ldst_req_t     vf_req;
  logic          vf_busy, cc_valid, cc_busy, cc_done;
  logic [1:0]    vf_ack;
  logic [DW-1:0] vf_rdata;
  cc_op_e        cc_op;
  logic [AW-1:0] cc_addr, cc_len;
  ldst_req_t [1:0] mreq;
  mem_rsp_t  [1:0] mrsp;

  vf_cache #(.NUM_SETS(NUM_SETS), .NUM_WAYS(NUM_WAYS)) dut (
    .clk, .rst_n, .vf_req, .vf_busy, .vf_ack, .vf_rdata,
    .cc_valid, .cc_op, .cc_addr, .cc_len, .cc_busy, .cc_done,
    .rc_mem_req(mreq[0]), .rc_mem_rsp(mrsp[0]), .wc_mem_req(mreq[1]), .wc_mem_rsp(mrsp[1]));

  mem_model #(.NPORTS(2), .WORDS(MEMW), .LAT_MIN(1), .LAT_MAX(6)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  initial begin checks = 0; failures = 0; finished = 0; end
  logic [7:0] refm [MEMW * 4];
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_miss_wb = 0, n_evict = 0, n_flush = 0, n_inval = 0, n_wupd = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state == dut.u_ctrl.S_IDLE && vf_req.valid && !vf_req.we) begin
      if (dut.rc_lk_hit) n_hit++; else n_miss++;
    end
    if (dut.u_ctrl.state == dut.u_ctrl.S_MISS && dut.wc_probe_hit) n_miss_wb++;
    if (dut.wc_cmd_valid && dut.wc_cmd == WC_EVICT_ONE) n_evict++;
    if (dut.rc_upd_valid && dut.u_rc.up_hit) n_wupd++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL (%0d-way) @%0d: %s", NUM_WAYS, cyc, msg);
    end
  endtask

  function automatic logic [DW-1:0] refw(logic [AW-1:0] a);
    return {refm[a + 3], refm[a + 2], refm[a + 1], refm[a]};
  endfunction

  task automatic issue(input logic we, input logic [AW-1:0] a, input logic [DW-1:0] d,
                       input logic [3:0] be);
    @(negedge clk);
    vf_req.valid = 1; vf_req.we = we; vf_req.addr = a; vf_req.wdata = d; vf_req.be = be;
    while (vf_busy) @(negedge clk);
    @(posedge clk);
    #1 vf_req.valid = 0;
  endtask

  task automatic load(input logic [AW-1:0] a);
    logic [DW-1:0] d;
    issue(0, a, 0, 0);
    while (!vf_ack[1]) @(negedge clk);
    d = vf_rdata;
    check(d == refw(a), $sformatf("load %h = %h, expected %h", a, d, refw(a)));
  endtask

  task automatic store(input logic [AW-1:0] a, input logic [DW-1:0] d, input logic [3:0] be);
    issue(1, a, d, be);
    while (!vf_ack[0]) @(negedge clk);
    for (int b = 0; b < 4; b++) if (be[b]) refm[a + b] = d[8*b +: 8];
  endtask

  task automatic ccmd(input cc_op_e op, input logic [AW-1:0] a, input logic [AW-1:0] len);
    @(negedge clk);
    cc_valid = 1; cc_op = op; cc_addr = a; cc_len = len;
    while (vf_busy) @(negedge clk);
    @(posedge clk);
    #1 cc_valid = 0;
    while (!cc_done) @(negedge clk);
    if (op == CC_FLUSH) begin
      int bad = 0;
      n_flush++;
      for (int x = int'(a & ~32'h7); x <= int'((a + len - 1) | 32'h7); x++)
        if (u_mem.mem[x >> 2][8 * (x % 4) +: 8] != refm[x]) bad++;
      check(bad == 0, $sformatf("flush %h+%0d: %0d bytes not in memory", a, len, bad));
    end else begin
      n_inval++;
      for (int x = int'(a); x < int'(a + len); x++) refm[x] = u_mem.mem[x >> 2][8 * (x % 4) +: 8];
    end
  endtask

  initial begin
    int c_first, run, best;
    vf_req = '0; cc_valid = 0; cc_op = CC_FLUSH; cc_addr = 0; cc_len = 0;
    // stay in reset until a request left over from the random power-up state
    // has drained, then load the memory (the model clears it at time 0)
    repeat (12) @(posedge clk);
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = i * 32'h0019_660D + 32'h3C6E_F35F;
    for (int x = 0; x < MEMW * 4; x++) refm[x] = u_mem.mem[x >> 2][8 * (x % 4) +: 8];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- directed: miss, replace, reload, then eight hits in eight cycles ----
    load(32'h0000_1000);
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      vf_req.valid = 1; vf_req.we = 0; vf_req.addr = 32'h1000 + 4 * i;
      @(negedge clk);
      check(!vf_busy, "busy during a run of hits");
    end
    vf_req.valid = 0;
    // count consecutive read acknowledgements (captured by the monitor below)
    repeat (3) @(negedge clk);
    check(burst_len == 8, $sformatf("eight hits gave a run of %0d acks", burst_len));
    check(burst_ok, "burst data");

    // ---- read after write in a block not in the read cache ----
    store(32'h2008, 32'h0BAD_F00D, 4'b1111);
    load(32'h2008);
    load(32'h200C);
    check(n_miss_wb >= 1, "read miss with pending writes took the write-back path");

    // ---- random mix ----
    for (int n = 0; n < 20000; n++) begin
      int unsigned r;
      logic [AW-1:0] a;
      r = $urandom_range(99, 0);
      a = AW'($urandom_range(REGION / 4 - 1, 0) * 4);
      if (n % 4 == 0) a = (a & 32'h0000_07FC);      // a hot region for reuse
      if (r < 55) load(a);
      else if (r < 97) store(a, $urandom, 4'($urandom_range(15, 1)));
      else if (r < 99) ccmd(CC_FLUSH, a, AW'($urandom_range(512, 1)));
      else begin
        logic [AW-1:0] b;
        b = a & ~32'h3F;
        ccmd(CC_FLUSH, b, 32'd128);               // keep written data, then drop copies
        ccmd(CC_INVALIDATE, b, 32'd128);
      end
    end
    ccmd(CC_FLUSH, 0, REGION);
    for (int x = 0; x < int'(REGION); x += 4) load(AW'(x));

    $display("%0d-way: hits %0d misses %0d miss-writebacks %0d evictions %0d write-updates %0d flushes %0d invalidates %0d",
             NUM_WAYS, n_hit, n_miss, n_miss_wb, n_evict, n_wupd, n_flush, n_inval);
    check(n_hit > 0 && n_miss > 0, "hits and misses occurred");
    check(n_evict > 0, "write-cache eviction occurred");
    check(n_wupd > 0, "store updated a read-cache block");
    check(n_flush > 0 && n_inval > 0, "flush and invalidate occurred");
    finished = 1;
  end

  // monitor for the burst: longest run of consecutive read acks during it
  int  burst_len = 0, cur_run = 0;
  bit  burst_ok = 1;
  int  burst_i = 0;
  always @(posedge clk) begin
    if (rst_n && vf_ack[1] && cyc < 400) begin
      cur_run++;
      if (cur_run > burst_len) burst_len = cur_run;
      // the first ack belongs to the initial miss; the next eight to words 0..7
      if (burst_i > 0 && burst_i < 9 && vf_rdata != refw(32'h1000 + 4 * (burst_i - 1))) burst_ok = 0;
      burst_i++;
    end else cur_run = 0;
  end

endmodule
