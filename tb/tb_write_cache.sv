// tb_write_cache: checks the 8-entry write cache. Stores are merged per byte,
// st_ok falls when all entries hold other blocks, EVICT_ONE writes back only
// the written bytes of one entry, WB_RANGE writes back exactly the entries in
// a range, DROP discards without writing, and probe reports held blocks.
// Memory contents are compared with a byte-level reference.
module tb_write_cache;
  import vfc_pkg::*;

  localparam int unsigned E = 8, BB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          st_valid, st_ok, probe_hit, cmd_valid, busy, done;
  logic [AW-1:0] st_addr, probe_lo, probe_hi, cmd_lo, cmd_hi;
  logic [DW-1:0] st_wdata;
  logic [BW-1:0] st_be;
  wc_cmd_e       cmd;
  ldst_req_t     mreq;
  mem_rsp_t      mrsp;

  write_cache #(.WC_ENTRIES(E), .WC_BLOCK_BYTES(BB)) dut (
    .clk, .rst_n, .st_valid, .st_addr, .st_wdata, .st_be, .st_ok,
    .probe_lo, .probe_hi, .probe_hit, .cmd_valid, .cmd, .cmd_lo, .cmd_hi,
    .busy, .done, .mem_req(mreq), .mem_rsp(mrsp));

  mem_model #(.NPORTS(1), .WORDS(4096)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  int checks = 0, failures = 0;
  logic [7:0] refm [16384];      // memory as the test expects it (bytes)
  logic [7:0] pend [16384];      // bytes sitting in the write cache
  bit         pvld [16384];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic store(input logic [AW-1:0] a, input logic [DW-1:0] d, input logic [3:0] be);
    @(negedge clk);
    st_valid = 1; st_addr = a; st_wdata = d; st_be = be;
    #1 check(st_ok, $sformatf("store to %h should be accepted", a));
    @(negedge clk);
    st_valid = 0;
    for (int b = 0; b < 4; b++) if (be[b]) begin pend[a + b] = d[8*b +: 8]; pvld[a + b] = 1; end
  endtask

  task automatic command(input wc_cmd_e c, input logic [AW-1:0] lo, input logic [AW-1:0] hi);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_lo = lo; cmd_hi = hi;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  // move pending bytes of the 8-byte blocks in [lo,hi] to the reference memory
  task automatic ref_wb(input logic [AW-1:0] lo, input logic [AW-1:0] hi, input bit keep);
    for (int a = int'(lo & ~32'h7); a <= int'(hi | 32'h7); a++)
      if (pvld[a]) begin
        if (keep) refm[a] = pend[a];
        pvld[a] = 0;
      end
  endtask

  task automatic compare_mem(input string tag);
    int bad = 0;
    for (int a = 0; a < 16384; a++)
      if (u_mem.mem[a >> 2][8 * (a % 4) +: 8] != refm[a]) begin
        bad++;
        if (bad < 6) $display("  byte %h: memory %h expected %h", a, u_mem.mem[a >> 2][8 * (a % 4) +: 8], refm[a]);
      end
    check(bad == 0, $sformatf("%s: %0d memory bytes differ", tag, bad));
  endtask

  initial begin
    st_valid = 0; st_addr = 0; st_wdata = 0; st_be = 0; cmd_valid = 0; cmd = WC_EVICT_ONE;
    cmd_lo = 0; cmd_hi = 0; probe_lo = 0; probe_hi = 0;
    // stay in reset until a request left over from the random power-up state
    // has drained, then load the memory (the model clears it at time 0)
    repeat (12) @(posedge clk);
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = i * 32'h0101_0101 + 32'h0403_0201;
    for (int a = 0; a < 16384; a++) begin
      refm[a] = u_mem.mem[a >> 2][8 * (a % 4) +: 8];
      pvld[a] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // fill 8 entries at 8 distinct blocks, merge a second store into one
    for (int e = 0; e < 8; e++) store(32'h100 + 16 * e, 32'hA000_0000 + e, 4'b1111);
    store(32'h104, 32'hBBCC_DDEE, 4'b0110);          // second word of block 0x100
    store(32'h100, 32'h1234_5678, 4'b1000);          // merge a byte
    compare_mem("nothing written yet");
    // a ninth block cannot be taken
    @(negedge clk);
    st_valid = 1; st_addr = 32'h400; st_wdata = 0; st_be = 4'hF;
    #1 check(!st_ok, "full write cache must refuse a new block");
    st_addr = 32'h130; #1 check(st_ok, "a held block is still accepted");
    st_valid = 0;
    // probe
    probe_lo = 32'h100; probe_hi = 32'h13F; #1 check(probe_hit, "probe hit");
    probe_lo = 32'h200; probe_hi = 32'h23F; #1 check(!probe_hit, "probe miss");
    // evict one (round robin: entry 0 = block 0x100)
    command(WC_EVICT_ONE, 0, 0);
    ref_wb(32'h100, 32'h107, 1);
    compare_mem("after evict");
    store(32'h400, 32'hCAFE_F00D, 4'b0011);          // now accepted
    // write back a range covering blocks 0x110..0x12F
    command(WC_WB_RANGE, 32'h114, 32'h128);
    ref_wb(32'h114, 32'h128, 1);
    compare_mem("after range write back");
    // drop 0x130..0x13F without write back
    command(WC_DROP, 32'h130, 32'h13F);
    ref_wb(32'h130, 32'h13F, 0);
    compare_mem("after drop");
    probe_lo = 32'h130; probe_hi = 32'h13F; #1 check(!probe_hit, "dropped block gone");
    // random stores and full write back
    for (int n = 0; n < 400; n++) begin
      logic [AW-1:0] a;
      a = AW'($urandom_range(255, 0) * 4) + 32'h800;
      @(negedge clk);
      st_valid = 1; st_addr = a; st_wdata = $urandom; st_be = 4'($urandom_range(15, 1));
      #1;
      if (!st_ok) begin
        st_valid = 0;
        command(WC_EVICT_ONE, 0, 0);
        // which entry went out is not known here: compare after a full flush
        @(negedge clk);
        st_valid = 1;
        #1;
      end
      check(st_ok, "store accepted after eviction");
      @(negedge clk);
      for (int b = 0; b < 4; b++) if (st_be[b]) begin pend[a + b] = st_wdata[8*b +: 8]; pvld[a + b] = 1; end
      st_valid = 0;
    end
    command(WC_WB_RANGE, 0, 32'hFFFF);
    ref_wb(0, 32'h3FFF, 1);
    compare_mem("after random stores and full write back");
    probe_lo = 0; probe_hi = 32'hFFFF; #1 check(!probe_hit, "empty after full write back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
