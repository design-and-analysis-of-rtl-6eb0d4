// tb_read_cache: directed and random checks of the set-associative read cache.
// A behavioural memory is filled with a known pattern; blocks are fetched with
// replace, and every lookup is compared with that pattern. Checked: fill
// contents and fill time (at least one memory access per word), LRU victim
// choice in a 2-way set, byte-enable write update, range invalidation, and a
// random phase against a reference model of which blocks each set holds.
module tb_read_cache;
  import vfc_pkg::*;

  localparam int unsigned SETS = 64, WAYS = 2, BB = 64, WPB = BB / 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] lk_addr, rep_addr, inv_lo, inv_hi, upd_addr;
  logic          lk_hit, lk_touch, upd_valid, rep_valid, inv_valid, busy, done;
  logic [0:0]    lk_way;
  logic [DW-1:0] lk_rdata, upd_wdata;
  logic [BW-1:0] upd_be;
  ldst_req_t     mreq;
  mem_rsp_t      mrsp;

  read_cache #(.NUM_SETS(SETS), .NUM_WAYS(WAYS), .BLOCK_BYTES(BB)) dut (
    .clk, .rst_n, .lk_addr, .lk_hit, .lk_way, .lk_rdata, .lk_touch,
    .upd_valid, .upd_addr, .upd_wdata, .upd_be, .rep_valid, .rep_addr,
    .inv_valid, .inv_lo, .inv_hi, .busy, .done, .mem_req(mreq), .mem_rsp(mrsp));

  mem_model #(.NPORTS(1), .WORDS(16384)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] pat(logic [AW-1:0] a);
    return (a >> 2) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  task automatic replace(input logic [AW-1:0] a, output int cycles);
    int c0;
    @(negedge clk);
    rep_valid = 1; rep_addr = a;
    c0 = cyc;
    @(negedge clk);
    rep_valid = 0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
  endtask

  // look up a; returns hit and data, touches on hit if touch=1
  task automatic lookup(input logic [AW-1:0] a, input bit touch, output bit hit,
                        output logic [DW-1:0] d);
    @(negedge clk);
    lk_addr = a; lk_touch = touch;
    #1;
    hit = lk_hit; d = lk_rdata;
    @(posedge clk);
    #1 lk_touch = 0;
  endtask

  task automatic expect_block(input logic [AW-1:0] base, input bit present, input string tag);
    bit h; logic [DW-1:0] d;
    for (int w = 0; w < WPB; w++) begin
      lookup(base + 4 * w, 0, h, d);
      if (present) check(h && d == pat(base + 4 * w), $sformatf("%s word %0d hit=%0d d=%h", tag, w, h, d));
      else check(!h, $sformatf("%s word %0d should miss", tag, w));
    end
  endtask

  // reference for the random phase: per set, list of block numbers, MRU first
  int unsigned ref_set [SETS][$];

  initial begin
    int cyc_fill;
    bit h; logic [DW-1:0] d;
    logic [AW-1:0] A, B, C;
    lk_addr = 0; lk_touch = 0; upd_valid = 0; upd_addr = 0; upd_wdata = 0; upd_be = 0;
    rep_valid = 0; rep_addr = 0; inv_valid = 0; inv_lo = 0; inv_hi = 0;
    // stay in reset until a request left over from the random power-up state
    // has drained, then load the memory (the model clears it at time 0)
    repeat (12) @(posedge clk);
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = pat(AW'(i * 4));
    repeat (3) @(posedge clk);
    rst_n = 1;

    // all lines invalid after reset
    lookup(32'h0, 0, h, d);
    check(!h, "miss after reset");

    // same set (index 3), three different tags
    A = 32'h0000_00C0; B = A + SETS * BB; C = A + 2 * SETS * BB;
    replace(A, cyc_fill);
    check(cyc_fill >= WPB, $sformatf("fill took %0d cycles, below %0d words", cyc_fill, WPB));
    expect_block(A, 1, "A");
    replace(B, cyc_fill);
    expect_block(B, 1, "B");
    expect_block(A, 1, "A again");
    lookup(A, 1, h, d);                   // A becomes most recent
    check(h, "touch A");
    replace(C, cyc_fill);                 // evicts B
    expect_block(C, 1, "C");
    expect_block(A, 1, "A kept");
    expect_block(B, 0, "B evicted");
    lookup(C, 1, h, d);                   // C most recent
    replace(B, cyc_fill);                 // evicts A
    expect_block(A, 0, "A evicted");
    expect_block(C, 1, "C kept");

    // write update with byte enables on a present block
    @(negedge clk);
    upd_valid = 1; upd_addr = C + 8; upd_wdata = 32'hDEAD_BEEF; upd_be = 4'b0101;
    @(negedge clk);
    upd_valid = 1; upd_addr = A + 8; upd_wdata = 32'h1111_1111; upd_be = 4'b1111;  // absent
    @(negedge clk);
    upd_valid = 0;
    lookup(C + 8, 0, h, d);
    check(h && d == ((pat(C + 8) & 32'hFF00_FF00) | 32'h00AD_00EF), $sformatf("byte update %h", d));
    replace(A, cyc_fill);                 // evicts C, now the least recently used
    lookup(A + 8, 0, h, d);
    check(h && d == pat(A + 8), "update of an absent block must not reach the cache");

    // range invalidation of block B only (A stays)
    @(negedge clk);
    inv_valid = 1; inv_lo = B + 4; inv_hi = B + 8;
    @(negedge clk);
    inv_valid = 0;
    while (!done) @(negedge clk);
    expect_block(B, 0, "B invalidated");
    expect_block(A, 1, "A after invalidate");

    // random phase with a reference model
    @(negedge clk);
    inv_valid = 1; inv_lo = 0; inv_hi = 32'hFFFF_FFFF;
    @(negedge clk);
    inv_valid = 0;
    while (!done) @(negedge clk);
    for (int s = 0; s < SETS; s++) ref_set[s].delete();
    for (int n = 0; n < 3000; n++) begin
      int unsigned blk, s, pos;
      logic [AW-1:0] a;
      blk = $urandom_range(4 * SETS - 1, 0);   // 4 tags per set
      s = blk % SETS;
      a = AW'(blk * BB + 4 * $urandom_range(WPB - 1, 0));
      pos = 99;
      foreach (ref_set[s][i]) if (ref_set[s][i] == blk) pos = i;
      lookup(a, 1, h, d);
      check(h == (pos != 99), $sformatf("random hit %0d expected %0d at %h", h, pos != 99, a));
      if (h) check(d == pat(a), "random data");
      if (pos != 99) begin
        ref_set[s].delete(pos);
        ref_set[s].push_front(blk);
      end else begin
        replace(a, cyc_fill);
        if (ref_set[s].size() == WAYS) void'(ref_set[s].pop_back());
        ref_set[s].push_front(blk);
        lookup(a, 0, h, d);
        check(h && d == pat(a), "random fill");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
