// tb_vf_cache: checks the accelerator cache (main controller, read cache,
// write cache) in both published organisations of the 8 KB read cache:
// 2-way x 64 sets (the default) and 4-way x 32 sets, each with the 8-entry,
// 8-byte write cache. Each organisation runs the same directed and random
// test (see vf_cache_env) on its own memory; both run side by side and the
// results are summed. A watchdog ends a run that hangs.
module tb_vf_cache;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks2, failures2, checks4, failures4;
  bit done2, done4;

  vf_cache_env #(.NUM_WAYS(2), .NUM_SETS(64)) u_org1 (
    .clk, .checks(checks2), .failures(failures2), .finished(done2));
  vf_cache_env #(.NUM_WAYS(4), .NUM_SETS(32)) u_org2 (
    .clk, .checks(checks4), .failures(failures4), .finished(done4));

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks4, failures2 + failures4 + 1);
    $finish;
  end

  initial begin
    wait (done2 && done4);
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks4, failures2 + failures4);
    $finish;
  end

endmodule
