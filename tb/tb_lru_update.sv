// tb_lru_update: checks the LRU counter rules for 2 and 4 ways against a
// recency-list reference model. For random sequences of hits, fills and
// invalidations, the counter of every valid way must equal its rank in the
// recency list (0 = most recent), invalid ways must hold 0, and the victim
// must be the lowest invalid way or, in a full set, the least recently used.
module tb_lru_update;
  import vfc_pkg::*;

  int checks = 0, failures = 0;


  // ---- 2-way instance ----
  logic [1:0]       v2;
  logic [1:0][0:0]  c2, n2;
  lru_op_e          op2;
  logic [0:0]       w2, vic2;
  logic             f2;
  lru_update #(.NUM_WAYS(2)) dut2 (.valid(v2), .cnt(c2), .op(op2), .way(w2),
                                   .cnt_next(n2), .victim(vic2), .set_full(f2));
  // ---- 4-way instance ----
  logic [3:0]       v4;
  logic [3:0][1:0]  c4, n4;
  lru_op_e          op4;
  logic [1:0]       w4, vic4;
  logic             f4;
  lru_update #(.NUM_WAYS(4)) dut4 (.valid(v4), .cnt(c4), .op(op4), .way(w4),
                                   .cnt_next(n4), .victim(vic4), .set_full(f4));

  // reference: recency list of valid ways, index 0 = most recent
  int order2[$], order4[$];

  function automatic int rank(ref int q[$], input int w);
    foreach (q[i]) if (q[i] == w) return i;
    return -1;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nways, w, r, exp_vic;
    bit   vld [4];
    v2 = '0; c2 = '0; op2 = LRU_NONE; w2 = '0;
    v4 = '0; c4 = '0; op4 = LRU_NONE; w4 = '0;
    for (int inst = 0; inst < 2; inst++) begin
      nways = inst == 0 ? 2 : 4;
      for (int i = 0; i < 4; i++) vld[i] = 0;
      if (inst == 0) order2.delete(); else order4.delete();
      for (int step = 0; step < 3000; step++) begin
        int kind;
        // expected victim
        exp_vic = -1;
        for (int i = nways - 1; i >= 0; i--) if (!vld[i]) exp_vic = i;
        if (exp_vic < 0) exp_vic = (inst == 0) ? order2[nways-1] : order4[nways-1];
        // pick an operation
        kind = $urandom_range(2, 0);
        if (kind == 0) begin  // fill the victim
          w = exp_vic;
        end else begin        // hit or invalidate a valid way, if any
          int q[$];
          q.delete();
          for (int i = 0; i < nways; i++) if (vld[i]) q.push_back(i);
          if (q.size() == 0) begin kind = 0; w = exp_vic; end
          else w = q[$urandom_range(q.size() - 1, 0)];
        end
        if (inst == 0) begin
          op2 = kind == 0 ? LRU_FILL : (kind == 1 ? LRU_HIT : LRU_INVAL);
          w2 = w[0:0];
        end else begin
          op4 = kind == 0 ? LRU_FILL : (kind == 1 ? LRU_HIT : LRU_INVAL);
          w4 = w[1:0];
        end
        #1;
        checks++;
        if ((inst == 0 ? int'(vic2) : int'(vic4)) != exp_vic) begin
          failures++;
          $display("inst %0d step %0d: victim %0d expected %0d", inst, step,
                   inst == 0 ? int'(vic2) : int'(vic4), exp_vic);
        end
        // update reference
        if (inst == 0) begin
          r = rank(order2, w);
          if (r >= 0) order2.delete(r);
          if (kind != 2) order2.push_front(w);
        end else begin
          r = rank(order4, w);
          if (r >= 0) order4.delete(r);
          if (kind != 2) order4.push_front(w);
        end
        vld[w] = (kind != 2);
        // apply DUT next state and compare with ranks
        if (inst == 0) begin
          c2 = n2; v2[w] = vld[w];
        end else begin
          c4 = n4; v4[w] = vld[w];
        end
        #1;
        for (int i = 0; i < nways; i++) begin
          int expc, got;
          expc = vld[i] ? (inst == 0 ? rank(order2, i) : rank(order4, i)) : 0;
          got  = inst == 0 ? int'(c2[i]) : int'(c4[i]);
          checks++;
          if (got != expc) begin
            failures++;
            if (failures < 10) $display("inst %0d step %0d way %0d: cnt %0d expected %0d",
                                        inst, step, i, got, expc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
