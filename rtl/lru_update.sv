// lru_update: next-state logic of the LRU counters of one cache set.
//
// Every way has a counter of clog2(NUM_WAYS) bits; 0 is the most recently used
// way. On a hit, the hit way goes to 0 and every valid way whose counter was
// below the hit way's counter is incremented. On a fill, the new block's way
// goes to 0 and every other valid way is incremented. In a full set the victim
// is the way whose counter is all ones (NUM_WAYS-1); otherwise the victim is an
// invalid way. Invalid ways always hold 0. These rules are those published for
// the cache. This design adds two choices: a fill uses the lowest-numbered
// invalid way, and invalidating a way clears its counter and decrements the
// valid ways above it, so the counters of the valid ways stay distinct.
// Purely combinational; the caller stores the counters.
module lru_update
  import vfc_pkg::*;
#(
  parameter int unsigned NUM_WAYS = 2,
  localparam int unsigned CW = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1,
  localparam int unsigned WW = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1
) (
  input  logic [NUM_WAYS-1:0]         valid,
  input  logic [NUM_WAYS-1:0][CW-1:0] cnt,
  input  lru_op_e                     op,
  input  logic [WW-1:0]               way,
  output logic [NUM_WAYS-1:0][CW-1:0] cnt_next,
  output logic [WW-1:0]               victim,
  output logic                        set_full
);

  always_comb begin
    set_full = &valid;
    victim   = '0;
    if (set_full) begin
      for (int i = NUM_WAYS - 1; i >= 0; i--)
        if (cnt[i] == CW'(NUM_WAYS - 1)) victim = WW'(i);
    end else begin
      for (int i = NUM_WAYS - 1; i >= 0; i--)
        if (!valid[i]) victim = WW'(i);
    end
  end

  always_comb begin
    cnt_next = cnt;
    unique case (op)
      LRU_HIT: begin
        for (int i = 0; i < NUM_WAYS; i++)
          if (valid[i] && WW'(i) != way && cnt[i] < cnt[way]) cnt_next[i] = cnt[i] + 1'b1;
        cnt_next[way] = '0;
      end
      LRU_FILL: begin
        for (int i = 0; i < NUM_WAYS; i++)
          if (valid[i] && WW'(i) != way) cnt_next[i] = cnt[i] + 1'b1;
        cnt_next[way] = '0;
      end
      LRU_INVAL: begin
        for (int i = 0; i < NUM_WAYS; i++)
          if (valid[i] && WW'(i) != way && cnt[i] > cnt[way]) cnt_next[i] = cnt[i] - 1'b1;
        cnt_next[way] = '0;
      end
      default: ;
    endcase
    for (int i = 0; i < NUM_WAYS; i++)
      if (!valid[i] && !(op == LRU_FILL && WW'(i) == way)) cnt_next[i] = '0;
  end

endmodule
