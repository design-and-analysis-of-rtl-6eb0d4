// tb_fim: checks the FIFO Interface Module against WFIFO control structs that
// the testbench sets up in a behavioural memory, playing the master processor
// and the software end of each channel. Checked: the one-cycle busy_ack of the
// configuration phase; acquire returns successive tokens and writes the
// port pointer back; the channel is full with one token left unused;
// acquire blocks until the software side frees a token (and for at least as
// long as it waits); stop ends a blocked acquire; release advances tail or
// head and is ignored with nothing acquired; availability result in the lsb
// of token_length; wrap-around from limit to base; an unconfigured port.
// A final random mix drives both ports of one channel against a pointer model.
module tb_fim;
  import vfc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          port_valid, rnw, stop, busy_ack;
  logic [AW-1:0] port_addr, token_addr, token_length;
  fim_req_e      request;
  ldst_req_t     mreq;
  mem_rsp_t      mrsp;

  fim dut (.clk, .rst_n, .port_valid, .port_addr, .rnw, .request, .stop, .busy_ack,
           .token_addr, .token_length, .mem_req(mreq), .mem_rsp(mrsp));
  mem_model #(.NPORTS(1), .WORDS(4096), .LAT_MIN(1), .LAT_MAX(5)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic logic [31:0] rd(logic [31:0] a); return u_mem.mem[a >> 2]; endfunction
  task automatic wr(input logic [31:0] a, input logic [31:0] d); u_mem.mem[a >> 2] = d; endtask

  // channel at C, buffer [B, B + n*T), ports at WP and RP
  task automatic make_chan(input logic [31:0] C, B, T, n, WP, RP);
    wr(C + 0, B); wr(C + 4, B + n * T); wr(C + 8, T); wr(C + 12, B); wr(C + 16, B);
    wr(WP, C); wr(WP + 4, B);
    wr(RP, C); wr(RP + 4, B);
  endtask

  task automatic configure(input logic [31:0] pa, input logic r);
    int high = 0;
    @(negedge clk);
    port_valid = 1; port_addr = pa; rnw = r;
    while (!busy_ack) @(negedge clk);
    while (busy_ack) begin high++; @(negedge clk); port_valid = 0; end
    port_valid = 0;
    check(high == 1, $sformatf("configuration busy_ack high for %0d cycles", high));
  endtask

  task automatic fim_req(input fim_req_e q, input logic r, output int cycles);
    int c0;
    @(negedge clk);
    request = q; rnw = r; c0 = cyc;
    while (!busy_ack) @(negedge clk);
    request = FIM_NONE;
    while (busy_ack) @(negedge clk);
    cycles = cyc - c0;
  endtask

  localparam logic [31:0] C1 = 32'h100, B1 = 32'h1000, T1 = 64, W1 = 32'h200, R1 = 32'h220;
  localparam logic [31:0] C2 = 32'h300, B2 = 32'h2000, T2 = 32, W2 = 32'h400, R2 = 32'h420;
  localparam logic [31:0] C3 = 32'h500, B3 = 32'h3000, T3 = 16, N3 = 5, W3 = 32'h600, R3 = 32'h620;

  function automatic logic [31:0] nxt3(logic [31:0] a);
    return (a + T3 == B3 + N3 * T3) ? B3 : a + T3;
  endfunction

  initial begin
    int cy;
    port_valid = 0; port_addr = 0; rnw = 0; request = FIM_NONE; stop = 0;
    // stay in reset until a request left over from the random power-up state
    // has drained, then load the memory (the model clears it at time 0)
    repeat (12) @(posedge clk);
    make_chan(C1, B1, T1, 4, W1, R1);
    make_chan(C2, B2, T2, 8, W2, R2);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------- FIM as writer of channel 1 ----------
    configure(W1, 0);
    fim_req(FIM_AVAIL, 0, cy);
    check(token_length[0] == 1, "room available in an empty channel");
    for (int i = 0; i < 3; i++) begin
      fim_req(FIM_ACQUIRE, 0, cy);
      check(token_addr == B1 + i * T1 && token_length == T1,
            $sformatf("room %0d at %h len %0d", i, token_addr, token_length));
      check(rd(W1 + 4) == B1 + (i + 1) * T1, "write-port pointer written back");
    end
    fim_req(FIM_AVAIL, 0, cy);
    check(token_length[0] == 0, "no room: one token stays unused");
    // blocked acquire, ended by stop
    fork
      fim_req(FIM_ACQUIRE, 0, cy);
      begin repeat (100) @(negedge clk); stop = 1; while (busy_ack) @(negedge clk); stop = 0; end
    join
    check(cy >= 100, $sformatf("acquire on a full channel blocked only %0d cycles", cy));
    check(rd(W1 + 4) == B1 + 3 * T1, "stopped acquire left the pointer alone");
    // release the three rooms: tail advances
    for (int i = 0; i < 3; i++) begin
      fim_req(FIM_RELEASE, 0, cy);
      check(rd(C1 + 16) == B1 + (i + 1) * T1, $sformatf("tail after release %0d is %h", i, rd(C1 + 16)));
    end
    fim_req(FIM_RELEASE, 0, cy);
    check(rd(C1 + 16) == B1 + 3 * T1, "release with nothing acquired is ignored");
    // software reader consumes two tokens
    wr(C1 + 12, B1 + 2 * T1);
    fim_req(FIM_ACQUIRE, 0, cy);
    check(token_addr == B1 + 3 * T1, "room before the wrap");
    fim_req(FIM_ACQUIRE, 0, cy);
    check(token_addr == B1, $sformatf("room wraps to base: %h", token_addr));
    // next room would reach head: blocks until software frees one
    fork
      fim_req(FIM_ACQUIRE, 0, cy);
      begin repeat (60) @(negedge clk); wr(C1 + 12, B1 + 3 * T1); end
    join
    check(cy >= 60 && token_addr == B1 + T1, $sformatf("blocked acquire took %0d cycles, token %h", cy, token_addr));
    fim_req(FIM_RELEASE, 0, cy);
    check(rd(C1 + 16) == B1, $sformatf("tail wraps to base: %h", rd(C1 + 16)));
    fim_req(FIM_RELEASE, 0, cy);
    check(rd(C1 + 16) == B1 + T1, "tail after the wrap");

    // ---------- FIM as reader of channel 2 ----------
    configure(R2, 1);
    fim_req(FIM_AVAIL, 1, cy);
    check(token_length[0] == 0, "no data in an empty channel");
    fork
      fim_req(FIM_ACQUIRE, 1, cy);
      begin repeat (40) @(negedge clk); wr(C2 + 16, B2 + 2 * T2); end   // software wrote two tokens
    join
    check(cy >= 40 && token_addr == B2 && token_length == T2, "data acquire waits for the writer");
    fim_req(FIM_AVAIL, 1, cy);
    check(token_length[0] == 1, "second token available");
    fim_req(FIM_RELEASE, 1, cy);
    check(rd(C2 + 12) == B2 + T2, "head advanced by release on the read port");
    // skip: acquire then release at once
    fim_req(FIM_ACQUIRE, 1, cy);
    check(token_addr == B2 + T2, "second data token");
    fim_req(FIM_RELEASE, 1, cy);
    check(rd(C2 + 12) == B2 + 2 * T2 && rd(R2 + 4) == B2 + 2 * T2, "token skipped");
    // the write port of channel 1 is still usable alongside
    fim_req(FIM_AVAIL, 0, cy);
    check(token_addr == B1 + 2 * T1 && token_length[0] == 0,
          "write port of channel 1 still configured, its next room blocked by head");

    // ---------- random mix on channel 3, FIM on both ends ----------
    // A reference model of the pointers predicts every result; a request that
    // would block is replaced by an availability check that must say 0.
    make_chan(C3, B3, T3, N3, W3, R3);
    configure(W3, 0);
    configure(R3, 1);
    begin
      logic [31:0] m_head, m_tail, m_room, m_data;
      int n_room, n_data, n_blk, n_wrap;
      n_room = 0; n_data = 0; n_blk = 0; n_wrap = 0;
      m_head = B3; m_tail = B3; m_room = B3; m_data = B3;
      for (int n = 0; n < 600; n++) begin
        int unsigned op;
        op = $urandom_range(5, 0);
        case (op)
          0: if (nxt3(m_room) != m_head) begin            // acquire room
               fim_req(FIM_ACQUIRE, 0, cy);
               check(token_addr == m_room && token_length == T3,
                     $sformatf("random: room %h, expected %h", token_addr, m_room));
               if (nxt3(m_room) == B3) n_wrap++;
               m_room = nxt3(m_room); n_room++;
             end else begin
               fim_req(FIM_AVAIL, 0, cy);
               check(token_length[0] == 0, "random: full channel reports no room");
               n_blk++;
             end
          1: begin                                          // release room
               fim_req(FIM_RELEASE, 0, cy);
               if (n_room > 0) begin m_tail = nxt3(m_tail); n_room--; end
               check(rd(C3 + 16) == m_tail, $sformatf("random: tail %h, expected %h", rd(C3 + 16), m_tail));
             end
          2: if (m_data != m_tail) begin                    // acquire data
               fim_req(FIM_ACQUIRE, 1, cy);
               check(token_addr == m_data && token_length == T3,
                     $sformatf("random: data %h, expected %h", token_addr, m_data));
               m_data = nxt3(m_data); n_data++;
             end else begin
               fim_req(FIM_AVAIL, 1, cy);
               check(token_length[0] == 0, "random: empty channel reports no data");
               n_blk++;
             end
          3: begin                                          // release data
               fim_req(FIM_RELEASE, 1, cy);
               if (n_data > 0) begin m_head = nxt3(m_head); n_data--; end
               check(rd(C3 + 12) == m_head, $sformatf("random: head %h, expected %h", rd(C3 + 12), m_head));
             end
          4: begin
               fim_req(FIM_AVAIL, 0, cy);
               check(token_length[0] == (nxt3(m_room) != m_head), "random: room availability");
             end
          default: begin
               fim_req(FIM_AVAIL, 1, cy);
               check(token_length[0] == (m_data != m_tail), "random: data availability");
             end
        endcase
      end
      check(n_blk > 0 && n_wrap > 1, $sformatf("random mix saw %0d full/empty cases, %0d wraps", n_blk, n_wrap));
    end

    // ---------- unconfigured port after reset ----------
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    fim_req(FIM_AVAIL, 1, cy);
    check(token_length[0] == 0, "availability on an unconfigured port is 0");
    fork
      fim_req(FIM_ACQUIRE, 0, cy);
      begin repeat (80) @(negedge clk); stop = 1; while (busy_ack) @(negedge clk); stop = 0; end
    join
    check(cy >= 80, "acquire on an unconfigured port stays busy until stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
