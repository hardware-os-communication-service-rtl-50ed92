// tb_memory_task: self-checking test of the memory task (LM_FSM, network
// interface, BRAM). A Recv command opens channel 5; rx_open must rise two
// cycles later. A stream of channel-5 words, interleaved with words of
// another channel that must be dropped, ends with a last-flagged word;
// recv_done and the stored count are checked. A Send command to PRR 3 must
// return exactly the stored words, in order, as flits from the task's own
// address on channel 5, the final one marked last, under random
// back-pressure, followed by send_done. A second run overfills a small
// memory and checks the overflow flag and the count.
module tb_memory_task;
  import hwos_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  mt_cmd_t cmd;
  mt_stat_t stat;
  logic [$clog2(DEPTH+1)-1:0] stored_words;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  flit_t rx_flit, tx_flit;
  int checks = 0, failures = 0;
  word_t exp_q[$];
  int n_rx, n_sent_done;

  memory_task #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .my_addr(3'd4), .cmd, .stat, .stored_words,
    .rx_valid, .rx_ready, .rx_flit, .tx_valid, .tx_ready, .tx_flit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_cmd(mt_op_e op, ch_t ch, port_t peer);
    cmd.valid = 1; cmd.op = op; cmd.ch = ch; cmd.peer = peer;
    @(negedge clk);
    cmd = '0;
  endtask

  task automatic stream(int n, ch_t ch, bit keep);
    for (int i = 0; i < n; i++) begin
      word_t w;
      if ($urandom_range(0, 3) == 0) begin   // foreign channel word
        rx_valid = 1; rx_flit = '0; rx_flit.ch = ch + 1'b1; rx_flit.data = $urandom; rx_flit.last = 1;
        @(negedge clk);
      end
      w = $urandom;
      rx_valid = 1; rx_flit = '0; rx_flit.ch = ch; rx_flit.src = 3'd1; rx_flit.dest = 3'd4;
      rx_flit.data = w; rx_flit.last = (i == n - 1);
      if (keep) exp_q.push_back(w);
      @(negedge clk);
    end
    rx_valid = 0;
  endtask

  // receive side
  int rx_idx;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    checks++;
    if (exp_q.size() == 0 || tx_flit.data !== exp_q[0] || tx_flit.ch !== 4'd5 ||
        tx_flit.dest !== 3'd3 || tx_flit.src !== 3'd4 || tx_flit.last !== (exp_q.size() == 1)) begin
      failures++;
      $display("bad flit %h", tx_flit);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    n_rx++;
  end
  always @(posedge clk) if (rst_n && stat.send_done) n_sent_done++;
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  initial begin
    int lat;
    cmd = '0; rx_valid = 0; rx_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(stat.idle && !stat.rx_open, "idle after reset");
    send_cmd(MT_RECV, 4'd5, 3'd0);
    lat = 1;
    while (!stat.rx_open) begin @(negedge clk); lat++; end
    chk(lat == 2, $sformatf("rx_open after %0d cycles", lat));
    stream(40, 4'd5, 1);
    @(negedge clk);
    chk(stat.idle, "idle after last word");
    chk(stored_words == 40, $sformatf("stored %0d", stored_words));
    chk(!stat.overflow, "no overflow");
    // stray words while idle are dropped
    stream(3, 4'd5, 0);
    chk(stored_words == 40, "stray words ignored");
    send_cmd(MT_SEND, 4'd0, 3'd3);
    while (n_sent_done == 0) @(negedge clk);
    chk(n_rx == 40, $sformatf("sent %0d words", n_rx));
    chk(exp_q.size() == 0, "all words sent");
    @(negedge clk);
    chk(stat.idle, "idle after close");
    // overflow
    send_cmd(MT_RECV, 4'd5, 3'd0);
    repeat (3) @(negedge clk);
    stream(DEPTH + 5, 4'd5, 0);
    @(negedge clk);
    chk(stat.overflow, "overflow flagged");
    chk(stored_words == DEPTH, $sformatf("stored %0d after overflow", stored_words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
