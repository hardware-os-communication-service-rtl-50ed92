// tb_dyn_memory_task: self-checking test of the dynamic memory task wrapper.
// While not configured, commands are ignored, the status reads zero and no
// network handshake is offered even with traffic present. Once configured
// in PRR 6 it stores a channel and sends it back, with its source address
// equal to PRR 6; after being de-configured it is idle again and its stored
// count is gone (it restarts from reset).
module tb_dyn_memory_task;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0, configured;
  mt_cmd_t cmd;
  mt_stat_t stat;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  flit_t rx_flit, tx_flit;
  int checks = 0, failures = 0;
  word_t words[$];
  int got = 0;

  dyn_memory_task #(.DEPTH(32)) dut (.clk, .rst_n, .configured, .prr_addr(3'd6), .cmd, .stat,
    .rx_valid, .rx_ready, .rx_flit, .tx_valid, .tx_ready, .tx_flit);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    checks++;
    if (got >= words.size() || tx_flit.data !== words[got] || tx_flit.src !== 3'd6 ||
        tx_flit.dest !== 3'd0 || tx_flit.last !== (got == words.size() - 1)) begin
      failures++; $display("bad flit %h", tx_flit);
    end
    got++;
  end

  initial begin
    configured = 0; cmd = '0; rx_valid = 0; rx_flit = '0; tx_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // not configured: isolated
    cmd.valid = 1; cmd.op = MT_RECV; cmd.ch = 4'd2;
    rx_valid = 1; rx_flit.ch = 4'd2;
    repeat (4) begin
      @(negedge clk);
      chk(stat == '0 && !rx_ready && !tx_valid, "isolated while not configured");
    end
    cmd = '0; rx_valid = 0;
    configured = 1;
    @(negedge clk);
    @(negedge clk);
    chk(stat.idle, "idle once configured");
    cmd.valid = 1; cmd.op = MT_RECV; cmd.ch = 4'd2;
    @(negedge clk);
    cmd = '0;
    while (!stat.rx_open) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      rx_valid = 1; rx_flit = '0; rx_flit.ch = 4'd2; rx_flit.data = $urandom; rx_flit.last = (i == 9);
      words.push_back(rx_flit.data);
      @(negedge clk);
    end
    rx_valid = 0;
    @(negedge clk);
    chk(stat.idle, "stored");
    cmd.valid = 1; cmd.op = MT_SEND; cmd.peer = 3'd0;
    @(negedge clk);
    cmd = '0;
    repeat (20) @(negedge clk);
    chk(got == 10, $sformatf("sent %0d", got));
    configured = 0;
    repeat (2) @(negedge clk);
    chk(stat == '0 && !tx_valid, "isolated again");
    configured = 1;
    repeat (2) @(negedge clk);
    cmd.valid = 1; cmd.op = MT_SEND; cmd.peer = 3'd0;
    @(negedge clk);
    cmd = '0;
    repeat (10) @(negedge clk);
    chk(got == 10, "nothing left after re-configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
