// tb_lm_fsm: self-checking test of the CS-side memory monitor. A small
// behavioural memory task answers Recv with rx_open two cycles later, and
// reports recv_done / send_done when the test says so. Checked: commands
// for other memories are ignored; MC_RECV gives one Recv command with the
// channel and `opened` five cycles after the bus command; busy stays high;
// an MC_SEND that arrives while data is still coming in is held until
// recv_done and then forwarded with the peer; the monitor stays busy after
// sending until MC_RELEASE, then pulses `released` and can be reused.
module tb_lm_fsm;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0;
  mc_bus_t mc;
  mt_cmd_t mt_cmd;
  mt_stat_t mt_stat;
  logic busy, opened, released;
  ch_t cur_ch;
  int checks = 0, failures = 0;
  int n_recv_cmd = 0, n_send_cmd = 0, n_rel = 0;
  mt_cmd_t last_cmd;

  lm_fsm dut (.clk, .rst_n, .my_id(4'd0), .mc, .mt_cmd, .mt_stat, .busy, .opened, .released, .cur_ch);

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

  // behavioural memory task
  int mstate = 0;  // 0 idle, 1 open, 2 recv
  bit p_recv_done = 0, p_send_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (mt_cmd.valid) begin
      last_cmd <= mt_cmd;
      if (mt_cmd.op == MT_RECV) begin n_recv_cmd++; mstate <= 1; end
      else n_send_cmd++;
    end else if (mstate == 1) mstate <= 2;
    if (released) n_rel++;
  end
  always_comb begin
    mt_stat = '0;
    mt_stat.rx_open = (mstate == 2);
    mt_stat.idle = (mstate == 0);
    mt_stat.recv_done = p_recv_done;
    mt_stat.send_done = p_send_done;
  end

  task automatic bus(mc_cmd_e c, mem_id_t t, ch_t ch, port_t peer);
    mc.valid = 1; mc.cmd = c; mc.target = t; mc.ch = ch; mc.peer = peer;
    @(negedge clk);
    mc = '0;
  endtask

  initial begin
    int lat;
    mc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy, "free after reset");
    bus(MC_RECV, 4'd3, 4'd7, 3'd0);   // other memory
    repeat (3) @(negedge clk);
    chk(!busy && n_recv_cmd == 0, "other target ignored");
    mc.valid = 1; mc.cmd = MC_RECV; mc.target = 4'd0; mc.ch = 4'd9;
    @(negedge clk);
    mc = '0;
    lat = 1;
    while (!opened) begin @(negedge clk); lat++; end
    chk(lat == 5, $sformatf("opened after %0d cycles", lat));
    chk(n_recv_cmd == 1 && last_cmd.ch == 4'd9 && cur_ch == 4'd9, "Recv command with channel");
    chk(busy, "busy while receiving");
    bus(MC_SEND, 4'd0, 4'd9, 3'd6);
    repeat (5) @(negedge clk);
    chk(n_send_cmd == 0, "send held until all data stored");
    mstate = 0;
    p_recv_done = 1;
    @(negedge clk);
    p_recv_done = 0;
    repeat (4) @(negedge clk);
    chk(n_send_cmd == 1 && last_cmd.op == MT_SEND && last_cmd.peer == 3'd6, "send forwarded with peer");
    p_send_done = 1;
    @(negedge clk);
    p_send_done = 0;
    repeat (4) @(negedge clk);
    chk(busy && n_rel == 0, "occupied until the reader closes");
    bus(MC_RELEASE, 4'd0, 4'd9, 3'd6);
    repeat (3) @(negedge clk);
    chk(!busy && n_rel == 1, "released");
    // reuse
    bus(MC_RECV, 4'd0, 4'd1, 3'd0);
    repeat (8) @(negedge clk);
    chk(busy && n_recv_cmd == 2 && cur_ch == 4'd1, "reused for a new channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
