// tb_comm_service: self-checking test of the communication service with
// behavioural memory tasks (one per memory id: Recv opens the receive state
// two cycles later, the test ends reception with recv_done, Send is answered
// with send_done a few cycles later). It plays the three-task example of
// the document (T1 and T3 sharing PRR1, T2 in PRR2, channels c1..c3) with
// its expected answers and set-up times (5 cycles direct, 11 via the LM),
// then a blocked writer while the LM is taken, escalated to the scheduler
// which configures a DM in PRR8, a reader served by that DM and its
// release, a denial (global memory), calls from five PRRs at the same
// time, and checks that the LM's own slot takes no calls.
module tb_comm_service;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic      sc_valid[NPORTS], sc_ready[NPORTS], resp_valid[NPORTS];
  syscall_t  sc_req[NPORTS];
  sc_resp_t  resp[NPORTS];
  mt_cmd_t   lm_cmd, dm_cmd[NPORTS];
  mt_stat_t  lm_stat, dm_stat[NPORTS];
  logic [NPORTS-1:0] prr_is_dm, dm_release;
  logic      dm_req, dm_grant, dm_deny;
  port_t     dm_req_prr;
  ch_t       dm_req_ch;
  logic [NMEM-1:0] mem_busy;

  comm_service #(.LM_PORT(3'd4)) dut (.clk, .rst_n, .sc_valid, .sc_ready, .sc_req, .resp_valid, .resp,
    .lm_cmd, .lm_stat, .dm_cmd, .dm_stat, .prr_is_dm, .dm_req, .dm_req_prr, .dm_req_ch,
    .dm_grant, .dm_deny, .dm_release, .mem_busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural memories: index 0 = LM, 1+k = DM in PRR k
  mt_cmd_t  mcmd [NMEM];
  mt_stat_t mstat[NMEM];
  int       mst  [NMEM];   // 0 idle, 1 open, 2 recv, 3 sending
  int       mcnt [NMEM];
  bit       fin_recv[NMEM];
  port_t    msend_peer[NMEM];
  int       n_send[NMEM], n_release[NPORTS];

  always_comb begin
    mcmd[0] = lm_cmd;
    lm_stat = mstat[0];
    for (int k = 0; k < NPORTS; k++) begin
      mcmd[k+1] = dm_cmd[k];
      dm_stat[k] = mstat[k+1];
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NMEM; m++) begin
      mstat[m].recv_done <= 1'b0;
      mstat[m].send_done <= 1'b0;
      case (mst[m])
        0: if (mcmd[m].valid) begin
             if (mcmd[m].op == MT_RECV) mst[m] <= 1;
             else begin mst[m] <= 3; mcnt[m] <= 6; msend_peer[m] <= mcmd[m].peer; n_send[m]++; end
           end
        1: mst[m] <= 2;
        2: if (fin_recv[m]) begin mst[m] <= 0; mstat[m].recv_done <= 1'b1; end
        3: if (mcnt[m] == 0) begin mst[m] <= 0; mstat[m].send_done <= 1'b1; end
           else mcnt[m] <= mcnt[m] - 1;
        default: mst[m] <= 0;
      endcase
    end
    for (int k = 0; k < NPORTS; k++) if (dm_release[k]) n_release[k]++;
  end
  always_comb
    for (int m = 0; m < NMEM; m++) begin
      mstat[m].idle = (mst[m] == 0);
      mstat[m].rx_open = (mst[m] == 2);
      mstat[m].overflow = 1'b0;
    end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_call(int p, sc_op_e op, sc_mode_e mode, ch_t ch, sc_status_e st, port_t peer,
                             int want_lat, string what);
    int lat;
    sc_valid[p] = 1; sc_req[p].op = op; sc_req[p].mode = mode; sc_req[p].ch = ch;
    #1;
    while (!sc_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk);
    sc_valid[p] = 0;
    lat = 2;
    while (!resp_valid[p]) begin @(negedge clk); lat++; end
    chk(resp[p].status == st, $sformatf("%s: status %0d want %0d", what, resp[p].status, st));
    if (st inside {RS_DIRECT, RS_MEM})
      chk(resp[p].peer == peer, $sformatf("%s: peer %0d want %0d", what, resp[p].peer, peer));
    if (want_lat > 0) chk(lat == want_lat, $sformatf("%s: latency %0d want %0d", what, lat, want_lat));
    @(negedge clk);
  endtask

  task automatic finish_recv(int m);
    repeat (4) @(negedge clk);
    fin_recv[m] = 1;
    @(negedge clk);
    fin_recv[m] = 0;
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) begin sc_valid[p] = 0; sc_req[p] = '0; n_release[p] = 0; end
    for (int m = 0; m < NMEM; m++) begin mst[m] = 0; mcnt[m] = 0; fin_recv[m] = 0; n_send[m] = 0; end
    for (int m = 0; m < NMEM; m++) mstat[m] = '0;
    prr_is_dm = '0; dm_grant = 0; dm_deny = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // --- three-task example: T1 in PRR1 (0), T2 in PRR2 (1), later T3 in PRR1
    expect_call(1, SC_OPEN, MODE_R, 4'd1, RS_OK, 3'd0, 5, "T2 OPEN(c1,r)");
    expect_call(0, SC_OPEN, MODE_W, 4'd1, RS_DIRECT, 3'd1, 5, "T1 OPEN(c1,w)");
    expect_call(0, SC_CLOSE, MODE_W, 4'd1, RS_OK, 3'd0, 5, "T1 CLOSE(c1)");
    expect_call(1, SC_CLOSE, MODE_R, 4'd1, RS_OK, 3'd0, 5, "T2 CLOSE(c1)");
    expect_call(0, SC_OPEN, MODE_W, 4'd2, RS_MEM, 3'd4, 11, "T1 OPEN(c2,w): blocked, LM");
    chk(mem_busy[0], "LM occupied");
    finish_recv(0);
    expect_call(0, SC_CLOSE, MODE_W, 4'd2, RS_OK, 3'd0, 5, "T1 CLOSE(c2)");
    // T3 configured in PRR1
    expect_call(0, SC_OPEN, MODE_R, 4'd2, RS_MEM, 3'd4, 5, "T3 OPEN(c2,r)");
    expect_call(0, SC_OPEN, MODE_R, 4'd3, RS_OK, 3'd0, 5, "T3 OPEN(c3,r)");
    repeat (10) @(negedge clk);
    chk(n_send[0] == 1 && msend_peer[0] == 3'd0, "LM sends c2 to PRR1");
    expect_call(0, SC_CLOSE, MODE_R, 4'd2, RS_OK, 3'd0, 5, "T3 CLOSE(c2)");
    @(negedge clk);
    chk(!mem_busy[0], "LM free after the reader closed");
    expect_call(1, SC_OPEN, MODE_W, 4'd3, RS_DIRECT, 3'd0, 5, "T2 OPEN(c3,w)");
    expect_call(1, SC_CLOSE, MODE_W, 4'd3, RS_OK, 3'd0, 5, "T2 CLOSE(c3)");
    expect_call(0, SC_CLOSE, MODE_R, 4'd3, RS_OK, 3'd0, 5, "T3 CLOSE(c3)");
    // --- LM taken, second blocked writer: scheduler configures a DM in PRR8 (7)
    expect_call(2, SC_OPEN, MODE_W, 4'd5, RS_MEM, 3'd4, 11, "PRR3 OPEN(5,w): LM");
    fork
      expect_call(3, SC_OPEN, MODE_W, 4'd6, RS_MEM, 3'd7, 0, "PRR4 OPEN(6,w): DM");
      begin
        while (!dm_req) @(negedge clk);
        chk(dm_req_prr == 3'd3 && dm_req_ch == 4'd6, "scheduler told who and which channel");
        repeat (5) @(negedge clk);
        prr_is_dm[7] = 1; dm_grant = 1;
        @(negedge clk);
        dm_grant = 0;
      end
    join
    chk(mem_busy[8], "DM in PRR8 occupied");
    // a third writer: DM busy too -> denied
    fork
      expect_call(5, SC_OPEN, MODE_W, 4'd7, RS_GLOBAL, 3'd0, 0, "PRR6 OPEN(7,w): global memory");
      begin
        while (!dm_req) @(negedge clk);
        dm_deny = 1;
        @(negedge clk);
        dm_deny = 0;
      end
    join
    finish_recv(8);
    expect_call(6, SC_OPEN, MODE_R, 4'd6, RS_MEM, 3'd7, 5, "PRR7 OPEN(6,r) from DM");
    repeat (10) @(negedge clk);
    chk(n_send[8] == 1 && msend_peer[8] == 3'd6, "DM sends to PRR7");
    expect_call(6, SC_CLOSE, MODE_R, 4'd6, RS_OK, 3'd0, 5, "PRR7 CLOSE(6,r)");
    repeat (2) @(negedge clk);
    chk(n_release[7] == 1 && !mem_busy[8], "DM released to the scheduler");
    prr_is_dm[7] = 0;
    // --- five PRRs at once
    fork
      expect_call(0, SC_OPEN, MODE_R, 4'd8,  RS_OK, 3'd0, 0, "c0");
      expect_call(1, SC_OPEN, MODE_R, 4'd9,  RS_OK, 3'd0, 0, "c1");
      expect_call(3, SC_OPEN, MODE_R, 4'd10, RS_OK, 3'd0, 0, "c3");
      expect_call(6, SC_OPEN, MODE_R, 4'd11, RS_OK, 3'd0, 0, "c6");
      expect_call(7, SC_OPEN, MODE_R, 4'd12, RS_OK, 3'd0, 0, "c7");
    join
    expect_call(7, SC_OPEN, MODE_W, 4'd8, RS_DIRECT, 3'd0, 5, "after contention");
    // --- the LM's slot takes no calls
    sc_valid[4] = 1;
    repeat (3) @(negedge clk);
    chk(!sc_ready[4] && !resp_valid[4], "no csFSM in the LM slot");
    sc_valid[4] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
