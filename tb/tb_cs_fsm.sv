// tb_cs_fsm: self-checking test of the per-PRR communication FSM. Two
// instances (PRR1 = address 0 and PRR4 = address 3) share a reference Shared
// Table, a lock and memory models kept by the test: the LM (memory 0) and
// other memories become busy on MC_RECV, report `opened` five cycles later
// and are freed by MC_RELEASE; the DM that PRR4's own FSM monitors is driven
// through its dm_cmd/dm_stat pins by a small behavioural memory. Checked:
// the answer and its latency (5 cycles, 11 when a memory is opened) for a
// reader open, a direct writer open, a blocked writer sent to the LM, a
// blocked writer sent to a DM after a scheduler grant, a scheduler denial
// (global memory), a reader open of buffered data (MC_SEND), a reader close
// (MC_RELEASE), illegal calls (RS_ERR) and a PRR holding a DM refusing
// calls while its monitor serves the DM.
module tb_cs_fsm;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic      sc_valid[2], sc_ready[2], resp_valid[2], lock_req[2], lock_gnt[2], st_we[2], dm_req[2];
  syscall_t  sc_req[2];
  sc_resp_t  resp[2];
  ch_t       st_rd_ch[2];
  st_entry_t st_wr[2], st_rd[2];
  mc_bus_t   mc_out[2], mc;
  logic [NMEM-1:0] mem_busy, mem_opened;
  logic [NPORTS-1:0] prr_is_dm;
  logic      dm_grant, dm_deny;
  mt_cmd_t   dm_cmd[2];
  mt_stat_t  dm_stat[2];
  logic      dm_busy[2], dm_opened[2], dm_released[2];
  localparam port_t IDS [2] = '{3'd0, 3'd3};

  st_entry_t tbl [NCH];
  int owner = -1;
  logic [NMEM-1:0] mbusy_model;
  int open_timer [NMEM];
  mc_bus_t bus_log[$];
  int dm_rx_cnt = 0, n_dm_recv_cmd = 0;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    cs_fsm #(.PRR_ID(IDS[i]), .LM_PORT(3'd4)) dut (
      .clk, .rst_n, .sc_valid(sc_valid[i]), .sc_ready(sc_ready[i]), .sc_req(sc_req[i]),
      .resp_valid(resp_valid[i]), .resp(resp[i]), .lock_req(lock_req[i]), .lock_gnt(lock_gnt[i]),
      .st_rd_ch(st_rd_ch[i]), .st_rd_entry(st_rd[i]), .st_we(st_we[i]), .st_wr_entry(st_wr[i]),
      .mc_out(mc_out[i]), .mc_in(mc), .mem_busy, .mem_opened, .prr_is_dm,
      .dm_req(dm_req[i]), .dm_grant, .dm_deny,
      .dm_cmd(dm_cmd[i]), .dm_stat(dm_stat[i]), .dm_busy(dm_busy[i]),
      .dm_opened(dm_opened[i]), .dm_released(dm_released[i]));
    assign st_rd[i] = tbl[st_rd_ch[i]];
    assign lock_gnt[i] = lock_req[i] && (owner == i || (owner < 0 && (i == 0 || !lock_req[0])));
  end

  always_comb begin
    mc = '0;
    if (mc_out[0].valid) mc = mc_out[0];
    if (mc_out[1].valid) mc = mc_out[1];
  end

  // memories: own DM of PRR4 is memory 4, modelled by the DUT's monitor
  always_comb begin
    mem_busy = mbusy_model;
    mem_opened = '0;
    for (int m = 0; m < NMEM; m++) mem_opened[m] = (open_timer[m] == 1);
    mem_busy[4] = dm_busy[1];
    mem_opened[4] = dm_opened[1];
    mem_busy[1] = dm_busy[0];
    mem_opened[1] = dm_opened[0];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) if (st_we[i]) tbl[st_rd_ch[i]] <= st_wr[i];
    if (owner < 0) begin
      if (lock_gnt[0]) owner <= 0; else if (lock_gnt[1]) owner <= 1;
    end else if (!lock_req[owner]) owner <= -1;
    for (int m = 0; m < NMEM; m++) if (open_timer[m] > 0) open_timer[m] <= open_timer[m] - 1;
    if (mc.valid) begin
      bus_log.push_back(mc);
      if (mc.cmd == MC_RECV) begin mbusy_model[mc.target] <= 1'b1; open_timer[mc.target] <= 5; end
      if (mc.cmd == MC_RELEASE) mbusy_model[mc.target] <= 1'b0;
    end
    if (dm_cmd[1].valid && dm_cmd[1].op == MT_RECV) begin n_dm_recv_cmd++; dm_rx_cnt <= 1; end
    else if (dm_rx_cnt > 0 && dm_rx_cnt < 3) dm_rx_cnt <= dm_rx_cnt - 1;
  end
  always_comb begin
    dm_stat[0] = '0;
    dm_stat[1] = '0;
    dm_stat[1].rx_open = (n_dm_recv_cmd > 0 && dm_rx_cnt == 0);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue one call on instance i; return the answer and the latency
  task automatic call(int i, sc_op_e op, sc_mode_e mode, ch_t ch, output sc_resp_t r, output int lat);
    sc_valid[i] = 1; sc_req[i].op = op; sc_req[i].mode = mode; sc_req[i].ch = ch;
    lat = 1;
    #1;
    while (!sc_ready[i]) begin @(negedge clk); #1; end
    @(negedge clk);
    sc_valid[i] = 0;
    lat = 2;
    while (!resp_valid[i]) begin @(negedge clk); lat++; end
    r = resp[i];
    @(negedge clk);
  endtask

  task automatic expect_call(int i, sc_op_e op, sc_mode_e mode, ch_t ch, sc_status_e st, port_t peer,
                             int want_lat, string what);
    sc_resp_t r;
    int lat;
    call(i, op, mode, ch, r, lat);
    chk(r.status == st, $sformatf("%s: status %0d want %0d", what, r.status, st));
    if (st inside {RS_DIRECT, RS_MEM})
      chk(r.peer == peer, $sformatf("%s: peer %0d want %0d", what, r.peer, peer));
    if (want_lat > 0) chk(lat == want_lat, $sformatf("%s: latency %0d want %0d", what, lat, want_lat));
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) tbl[c] = '0;
    for (int m = 0; m < NMEM; m++) open_timer[m] = 0;
    mbusy_model = '0; prr_is_dm = '0; dm_grant = 0; dm_deny = 0;
    for (int i = 0; i < 2; i++) begin sc_valid[i] = 0; sc_req[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. reader first
    expect_call(1, SC_OPEN, MODE_R, 4'd1, RS_OK, 3'd0, 5, "OPEN(1,r)");
    chk(tbl[1].r_open && tbl[1].r_prr == 3'd3, "reader recorded");
    // 2. writer finds the reader: direct
    expect_call(0, SC_OPEN, MODE_W, 4'd1, RS_DIRECT, 3'd3, 5, "OPEN(1,w) direct");
    // 3. writer without reader: LM
    expect_call(0, SC_OPEN, MODE_W, 4'd2, RS_MEM, 3'd4, 11, "OPEN(2,w) to LM");
    chk(bus_log.size() == 1 && bus_log[0].cmd == MC_RECV && bus_log[0].target == 0 && bus_log[0].ch == 4'd2,
        "MC_RECV to the LM");
    chk(tbl[2].in_mem && tbl[2].mem == 0 && tbl[2].w_open, "channel 2 buffered in LM");
    // 4. LM busy, no DM: scheduler grants a DM in PRR7 (memory 7)
    fork
      expect_call(0, SC_OPEN, MODE_W, 4'd3, RS_MEM, 3'd6, 0, "OPEN(3,w) to DM");
      begin
        while (!dm_req[0]) @(negedge clk);
        repeat (3) @(negedge clk);
        chk(dm_req[0], "request held until answered");
        prr_is_dm[6] = 1; dm_grant = 1;
        @(negedge clk);
        dm_grant = 0;
      end
    join
    chk(bus_log[$].cmd == MC_RECV && bus_log[$].target == 7, "MC_RECV to the DM in PRR7");
    // 5. everything busy, scheduler denies: global memory
    fork
      expect_call(0, SC_OPEN, MODE_W, 4'd4, RS_GLOBAL, 3'd0, 0, "OPEN(4,w) denied");
      begin
        while (!dm_req[0]) @(negedge clk);
        dm_deny = 1;
        @(negedge clk);
        dm_deny = 0;
      end
    join
    chk(!tbl[4].w_open && !tbl[4].in_mem, "denied channel left empty");
    // 6. reader of buffered data: LM sends
    expect_call(1, SC_OPEN, MODE_R, 4'd2, RS_MEM, 3'd4, 5, "OPEN(2,r) from LM");
    chk(bus_log[$].cmd == MC_SEND && bus_log[$].target == 0 && bus_log[$].peer == 3'd3, "MC_SEND to PRR4");
    // 7. illegal calls
    expect_call(0, SC_OPEN, MODE_W, 4'd2, RS_ERR, 3'd0, 5, "second writer");
    expect_call(1, SC_CLOSE, MODE_W, 4'd1, RS_ERR, 3'd0, 5, "close by non-owner");
    // 8. closes
    expect_call(0, SC_CLOSE, MODE_W, 4'd2, RS_OK, 3'd0, 5, "CLOSE(2,w)");
    expect_call(1, SC_CLOSE, MODE_R, 4'd2, RS_OK, 3'd0, 5, "CLOSE(2,r)");
    chk(bus_log[$].cmd == MC_RELEASE && bus_log[$].target == 0, "MC_RELEASE of the LM");
    chk(tbl[2] == '0, "channel 2 empty");
    // 9. both FSMs at once: served one after the other
    fork
      expect_call(0, SC_OPEN, MODE_W, 4'd9, RS_MEM, 3'd4, 0, "concurrent writer");
      expect_call(1, SC_OPEN, MODE_R, 4'd10, RS_OK, 3'd0, 0, "concurrent reader");
    join
    // 10. PRR4 hosts a DM: it takes no calls, its monitor serves the DM
    prr_is_dm[3] = 1;
    mbusy_model[0] = 1;  // LM still holding channel 9
    @(negedge clk);
    chk(!sc_ready[1], "no calls while the PRR holds a DM");
    prr_is_dm[6] = 0;
    expect_call(0, SC_OPEN, MODE_W, 4'd11, RS_MEM, 3'd3, 11, "OPEN(11,w) to the DM in PRR4");
    chk(n_dm_recv_cmd == 1, "PRR4's monitor commanded its DM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
