// tb_ddg_schedule: three tasks sharing two PRRs, run on the whole platform
// at its default sizes. T1 produces data for T2 (channel 1) and for T3
// (channel 2); T2 produces data for T3 (channel 3). Only two PRRs are
// used: T2 runs in PRR4 from the start, T1 runs in PRR1, and T3 can only be
// loaded into PRR1 after T1 has finished. So:
//   c1: T2 is already waiting when T1 opens c1: direct channel (5 cycles);
//   c2: T3 does not exist yet when T1 opens c2: the data goes to the local
//       memory (11 cycles), T1 finishes, T3 is loaded into PRR1, opens c2
//       and gets the data back from the LM;
//   c3: T3 has opened c3 before T2 opens it: direct channel.
// T3 opens both of its channels before it receives anything, so the words
// of c2 (from the LM) and of c3 (from T2) may reach PRR1 interleaved; the
// task sorts them by channel. The tasks are behavioural: "compute" is a
// fixed function of the received words. The test checks every answer,
// the set-up times, every word, that the scheduler is never asked and that
// the LM is free at the end.
module tb_ddg_schedule;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 1;
  int checks = 0, failures = 0;

  logic      task_sc_valid[NPORTS], task_sc_ready[NPORTS], task_resp_valid[NPORTS];
  syscall_t  task_sc_req[NPORTS];
  sc_resp_t  task_resp[NPORTS];
  logic      task_tx_valid[NPORTS], task_tx_ready[NPORTS], task_rx_valid[NPORTS], task_rx_ready[NPORTS];
  flit_t     task_tx_flit[NPORTS], task_rx_flit[NPORTS];
  logic      tg_start, tg_busy, tg_done;
  ch_t       tg_ch;
  logic [15:0] tg_nwords;
  word_t     tg_seed;
  sc_status_e tg_status;
  logic [NPORTS-1:0] prr_is_dm, dm_release;
  logic      dm_req, dm_grant, dm_deny, lm_overflow;
  port_t     dm_req_prr;
  ch_t       dm_req_ch;
  logic [NMEM-1:0] mem_busy;

  hwos_top dut (.*);

  always #5 clk = ~clk;

  localparam int    N    = 256;     // words per channel
  localparam int    PA   = 0;       // PRR1: T1, later T3
  localparam int    PB   = 3;       // PRR4: T2
  localparam int    LMA  = 4;       // PRR5: local memory

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sys(int p, sc_op_e op, sc_mode_e mode, ch_t ch, output sc_resp_t r, output int lat);
    task_sc_valid[p] = 1; task_sc_req[p].op = op; task_sc_req[p].mode = mode; task_sc_req[p].ch = ch;
    #1;
    while (!task_sc_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk);
    task_sc_valid[p] = 0;
    lat = 2;
    while (!task_resp_valid[p]) begin @(negedge clk); lat++; end
    r = task_resp[p];
    @(negedge clk);
  endtask

  word_t rxq [NPORTS][NCH][$];
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORTS; p++)
      if (task_rx_valid[p] && task_rx_ready[p]) rxq[p][task_rx_flit[p].ch].push_back(task_rx_flit[p].data);
  always @(negedge clk)
    for (int p = 0; p < NPORTS; p++) task_rx_ready[p] = ($urandom_range(0, 4) != 0);

  int n_sched_req = 0;
  always @(posedge clk) if (rst_n && dm_req) n_sched_req++;
  assign dm_grant = 1'b0;
  assign dm_deny  = dm_req;   // never reached when the test passes

  task automatic send_words(int p, ch_t ch, port_t dest, ref word_t w[$]);
    for (int i = 0; i < w.size(); i++) begin
      task_tx_valid[p] = 1;
      task_tx_flit[p] = '0;
      task_tx_flit[p].dest = dest; task_tx_flit[p].src = port_t'(p); task_tx_flit[p].ch = ch;
      task_tx_flit[p].data = w[i]; task_tx_flit[p].last = (i == w.size() - 1);
      #1;
      while (!task_tx_ready[p]) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    task_tx_valid[p] = 0;
  endtask

  task automatic wait_words(int p, ch_t ch, int n);
    int t = 0;
    while (rxq[p][ch].size() < n && t < 20000) begin @(negedge clk); t++; end
  endtask

  function automatic bit same(ref word_t a[$], ref word_t b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] !== b[i]) return 0;
    return 1;
  endfunction

  initial begin
    sc_resp_t r;
    int lat;
    word_t d1[$], d2[$], d3[$];
    #1 rst_n = 0;
    for (int p = 0; p < NPORTS; p++) begin
      task_sc_valid[p] = 0; task_sc_req[p] = '0; task_tx_valid[p] = 0; task_tx_flit[p] = '0;
    end
    tg_start = 0; tg_ch = 0; tg_nwords = 0; tg_seed = 0; prr_is_dm = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // T1 computes its two outputs
    for (int i = 0; i < N; i++) begin
      d1.push_back(32'h1000_0000 + i * 7);
      d2.push_back(32'h2000_0000 ^ (i * 32'h9E37_79B9));
    end

    // T2 (PRR4) is already waiting on c1
    sys(PB, SC_OPEN, MODE_R, 4'd1, r, lat);
    chk(r.status == RS_OK && lat == 5, "T2 OPEN(1,r)");
    // T1 (PRR1): c1 goes straight to T2
    sys(PA, SC_OPEN, MODE_W, 4'd1, r, lat);
    chk(r.status == RS_DIRECT && r.peer == PB && lat == 5,
        $sformatf("T1 OPEN(1,w) direct: st %0d peer %0d lat %0d", r.status, r.peer, lat));
    send_words(PA, 4'd1, r.peer, d1);
    sys(PA, SC_CLOSE, MODE_W, 4'd1, r, lat);
    chk(r.status == RS_OK, "T1 CLOSE(1)");
    // T1: nobody reads c2 yet, so the LM takes it
    sys(PA, SC_OPEN, MODE_W, 4'd2, r, lat);
    chk(r.status == RS_MEM && r.peer == LMA && lat == 11,
        $sformatf("T1 OPEN(2,w) to LM: st %0d peer %0d lat %0d", r.status, r.peer, lat));
    send_words(PA, 4'd2, r.peer, d2);
    sys(PA, SC_CLOSE, MODE_W, 4'd2, r, lat);
    chk(mem_busy[0], "LM holds c2 after T1 has finished");

    // T2 receives c1 and closes it
    wait_words(PB, 4'd1, N);
    chk(same(rxq[PB][1], d1), "T2 received c1");
    sys(PB, SC_CLOSE, MODE_R, 4'd1, r, lat);

    // T3 is loaded into PRR1 and opens both inputs first
    repeat (20) @(negedge clk);
    sys(PA, SC_OPEN, MODE_R, 4'd2, r, lat);
    chk(r.status == RS_MEM && r.peer == LMA, "T3 OPEN(2,r) from LM");
    sys(PA, SC_OPEN, MODE_R, 4'd3, r, lat);
    chk(r.status == RS_OK, "T3 OPEN(3,r) waits for T2");

    // meanwhile T2 computes and sends c3 directly to T3
    foreach (rxq[PB][1][i]) d3.push_back(~rxq[PB][1][i] + 32'd3);
    sys(PB, SC_OPEN, MODE_W, 4'd3, r, lat);
    chk(r.status == RS_DIRECT && r.peer == PA && lat == 5, "T2 OPEN(3,w) direct to T3");
    send_words(PB, 4'd3, r.peer, d3);
    sys(PB, SC_CLOSE, MODE_W, 4'd3, r, lat);

    // T3 receives c2 (from the LM) and c3 (from T2)
    wait_words(PA, 4'd2, N);
    chk(same(rxq[PA][2], d2), "T3 received c2 from the LM");
    sys(PA, SC_CLOSE, MODE_R, 4'd2, r, lat);
    wait_words(PA, 4'd3, N);
    chk(same(rxq[PA][3], d3), "T3 received c3 from T2");
    sys(PA, SC_CLOSE, MODE_R, 4'd3, r, lat);

    repeat (5) @(negedge clk);
    chk(!mem_busy[0], "LM free at the end");
    chk(n_sched_req == 0, "the scheduler was never asked");
    chk(!lm_overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
