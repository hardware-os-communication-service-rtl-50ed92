// tb_hwos_top: end-to-end test of the platform at its default sizes, after
// the experimental set-up: an encryption task in PRR1, the random traffic
// generator in PRR2, a decryption task in PRR4 and the LM in PRR5. The two
// AES tasks are behavioural here: they only make system calls and move
// words (the "ciphertext" is random data generated by the test). A small
// scheduler model configures a DM in an empty PRR when asked, removes it
// when it is released, and can be told to refuse.
//
// Sequence and checks:
//  1. non-blocking: decryption opens c1 for reading, encryption opens c1
//     for writing (direct, 5 cycles) and sends 300 words, which must arrive
//     in order at PRR4 under random back-pressure;
//  2. blocking: PRR7 writes c9 with no reader (LM, 11 cycles) and PRR8
//     reads it later; the generator sends 2000 words on c2 with no reader
//     (LM); encryption then writes c3 while the LM is taken: the
//     scheduler configures a DM in PRR3 and the words go there; a third
//     writer (PRR7) is refused (global memory); decryption then reads c2
//     (from the LM, compared with an LFSR model of the generator) and c3
//     (from the DM), closes both, and the DM is released and removed;
//  3. two tasks call at once (lock contention);
//  4. the generator sends more words than the LM holds: overflow flagged,
//     the LM returns exactly its capacity;
//  5. with the LM taken and a DM already placed in PRR6 by the scheduler,
//     a blocked writer goes to that DM without a request (11 cycles).
// Every mechanism (direct, LM, DM, refusal, DM release, contention,
// network back-pressure, overflow) is counted and must occur.
module tb_hwos_top;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 1;   // driven low at 1 ns so that every reset is applied
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

  localparam int LM_WORDS = 8192;   // default LM size

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_direct, n_lm, n_dm, n_global, n_release, n_contention, n_backpressure, n_overflow;

  // ---------------- system calls
  task automatic sys(int p, sc_op_e op, sc_mode_e mode, ch_t ch, output sc_resp_t r, output int lat);
    task_sc_valid[p] = 1; task_sc_req[p].op = op; task_sc_req[p].mode = mode; task_sc_req[p].ch = ch;
    #1;
    while (!task_sc_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk);
    task_sc_valid[p] = 0;
    lat = 2;
    while (!task_resp_valid[p]) begin @(negedge clk); lat++; end
    r = task_resp[p];
    if (op == SC_OPEN && r.status == RS_DIRECT) n_direct++;
    if (r.status == RS_GLOBAL) n_global++;
    @(negedge clk);
  endtask

  // ---------------- task network ports
  word_t rxq [NPORTS][NCH][$];
  int    rx_last [NPORTS][NCH];
  bit    rnd_rx = 1;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (task_rx_valid[p] && task_rx_ready[p]) begin
        rxq[p][task_rx_flit[p].ch].push_back(task_rx_flit[p].data);
        if (task_rx_flit[p].last) rx_last[p][task_rx_flit[p].ch]++;
      end
      if (task_rx_valid[p] && !task_rx_ready[p]) n_backpressure++;
    end
    for (int k = 0; k < NPORTS; k++) if (dm_release[k]) n_release++;
    if (lm_overflow) n_overflow = 1;
  end
  always @(negedge clk)
    for (int p = 0; p < NPORTS; p++) task_rx_ready[p] = rnd_rx ? ($urandom_range(0, 3) != 0) : 1'b1;

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
    while (rxq[p][ch].size() < n && t < 100000) begin @(negedge clk); t++; end
  endtask

  function automatic bit same(ref word_t a[$], ref word_t b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] !== b[i]) return 0;
    return 1;
  endfunction

  // ---------------- scheduler model: DM goes to the first empty PRR among 3,6,7,8
  bit refuse = 0;
  int dm_slot = -1;
  always @(negedge clk) begin
    dm_grant = 0; dm_deny = 0;
    if (rst_n && dm_req) begin
      if (refuse) dm_deny = 1;
      else begin
        int cand [4] = '{2, 5, 6, 7};
        foreach (cand[j]) if (!prr_is_dm[cand[j]] && dm_slot < 0) dm_slot = cand[j];
        prr_is_dm[dm_slot] = 1;
        dm_grant = 1;
      end
    end
    for (int k = 0; k < NPORTS; k++)
      if (dm_release[k]) begin prr_is_dm[k] = 0; if (dm_slot == k) dm_slot = -1; end
  end

  function automatic word_t lfsr_next(word_t s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  initial begin
    sc_resp_t r;
    int lat;
    word_t w1[$], w3[$], gen[$], got[$];
    word_t s;
    #1 rst_n = 0;
    for (int p = 0; p < NPORTS; p++) begin
      task_sc_valid[p] = 0; task_sc_req[p] = '0; task_tx_valid[p] = 0; task_tx_flit[p] = '0;
      for (int c = 0; c < NCH; c++) rx_last[p][c] = 0;
    end
    tg_start = 0; tg_ch = 0; tg_nwords = 0; tg_seed = 0; prr_is_dm = '0;
    {n_direct, n_lm, n_dm, n_global, n_release, n_contention, n_backpressure, n_overflow} = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. non-blocking AES encrypt (PRR1) -> decrypt (PRR4)
    sys(3, SC_OPEN, MODE_R, 4'd1, r, lat);
    chk(r.status == RS_OK && lat == 5, "dec OPEN(c1,r)");
    sys(0, SC_OPEN, MODE_W, 4'd1, r, lat);
    chk(r.status == RS_DIRECT && r.peer == 3'd3 && lat == 5,
        $sformatf("enc OPEN(c1,w) direct: st %0d peer %0d lat %0d", r.status, r.peer, lat));
    for (int i = 0; i < 300; i++) w1.push_back($urandom);
    send_words(0, 4'd1, r.peer, w1);
    wait_words(3, 4'd1, 300);
    chk(same(rxq[3][1], w1) && rx_last[3][1] == 1, "c1 data at decrypt");
    sys(0, SC_CLOSE, MODE_W, 4'd1, r, lat);
    sys(3, SC_CLOSE, MODE_R, 4'd1, r, lat);
    chk(r.status == RS_OK, "c1 closed");

    // ---- 2a. blocking writer in PRR7 stores in the LM, PRR8 reads it later
    sys(6, SC_OPEN, MODE_W, 4'd9, r, lat);
    chk(r.status == RS_MEM && r.peer == 3'd4 && lat == 11,
        $sformatf("PRR7 OPEN(c9,w) to LM: st %0d peer %0d lat %0d", r.status, r.peer, lat));
    n_lm++;
    w1 = {};
    for (int i = 0; i < 40; i++) w1.push_back($urandom);
    send_words(6, 4'd9, r.peer, w1);
    sys(6, SC_CLOSE, MODE_W, 4'd9, r, lat);
    sys(7, SC_OPEN, MODE_R, 4'd9, r, lat);
    chk(r.status == RS_MEM && r.peer == 3'd4 && lat == 5, "PRR8 OPEN(c9,r) from LM");
    wait_words(7, 4'd9, 40);
    chk(same(rxq[7][9], w1), "c9 data through the LM");
    sys(7, SC_CLOSE, MODE_R, 4'd9, r, lat);
    repeat (3) @(negedge clk);

    // ---- 2. blocking: generator -> LM
    tg_ch = 4'd2; tg_nwords = 16'd2000; tg_seed = 32'h0BAD_F00D;
    tg_start = 1; @(negedge clk); tg_start = 0;
    n_lm++;
    while (!tg_done) @(negedge clk);
    chk(tg_status == RS_MEM, "generator served by LM");
    chk(mem_busy[0], "LM occupied");
    // encryption writes c3 while the LM is taken: scheduler configures a DM
    sys(0, SC_OPEN, MODE_W, 4'd3, r, lat);
    chk(r.status == RS_MEM && r.peer == 3'd2 && prr_is_dm[2], "enc OPEN(c3,w): DM in PRR3");
    n_dm++;
    for (int i = 0; i < 500; i++) w3.push_back($urandom);
    send_words(0, 4'd3, r.peer, w3);
    sys(0, SC_CLOSE, MODE_W, 4'd3, r, lat);
    // a third blocked writer is refused
    refuse = 1;
    sys(6, SC_OPEN, MODE_W, 4'd4, r, lat);
    chk(r.status == RS_GLOBAL, "PRR7 OPEN(c4,w): global memory");
    refuse = 0;
    // decryption reads c2 from the LM
    sys(3, SC_OPEN, MODE_R, 4'd2, r, lat);
    chk(r.status == RS_MEM && r.peer == 3'd4 && lat == 5, "dec OPEN(c2,r) from LM");
    wait_words(3, 4'd2, 2000);
    s = 32'h0BAD_F00D;
    for (int i = 0; i < 2000; i++) begin gen.push_back(s); s = lfsr_next(s); end
    chk(same(rxq[3][2], gen) && rx_last[3][2] == 1, "c2 data from the LM matches the generator");
    sys(3, SC_CLOSE, MODE_R, 4'd2, r, lat);
    repeat (3) @(negedge clk);
    chk(!mem_busy[0], "LM free");
    // and c3 from the DM
    sys(3, SC_OPEN, MODE_R, 4'd3, r, lat);
    chk(r.status == RS_MEM && r.peer == 3'd2, "dec OPEN(c3,r) from DM");
    wait_words(3, 4'd3, 500);
    chk(same(rxq[3][3], w3), "c3 data from the DM");
    sys(3, SC_CLOSE, MODE_R, 4'd3, r, lat);
    repeat (4) @(negedge clk);
    chk(n_release == 1 && !prr_is_dm[2], "DM released and removed");

    // ---- 3. two PRRs call at the same time
    fork
      begin sys(3, SC_OPEN, MODE_R, 4'd5, r, lat); chk(r.status == RS_OK, "contended reader"); end
      begin
        sc_resp_t r2; int lat2;
        sys(0, SC_OPEN, MODE_R, 4'd6, r2, lat2);
        chk(r2.status == RS_OK, "contended reader 2");
        if (lat2 > 5) n_contention++;
      end
    join
    if (lat > 5) n_contention++;
    sys(3, SC_CLOSE, MODE_R, 4'd5, r, lat);
    sys(0, SC_CLOSE, MODE_R, 4'd6, r, lat);

    // ---- 4. LM overflow
    tg_ch = 4'd7; tg_nwords = 16'(LM_WORDS + 8); tg_seed = 32'h1357_9BDF;
    tg_start = 1; @(negedge clk); tg_start = 0;
    while (!tg_done) @(negedge clk);
    chk(lm_overflow, "LM overflow flagged");
    rnd_rx = 0;
    sys(3, SC_OPEN, MODE_R, 4'd7, r, lat);
    wait_words(3, 4'd7, LM_WORDS);
    repeat (20) @(negedge clk);
    chk(rxq[3][7].size() == LM_WORDS && rx_last[3][7] == 1, $sformatf("LM returned %0d words", rxq[3][7].size()));
    got = rxq[3][7];
    s = 32'h1357_9BDF;
    gen = {};
    for (int i = 0; i < LM_WORDS; i++) begin gen.push_back(s); s = lfsr_next(s); end
    chk(same(got, gen), "the first LM_WORDS words were kept");
    sys(3, SC_CLOSE, MODE_R, 4'd7, r, lat);

    // ---- 5. a DM placed beforehand is used without asking the scheduler
    tg_ch = 4'd8; tg_nwords = 16'd16; tg_seed = 32'h2468_ACE0;
    tg_start = 1; @(negedge clk); tg_start = 0;
    while (!tg_done) @(negedge clk);
    chk(tg_status == RS_MEM && mem_busy[0], "generator c8 held by the LM");
    prr_is_dm[5] = 1;   // the scheduler has already configured a DM in PRR6
    repeat (3) @(negedge clk);
    sys(0, SC_OPEN, MODE_W, 4'd10, r, lat);
    chk(r.status == RS_MEM && r.peer == 3'd5 && lat == 11,
        $sformatf("enc OPEN(c10,w) to the DM in PRR6: st %0d peer %0d lat %0d", r.status, r.peer, lat));
    if (r.status == RS_MEM && r.peer == 3'd5) n_dm++;
    w1 = {};
    for (int i = 0; i < 40; i++) w1.push_back($urandom);
    send_words(0, 4'd10, r.peer, w1);
    sys(0, SC_CLOSE, MODE_W, 4'd10, r, lat);
    sys(3, SC_OPEN, MODE_R, 4'd10, r, lat);
    chk(r.status == RS_MEM && r.peer == 3'd5 && lat == 5, "dec OPEN(c10,r) from the DM in PRR6");
    wait_words(3, 4'd10, 40);
    chk(same(rxq[3][10], w1), "c10 data from the DM in PRR6");
    sys(3, SC_CLOSE, MODE_R, 4'd10, r, lat);
    sys(3, SC_OPEN, MODE_R, 4'd8, r, lat);
    wait_words(3, 4'd8, 16);
    s = 32'h2468_ACE0;
    gen = {};
    for (int i = 0; i < 16; i++) begin gen.push_back(s); s = lfsr_next(s); end
    chk(same(rxq[3][8], gen), "c8 data from the LM");
    sys(3, SC_CLOSE, MODE_R, 4'd8, r, lat);
    repeat (4) @(negedge clk);
    chk(!prr_is_dm[5] && !mem_busy[0] && n_release == 2, "DM in PRR6 released, LM free");

    $display("mechanisms: direct=%0d lm=%0d dm=%0d global=%0d dm_release=%0d contention=%0d backpressure=%0d overflow=%0d",
             n_direct, n_lm, n_dm, n_global, n_release, n_contention, n_backpressure, n_overflow);
    chk(n_direct > 0, "direct happened");
    chk(n_lm > 0, "LM happened");
    chk(n_dm > 0, "DM happened");
    chk(n_global > 0, "refusal happened");
    chk(n_release > 0, "DM release happened");
    chk(n_contention > 0, "contention happened");
    chk(n_backpressure > 0, "back-pressure happened");
    chk(n_overflow > 0, "overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
