// tb_transfer_sizes: runs the transfer workloads of the evaluation on the
// platform at its default sizes and reports their cycle counts.
//  * Non-blocking: a reader in PRR4 opens channel 1, a writer in PRR1 opens
//    it and sends N words directly (1 kB = 256 32-bit words), for 1 kB to
//    1024 kB in powers of two.
//  * Blocking: the writer opens channel 2 with no reader, its words go to
//    the LM; the reader then opens channel 2 and gets them from the LM, for
//    1 kB to 32 kB (the LM holds 32 kB).
// Checked: all words arrive in order; a direct transfer takes no more than
// its set-up time plus one cycle per word plus a small network/pipeline
// margin (TOL cycles); a blocked transfer takes about twice the direct one
// (between 1.8x and 2.3x from 4 kB on), since every word crosses the
// network twice. Latency is measured from the writer's OPEN request to the
// last word at the reader. At 100 MHz, 1024 kB takes about 2.6 ms.
module tb_transfer_sizes;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 1;
  int checks = 0, failures = 0;
  localparam int TOL = 40;

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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // reader side: compare on the fly against the writer's sequence
  int    rx_n, rx_bad;
  word_t rx_model;
  longint rx_last_cyc;
  always @(posedge clk) if (rst_n && task_rx_valid[3] && task_rx_ready[3]) begin
    if (task_rx_flit[3].data !== rx_model) rx_bad++;
    rx_model = rx_model * 32'd1664525 + 32'd1013904223;
    rx_n++;
    rx_last_cyc = cyc;
  end

  task automatic sys(int p, sc_op_e op, sc_mode_e mode, ch_t ch, output sc_resp_t r);
    task_sc_valid[p] = 1; task_sc_req[p].op = op; task_sc_req[p].mode = mode; task_sc_req[p].ch = ch;
    #1;
    while (!task_sc_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk);
    task_sc_valid[p] = 0;
    while (!task_resp_valid[p]) @(negedge clk);
    r = task_resp[p];
    @(negedge clk);
  endtask

  // writer in PRR1: words follow a linear congruential sequence from seed
  task automatic send_n(ch_t ch, port_t dest, int n, word_t seed);
    word_t w;
    w = seed;
    for (int i = 0; i < n; i++) begin
      task_tx_valid[0] = 1;
      task_tx_flit[0] = '0;
      task_tx_flit[0].dest = dest; task_tx_flit[0].src = 3'd0; task_tx_flit[0].ch = ch;
      task_tx_flit[0].data = w; task_tx_flit[0].last = (i == n - 1);
      w = w * 32'd1664525 + 32'd1013904223;
      #1;
      while (!task_tx_ready[0]) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    task_tx_valid[0] = 0;
  endtask

  task automatic wait_rx(int n);
    while (rx_n < n) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  longint direct_cyc [11];

  initial begin
    sc_resp_t r;
    longint t0;
    for (int p = 0; p < NPORTS; p++) begin
      task_sc_valid[p] = 0; task_sc_req[p] = '0; task_tx_valid[p] = 0; task_tx_flit[p] = '0;
      task_rx_ready[p] = 1;
    end
    tg_start = 0; tg_ch = 0; tg_nwords = 0; tg_seed = 0; prr_is_dm = '0; dm_grant = 0; dm_deny = 0;
    #1 rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // non-blocking, 1 kB .. 1024 kB
    for (int k = 0; k <= 10; k++) begin
      int n;
      word_t seed;
      n = 256 << k;
      seed = $urandom;
      rx_n = 0; rx_bad = 0; rx_model = seed;
      sys(3, SC_OPEN, MODE_R, 4'd1, r);
      t0 = cyc;
      sys(0, SC_OPEN, MODE_W, 4'd1, r);
      chk(r.status == RS_DIRECT, "direct");
      send_n(4'd1, r.peer, n, seed);
      wait_rx(n);
      direct_cyc[k] = rx_last_cyc - t0;
      chk(rx_n == n && rx_bad == 0, $sformatf("%0d kB direct: %0d words, %0d wrong", 1 << k, rx_n, rx_bad));
      chk(direct_cyc[k] <= longint'(n + 5 + TOL), $sformatf("%0d kB direct: %0d cycles", 1 << k, direct_cyc[k]));
      $display("non-blocking %5d kB: %8d cycles = %0d us at 100 MHz", 1 << k, direct_cyc[k], direct_cyc[k] / 100);
      sys(0, SC_CLOSE, MODE_W, 4'd1, r);
      sys(3, SC_CLOSE, MODE_R, 4'd1, r);
    end
    // blocking through the LM, 1 kB .. 32 kB
    for (int k = 0; k <= 5; k++) begin
      int n;
      longint bc;
      word_t seed;
      n = 256 << k;
      seed = $urandom;
      rx_n = 0; rx_bad = 0; rx_model = seed;
      t0 = cyc;
      sys(0, SC_OPEN, MODE_W, 4'd2, r);
      chk(r.status == RS_MEM && r.peer == 3'd4, "blocked writer goes to the LM");
      send_n(4'd2, r.peer, n, seed);
      sys(0, SC_CLOSE, MODE_W, 4'd2, r);
      sys(3, SC_OPEN, MODE_R, 4'd2, r);
      wait_rx(n);
      bc = rx_last_cyc - t0;
      chk(rx_n == n && rx_bad == 0 && !lm_overflow, $sformatf("%0d kB blocking: %0d words, %0d wrong", 1 << k, rx_n, rx_bad));
      if (k >= 2)
        chk(bc * 10 >= direct_cyc[k] * 18 && bc * 10 <= direct_cyc[k] * 23,
            $sformatf("%0d kB blocking %0d cycles vs direct %0d", 1 << k, bc, direct_cyc[k]));
      $display("blocking     %5d kB: %8d cycles = %0d us at 100 MHz", 1 << k, bc, bc / 100);
      sys(3, SC_CLOSE, MODE_R, 4'd2, r);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
