// tb_traffic_gen: self-checking test of the random traffic generator. The
// test plays the communication service: it answers the OPEN with RS_MEM and
// a peer address after a few cycles, then takes the words under random
// back-pressure and compares them with its own LFSR model (taps
// x^32+x^22+x^2+x+1, first word = seed), checks destination, source,
// channel and the last flag, and expects CLOSE on the same channel. A
// second run is answered RS_GLOBAL: no word and no CLOSE may follow.
module tb_traffic_gen;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, sc_valid, sc_ready, resp_valid, tx_valid, tx_ready, rx_ready;
  ch_t ch;
  logic [15:0] nwords;
  word_t seed, model;
  sc_status_e status;
  syscall_t sc_req;
  sc_resp_t resp;
  flit_t tx_flit;
  int checks = 0, failures = 0, nrx = 0, ncalls = 0;
  syscall_t calls[$];

  traffic_gen dut (.clk, .rst_n, .my_addr(3'd1), .start, .ch, .nwords, .seed, .busy, .done, .status,
    .sc_valid, .sc_ready, .sc_req, .resp_valid, .resp, .tx_valid, .tx_ready, .tx_flit,
    .rx_valid(1'b0), .rx_ready, .rx_flit('0));

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

  always @(posedge clk) if (rst_n) begin
    if (sc_valid && sc_ready) calls.push_back(sc_req);
    if (tx_valid && tx_ready) begin
      checks++;
      if (tx_flit.data !== model || tx_flit.dest !== 3'd4 || tx_flit.src !== 3'd1 ||
          tx_flit.ch !== 4'd6 || tx_flit.last !== (nrx == int'(nwords) - 1)) begin
        failures++; $display("bad word %0d: %h want %h", nrx, tx_flit.data, model);
      end
      model = model[0] ? ((model >> 1) ^ 32'h8020_0003) : (model >> 1);
      nrx++;
    end
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  task automatic answer(sc_status_e st, port_t peer);
    while (calls.size() == 0) @(negedge clk);
    repeat (3) @(negedge clk);
    resp_valid = 1; resp.status = st; resp.peer = peer;
    @(negedge clk);
    resp_valid = 0;
  endtask

  initial begin
    start = 0; ch = 4'd6; nwords = 16'd25; seed = 32'h1234_5678; model = seed;
    sc_ready = 1; resp_valid = 0; resp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    answer(RS_MEM, 3'd4);
    chk(calls[0].op == SC_OPEN && calls[0].mode == MODE_W && calls[0].ch == 4'd6, "OPEN(6, w)");
    void'(calls.pop_front());
    while (calls.size() == 0) @(negedge clk);
    chk(nrx == 25, $sformatf("%0d words before CLOSE", nrx));
    chk(calls[0].op == SC_CLOSE && calls[0].ch == 4'd6, "CLOSE(6)");
    answer(RS_OK, 3'd0);
    void'(calls.pop_front());
    while (!done) @(negedge clk);
    chk(status == RS_MEM, "status kept");
    @(negedge clk);
    chk(!busy, "idle at the end");
    // global memory answer: nothing sent
    start = 1; @(negedge clk); start = 0;
    answer(RS_GLOBAL, 3'd0);
    void'(calls.pop_front());
    repeat (10) @(negedge clk);
    chk(nrx == 25 && calls.size() == 0 && !busy && status == RS_GLOBAL, "no traffic after RS_GLOBAL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
