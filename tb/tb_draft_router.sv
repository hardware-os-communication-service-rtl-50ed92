// tb_draft_router: self-checking test of one router, instantiated as R1 and
// as R3. Random flits enter all four inputs; each must leave on the port
// given by an independent table of the set-up's routing (same router ->
// local port, otherwise the link named in the table), with nothing lost,
// duplicated or reordered between an input/output pair. Output ready is
// random to exercise back-pressure. A single flit on an idle router leaves
// one cycle after it is written.
module tb_draft_router;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // expected output port: [router][dest]
  int exp_port [2][8] = '{
    '{0, 1, 2, 2, 2, 2, 3, 3},   // R1: R2 via R3 (port 2), R3 port 2, R4 port 3
    '{2, 2, 3, 3, 0, 1, 2, 2}    // R3: R1 port 2, R2 port 3, R4 via R1 (port 2)
  };
  localparam logic [1:0] RID [2] = '{2'd0, 2'd2};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  iv[2][4], ir[2][4], ov[2][4], orr[2][4];
  flit_t ifl[2][4], ofl[2][4];
  // in-order reference queues per router, input, output
  flit_t q [2][4][4][$];
  int sent [2], got [2];
  bit rnd_ready = 1;

  for (genvar r = 0; r < 2; r++) begin : g_dut
    draft_router #(.ROUTER_ID(RID[r]), .FIFO_DEPTH(4)) dut (
      .clk, .rst_n, .in_valid(iv[r]), .in_ready(ir[r]), .in_flit(ifl[r]),
      .out_valid(ov[r]), .out_ready(orr[r]), .out_flit(ofl[r]));
  end

  bit acc [2][4];
  // record accepted inputs, then check outputs
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 4; i++) begin
        acc[r][i] = iv[r][i] && ir[r][i];
        if (acc[r][i]) begin
          q[r][i][exp_port[r][ifl[r][i].dest]].push_back(ifl[r][i]);
          sent[r]++;
        end
      end
    for (int r = 0; r < 2; r++)
      for (int o = 0; o < 4; o++)
        if (ov[r][o] && orr[r][o]) begin
          int src;
          src = int'(ofl[r][o].src[1:0]);   // tb puts the input index here
          checks++;
          if (exp_port[r][ofl[r][o].dest] != o) begin
            failures++;
            $display("R%0d: dest %0d left on port %0d", r, ofl[r][o].dest, o);
          end else if (q[r][src][o].size() == 0 || q[r][src][o][0] !== ofl[r][o]) begin
            failures++;
            $display("R%0d: unexpected flit %h on port %0d", r, ofl[r][o], o);
          end else begin
            void'(q[r][src][o].pop_front());
          end
          got[r]++;
        end
  end

  always @(negedge clk)
    for (int r = 0; r < 2; r++)
      for (int o = 0; o < 4; o++)
        orr[r][o] = rnd_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    int lat;
    flit_t f;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 4; i++) begin iv[r][i] = 0; ifl[r][i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency of one flit on an idle router
    rnd_ready = 0;
    @(negedge clk);
    f = '0; f.dest = 3'd1; f.src = 3'd0; f.data = 32'hCAFE_0001;
    iv[0][0] = 1; ifl[0][0] = f;
    @(negedge clk);
    iv[0][0] = 0;
    lat = 0;
    while (!ov[0][1]) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 0) begin failures++; $display("latency %0d", lat); end
    @(negedge clk);
    // random traffic
    rnd_ready = 1;
    for (int n = 0; n < 2000; n++) begin
      for (int r = 0; r < 2; r++)
        for (int i = 0; i < 4; i++) begin
          if (!iv[r][i] || acc[r][i]) begin
            iv[r][i] = ($urandom_range(0, 1) == 1);
            f = flit_t'({$urandom, $urandom});
            f.dest = 3'($urandom_range(0, 7));
            // a flit never enters a local port addressed to that port's own PRR
            f.src = 3'(i);
            ifl[r][i] = f;
          end
        end
      @(negedge clk);
    end
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 4; i++)
        if (acc[r][i]) iv[r][i] = 0;
    // let pending inputs finish
    repeat (20) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++)
        for (int i = 0; i < 4; i++)
          if (acc[r][i]) iv[r][i] = 0;
    end
    repeat (100) @(negedge clk);
    for (int r = 0; r < 2; r++) begin
      checks++;
      if (sent[r] != got[r] || sent[r] < 500) begin
        failures++;
        $display("R%0d: sent %0d got %0d", r, sent[r], got[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
