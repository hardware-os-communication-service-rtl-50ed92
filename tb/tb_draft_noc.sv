// tb_draft_noc: self-checking test of the 8-port network. First the idle
// latency of one flit for each path class (same router, one link, two
// links) is measured against 1, 2 and 3 cycles. Then every port injects
// random flits to random destinations under random ejection back-pressure;
// each flit must come out at the port equal to its destination, in order
// per source/destination pair, and all flits must arrive.
module tb_draft_noc;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic  iv[NPORTS], ir[NPORTS], ov[NPORTS], orr[NPORTS];
  flit_t ifl[NPORTS], ofl[NPORTS];
  flit_t q [NPORTS][NPORTS][$];   // [src][dest]
  bit acc [NPORTS];
  int sent = 0, got = 0;
  bit rnd_ready = 0;

  draft_noc #(.FIFO_DEPTH(4)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_flit(ifl),
    .out_valid(ov), .out_ready(orr), .out_flit(ofl));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++) begin
      acc[i] = iv[i] && ir[i];
      if (acc[i]) begin q[ifl[i].src][ifl[i].dest].push_back(ifl[i]); sent++; end
    end
    for (int o = 0; o < NPORTS; o++)
      if (ov[o] && orr[o]) begin
        checks++;
        got++;
        if (int'(ofl[o].dest) != o) begin
          failures++; $display("flit for %0d left at %0d", ofl[o].dest, o);
        end else if (q[ofl[o].src][o].size() == 0 || q[ofl[o].src][o][0] !== ofl[o]) begin
          failures++; $display("out of order at %0d: %h", o, ofl[o]);
        end else void'(q[ofl[o].src][o].pop_front());
      end
  end

  always @(negedge clk)
    for (int o = 0; o < NPORTS; o++)
      orr[o] = rnd_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic one_flit(int s, int d, int want);
    flit_t f;
    int lat;
    f = '0; f.src = 3'(s); f.dest = 3'(d); f.data = $urandom;
    iv[s] = 1; ifl[s] = f;
    @(negedge clk);
    iv[s] = 0;
    lat = 1;
    while (!ov[d]) begin @(negedge clk); lat++; end
    checks++;
    if (lat != want) begin failures++; $display("%0d->%0d latency %0d want %0d", s, d, lat, want); end
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < NPORTS; i++) begin iv[i] = 0; ifl[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    one_flit(0, 1, 1);   // PRR1 -> PRR2, both on R1
    one_flit(0, 4, 2);   // PRR1 -> PRR5, R1 -> R3
    one_flit(1, 7, 2);   // PRR2 -> PRR8, R1 -> R4
    one_flit(0, 3, 3);   // PRR1 -> PRR4, R1 -> R3 -> R2
    one_flit(4, 6, 3);   // PRR5 -> PRR7, R3 -> R1 -> R4
    one_flit(7, 5, 3);   // PRR8 -> PRR6, R4 -> R1 -> R3
    rnd_ready = 1;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NPORTS; i++)
        if (!iv[i] || acc[i]) begin
          flit_t f;
          f = flit_t'({$urandom, $urandom});
          f.src = 3'(i);
          f.dest = 3'($urandom_range(0, NPORTS-1));
          iv[i] = ($urandom_range(0, 2) == 0);
          ifl[i] = f;
        end
      @(negedge clk);
    end
    repeat (30) begin
      for (int i = 0; i < NPORTS; i++) if (acc[i]) iv[i] = 0;
      @(negedge clk);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (sent != got || sent < 2000) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
