// tb_sp_bram: self-checking test of the single-port RAM. Writes random words
// to random addresses, keeps a reference copy, and checks every read one
// cycle after its address, including a read right after a write.
module tb_sp_bram;
  localparam int DEPTH = 64;
  logic clk = 0, en, we;
  logic [5:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  sp_bram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      en = 1; we = 1; addr = 6'(i); wdata = $urandom; ref_mem[i] = wdata; written[i] = 1;
      @(negedge clk);
    end
    for (int n = 0; n < 500; n++) begin
      en = 1;
      addr = 6'($urandom_range(0, DEPTH-1));
      if ($urandom_range(0, 2) == 0) begin
        we = 1; wdata = $urandom; ref_mem[addr] = wdata;
        @(negedge clk);
      end else begin
        we = 0;
        @(negedge clk);
        checks++;
        if (rdata !== ref_mem[addr]) begin
          failures++;
          $display("read %0d: got %h want %h", addr, rdata, ref_mem[addr]);
        end
      end
    end
    // disabled port keeps its output
    we = 0; addr = 0; @(negedge clk);
    en = 0; addr = 1; @(negedge clk);
    checks++;
    if (rdata !== ref_mem[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
