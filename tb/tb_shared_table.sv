// tb_shared_table: self-checking test of the Shared Table. After reset every
// entry reads zero; random writes are mirrored in a reference array and
// every channel is read back; ch_busy must match the reference.
module tb_shared_table;
  import hwos_pkg::*;
  logic clk = 0, rst_n = 0, we;
  ch_t rd_ch, wr_ch;
  st_entry_t rd_entry, wr_entry;
  logic [NCH-1:0] ch_busy;
  st_entry_t ref_tbl [NCH];
  int checks = 0, failures = 0;

  shared_table dut (.clk, .rst_n, .rd_ch, .rd_entry, .we, .wr_ch, .wr_entry, .ch_busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int c = 0; c < NCH; c++) begin
      logic want_busy;
      rd_ch = ch_t'(c);
      #1;
      checks++;
      if (rd_entry !== ref_tbl[c]) begin
        failures++;
        $display("ch %0d: got %h want %h", c, rd_entry, ref_tbl[c]);
      end
      want_busy = ref_tbl[c].w_open | ref_tbl[c].r_open | ref_tbl[c].in_mem;
      checks++;
      if (ch_busy[c] !== want_busy) failures++;
    end
  endtask

  initial begin
    we = 0; rd_ch = 0; wr_ch = 0; wr_entry = '0;
    for (int c = 0; c < NCH; c++) ref_tbl[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      wr_ch = ch_t'($urandom);
      wr_entry = st_entry_t'($urandom);
      if (we) ref_tbl[wr_ch] = wr_entry;
      // read of the written channel still shows the old value this cycle
      rd_ch = wr_ch;
      @(negedge clk);
      we = 0;
      if (n % 50 == 0) check_all();
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
