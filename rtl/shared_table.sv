// shared_table: the communication service's Shared Table (ST), one entry per
// logical channel (hwos_pkg::st_entry_t): whether a writer and a reader have
// the channel open and in which PRR, and whether its data is buffered in a
// memory task and which one. One combinational read port and one write port;
// a write is visible to reads from the next cycle. Reset clears every entry.
// Only the csFSM that holds the CS lock reads and writes it, so every
// read-decide-write on a channel is atomic. The entry format is this
// design's own; the document names the table without giving its contents.
module shared_table
  import hwos_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  ch_t       rd_ch,
  output st_entry_t rd_entry,
  input  logic      we,
  input  ch_t       wr_ch,
  input  st_entry_t wr_entry,
  output logic [NCH-1:0] ch_busy   // channel has any state
);
  st_entry_t tbl [NCH];

  assign rd_entry = tbl[rd_ch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) tbl[i] <= '0;
    end else if (we) begin
      tbl[wr_ch] <= wr_entry;
    end
  end

  always_comb
    for (int i = 0; i < NCH; i++)
      ch_busy[i] = tbl[i].w_open || tbl[i].r_open || tbl[i].in_mem;
endmodule
