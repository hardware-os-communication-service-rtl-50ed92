// sp_bram: single-port RAM of DEPTH words with a synchronous read (one cycle
// of latency), the storage of a memory task. One access per cycle: a write
// when we is high, otherwise a read of addr whose data appears on rdata in
// the next cycle. Written as an array so that an FPGA flow maps it to block
// RAM. Contents are not reset.
module sp_bram #(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned WIDTH  = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
