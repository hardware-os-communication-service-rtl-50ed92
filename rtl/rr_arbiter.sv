// rr_arbiter: round-robin arbiter. gnt is a one-hot pick among req, starting
// the search just after the last requester that was granted with advance=1.
// Purely combinational grant; the priority pointer is a register.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,   // the current grant was used
  output logic [N-1:0] gnt,
  output logic [$clog2(N)-1:0] gnt_idx
);
  logic [$clog2(N)-1:0] last;

  always_comb begin
    gnt = '0;
    gnt_idx = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [$clog2(N)-1:0] i;
      i = $clog2(N)'((int'(last) + k) % N);
      if (req[i] && gnt == '0) begin
        gnt[i] = 1'b1;
        gnt_idx = i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= $clog2(N)'(N - 1);
    else if (advance && req != '0) last <= gnt_idx;
  end
endmodule
