// draft_router: one 4-port router of the on-chip network (R1..R4 of the
// experimental set-up). Ports 0 and 1 face the router's two PRRs, ports 2 and
// 3 the links to other routers. Each input has a FIFO_DEPTH-entry flit
// buffer; each output has a round-robin arbiter over the inputs whose head
// flit routes to it (hwos_pkg::route_port), and moves one flit per cycle when
// the downstream side is ready. Flits are single-word packets, so there is
// no wormhole state. Latency: a flit written into an input buffer in cycle t
// can leave on the output in cycle t+1.
//
// The network's topology is the document's; the router's buffering,
// arbitration and routing function are this design's own choices.
module draft_router
  import hwos_pkg::*;
#(
  parameter logic [1:0]  ROUTER_ID  = 2'd0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid [4],
  output logic  in_ready [4],
  input  flit_t in_flit  [4],
  output logic  out_valid[4],
  input  logic  out_ready[4],
  output flit_t out_flit [4]
);
  logic  q_valid[4];
  logic  q_pop  [4];
  flit_t q_head [4];
  logic [1:0] q_port[4];
  logic [3:0] req [4];   // req[o][i]
  logic [3:0] gnt [4];
  logic [1:0] gidx[4];

  for (genvar i = 0; i < 4; i++) begin : g_in
    sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_q (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_flit[i]),
      .out_valid(q_valid[i]), .out_ready(q_pop[i]), .out_data(q_head[i]),
      .count()
    );
    assign q_port[i] = route_port(ROUTER_ID, q_head[i].dest);
  end

  for (genvar o = 0; o < 4; o++) begin : g_out
    always_comb
      for (int i = 0; i < 4; i++)
        req[o][i] = q_valid[i] && (q_port[i] == 2'(o));
    rr_arbiter #(.N(4)) u_arb (
      .clk, .rst_n, .req(req[o]), .advance(out_ready[o]),
      .gnt(gnt[o]), .gnt_idx(gidx[o])
    );
    assign out_valid[o] = (req[o] != '0);
    assign out_flit[o]  = q_head[gidx[o]];
  end

  always_comb
    for (int i = 0; i < 4; i++) begin
      q_pop[i] = 1'b0;
      for (int o = 0; o < 4; o++)
        if (gnt[o][i] && out_ready[o]) q_pop[i] = 1'b1;
    end

  // A flit leaving on a local port must be addressed to that PRR.
  for (genvar o = 0; o < 2; o++) begin : g_chk
    a_local_dest: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] |-> (router_of(out_flit[o].dest) == ROUTER_ID && out_flit[o].dest[0] == 1'(o)));
  end
endmodule
