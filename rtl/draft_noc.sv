// draft_noc: the 8-port on-chip network of the experimental set-up. Four
// draft_router instances R1..R4; R1 serves PRR1/PRR2 (addresses 0/1), R2
// serves PRR3/PRR4, R3 serves PRR5/PRR6 and R4 serves PRR7/PRR8. Links:
// R1-R3, R1-R4, R2-R3, R2-R4, each a pair of valid/ready flit channels.
// Every PRR has one injection port (in_*) and one ejection port (out_*).
// A flit crosses one router per cycle when not blocked: a flit offered on
// in_* in cycle t is offered on the destination's out_* in cycle t+1 for
// PRRs of the same router, t+2 through one link and t+3 on the two-link
// paths (R1<->R2 through R3, R3<->R4 through R1).
//
// Topology and router names follow the document; the router insides do not
// come from it (see draft_router).
module draft_noc
  import hwos_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid [NPORTS],
  output logic  in_ready [NPORTS],
  input  flit_t in_flit  [NPORTS],
  output logic  out_valid[NPORTS],
  input  logic  out_ready[NPORTS],
  output flit_t out_flit [NPORTS]
);
  logic  r_iv[4][4], r_ir[4][4], r_ov[4][4], r_or[4][4];
  flit_t r_if[4][4], r_of[4][4];

  // link partner of (router r, port p) for p = 2,3
  function automatic int peer_router(int r, int p);
    if (r < 2) return (p == 2) ? 2 : 3;
    return (p == 2) ? 0 : 1;
  endfunction
  function automatic int peer_port(int r);
    // port on the peer router that leads back to router r
    return (r == 0 || r == 2) ? 2 : 3;
  endfunction

  for (genvar r = 0; r < 4; r++) begin : g_r
    draft_router #(.ROUTER_ID(2'(r)), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
      .clk, .rst_n,
      .in_valid(r_iv[r]), .in_ready(r_ir[r]), .in_flit(r_if[r]),
      .out_valid(r_ov[r]), .out_ready(r_or[r]), .out_flit(r_of[r])
    );
    for (genvar p = 0; p < 2; p++) begin : g_local
      assign r_iv[r][p] = in_valid[2*r+p];
      assign r_if[r][p] = in_flit[2*r+p];
      assign in_ready[2*r+p] = r_ir[r][p];
      assign out_valid[2*r+p] = r_ov[r][p];
      assign out_flit[2*r+p] = r_of[r][p];
      assign r_or[r][p] = out_ready[2*r+p];
    end
    for (genvar p = 2; p < 4; p++) begin : g_link
      localparam int PR = peer_router(r, p);
      localparam int PP = peer_port(r);
      assign r_iv[r][p] = r_ov[PR][PP];
      assign r_if[r][p] = r_of[PR][PP];
      assign r_or[PR][PP] = r_ir[r][p];
    end
  end
endmodule
