// hwos_top: the reconfigurable platform of the experimental set-up: eight
// PRRs on the 8-port on-chip network (draft_noc), the hardware
// communication service (comm_service) that sets up channels between the
// tasks in the PRRs, a static local memory task (memory_task, LM) in PRR5
// and the random traffic generator (traffic_gen) in PRR2. Every other PRR
// is a slot whose task lives outside this module (its system-call and
// network ports are brought out) and which can instead hold a dynamic
// memory task (dyn_memory_task, DM): when the scheduler sets prr_is_dm[k],
// the slot's network port and CS memory control go to the DM and the
// outside task is cut off. This models configuring the DM into PRR k.
// The scheduler itself is outside (prr_is_dm, dm_req/dm_grant/dm_deny,
// dm_release).
//
// Network addresses: PRR1..PRR8 = 0..7. Ports indexed by an address that
// holds the LM or the traffic generator are unused (ready and valid low).
//
// What follows the document: the PRR/router arrangement, the LM in PRR5,
// the traffic generator in PRR2, a DM per PRR, the CS decision order (peer,
// LM, DM, scheduler) and the 5/11-cycle set-up times. The memory sizes are
// this design's choice: the LM holds 32 KiB (the largest transfer in the
// document's execution-time measurements), a DM 4 KiB.
module hwos_top
  import hwos_pkg::*;
#(
  parameter int unsigned LM_DEPTH       = 8192,
  parameter int unsigned DM_DEPTH       = 1024,
  parameter port_t       LM_PORT        = 3'd4,
  parameter port_t       TG_PORT        = 3'd1,
  parameter int unsigned NOC_FIFO_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // tasks in the PRR slots
  input  logic      task_sc_valid  [NPORTS],
  output logic      task_sc_ready  [NPORTS],
  input  syscall_t  task_sc_req    [NPORTS],
  output logic      task_resp_valid[NPORTS],
  output sc_resp_t  task_resp      [NPORTS],
  input  logic      task_tx_valid  [NPORTS],
  output logic      task_tx_ready  [NPORTS],
  input  flit_t     task_tx_flit   [NPORTS],
  output logic      task_rx_valid  [NPORTS],
  input  logic      task_rx_ready  [NPORTS],
  output flit_t     task_rx_flit   [NPORTS],
  // random traffic generator in TG_PORT
  input  logic       tg_start,
  input  ch_t        tg_ch,
  input  logic [15:0] tg_nwords,
  input  word_t      tg_seed,
  output logic       tg_busy,
  output logic       tg_done,
  output sc_status_e tg_status,
  // scheduler
  input  logic [NPORTS-1:0] prr_is_dm,
  output logic      dm_req,
  output port_t     dm_req_prr,
  output ch_t       dm_req_ch,
  input  logic      dm_grant,
  input  logic      dm_deny,
  output logic [NPORTS-1:0] dm_release,
  output logic [NMEM-1:0]   mem_busy,
  output logic      lm_overflow
);
  // network ports
  logic  n_iv[NPORTS], n_ir[NPORTS], n_ov[NPORTS], n_or[NPORTS];
  flit_t n_if[NPORTS], n_of[NPORTS];
  // CS ports
  logic      c_sc_valid[NPORTS], c_sc_ready[NPORTS], c_resp_valid[NPORTS];
  syscall_t  c_sc_req[NPORTS];
  sc_resp_t  c_resp[NPORTS];
  mt_cmd_t   lm_cmd;
  mt_stat_t  lm_stat;
  mt_cmd_t   dm_cmd [NPORTS];
  mt_stat_t  dm_stat[NPORTS];
  logic [NPORTS-1:0] dm_cfg;

  always_comb begin
    dm_cfg = prr_is_dm;
    dm_cfg[LM_PORT] = 1'b0;
    dm_cfg[TG_PORT] = 1'b0;
  end

  draft_noc #(.FIFO_DEPTH(NOC_FIFO_DEPTH)) u_noc (
    .clk, .rst_n,
    .in_valid(n_iv), .in_ready(n_ir), .in_flit(n_if),
    .out_valid(n_ov), .out_ready(n_or), .out_flit(n_of)
  );

  comm_service #(.LM_PORT(LM_PORT)) u_cs (
    .clk, .rst_n,
    .sc_valid(c_sc_valid), .sc_ready(c_sc_ready), .sc_req(c_sc_req),
    .resp_valid(c_resp_valid), .resp(c_resp),
    .lm_cmd, .lm_stat, .dm_cmd, .dm_stat,
    .prr_is_dm(dm_cfg), .dm_req, .dm_req_prr, .dm_req_ch, .dm_grant, .dm_deny,
    .dm_release, .mem_busy
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_slot
    if (port_t'(p) == LM_PORT) begin : g_lm
      memory_task #(.DEPTH(LM_DEPTH)) u_lm (
        .clk, .rst_n, .my_addr(LM_PORT), .cmd(lm_cmd), .stat(lm_stat),
        .stored_words(),
        .rx_valid(n_ov[p]), .rx_ready(n_or[p]), .rx_flit(n_of[p]),
        .tx_valid(n_iv[p]), .tx_ready(n_ir[p]), .tx_flit(n_if[p])
      );
      assign c_sc_valid[p] = 1'b0;
      assign c_sc_req[p]   = '0;
      assign dm_stat[p]    = '0;
    end else if (port_t'(p) == TG_PORT) begin : g_tg
      traffic_gen u_tg (
        .clk, .rst_n, .my_addr(TG_PORT),
        .start(tg_start), .ch(tg_ch), .nwords(tg_nwords), .seed(tg_seed),
        .busy(tg_busy), .done(tg_done), .status(tg_status),
        .sc_valid(c_sc_valid[p]), .sc_ready(c_sc_ready[p]), .sc_req(c_sc_req[p]),
        .resp_valid(c_resp_valid[p]), .resp(c_resp[p]),
        .tx_valid(n_iv[p]), .tx_ready(n_ir[p]), .tx_flit(n_if[p]),
        .rx_valid(n_ov[p]), .rx_ready(n_or[p]), .rx_flit(n_of[p])
      );
      assign dm_stat[p] = '0;
    end else begin : g_prr
      logic  d_rx_ready, d_tx_valid;
      flit_t d_tx_flit;

      dyn_memory_task #(.DEPTH(DM_DEPTH)) u_dm (
        .clk, .rst_n, .configured(dm_cfg[p]), .prr_addr(port_t'(p)),
        .cmd(dm_cmd[p]), .stat(dm_stat[p]),
        .rx_valid(n_ov[p]), .rx_ready(d_rx_ready), .rx_flit(n_of[p]),
        .tx_valid(d_tx_valid), .tx_ready(n_ir[p]), .tx_flit(d_tx_flit)
      );

      // the PRR holds either the outside task or the DM
      assign c_sc_valid[p] = task_sc_valid[p] && !dm_cfg[p];
      assign c_sc_req[p]   = task_sc_req[p];
      assign n_iv[p] = dm_cfg[p] ? d_tx_valid : task_tx_valid[p];
      assign n_if[p] = dm_cfg[p] ? d_tx_flit  : task_tx_flit[p];
      assign n_or[p] = dm_cfg[p] ? d_rx_ready : task_rx_ready[p];
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_out
    localparam bit OUTSIDE = (port_t'(p) != LM_PORT) && (port_t'(p) != TG_PORT);
    assign task_sc_ready[p]   = OUTSIDE && c_sc_ready[p] && !dm_cfg[p];
    assign task_resp_valid[p] = OUTSIDE && c_resp_valid[p];
    assign task_resp[p]       = c_resp[p];
    assign task_tx_ready[p]   = OUTSIDE && !dm_cfg[p] && n_ir[p];
    assign task_rx_valid[p]   = OUTSIDE && !dm_cfg[p] && n_ov[p];
    assign task_rx_flit[p]    = n_of[p];
  end

  assign lm_overflow = lm_stat.overflow;
endmodule
