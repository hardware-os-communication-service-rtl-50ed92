// dyn_memory_task: a dynamic memory task (DM), i.e. a memory_task with the
// wrapper that lets it be configured into the dynamic part of a PRR. The
// wrapper isolates the task while the PRR does not hold it (configured = 0):
// the task is held in reset, its network outputs are forced idle and its
// status reads all zero, so a PRR slot can switch between a regular task
// and the DM without stray traffic. The address of the PRR it is placed in
// is an input, so the same DM serves any PRR.
//
// Timing is that of memory_task once configured; the task leaves reset, in
// its IDLE state, one cycle after `configured` rises, and is isolated and
// reset again one cycle after it falls. The DM size
// (DEPTH words) must fit the dynamic part of a PRR; the default is this
// design's choice.
module dyn_memory_task
  import hwos_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     configured,
  input  port_t    prr_addr,
  input  mt_cmd_t  cmd,
  output mt_stat_t stat,
  input  logic     rx_valid,
  output logic     rx_ready,
  input  flit_t    rx_flit,
  output logic     tx_valid,
  input  logic     tx_ready,
  output flit_t    tx_flit
);
  logic     task_rst_n;
  mt_stat_t t_stat;
  logic     t_rx_ready, t_tx_valid;
  flit_t    t_tx_flit;

  // the task leaves reset on the clock edge after `configured` rises
  logic cfg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_q <= 1'b0;
    else        cfg_q <= configured;
  end
  assign task_rst_n = cfg_q;

  memory_task #(.DEPTH(DEPTH)) u_task (
    .clk, .rst_n(task_rst_n), .my_addr(prr_addr),
    .cmd(cfg_q ? cmd : mt_cmd_t'('0)), .stat(t_stat), .stored_words(),
    .rx_valid(rx_valid && cfg_q), .rx_ready(t_rx_ready), .rx_flit,
    .tx_valid(t_tx_valid), .tx_ready(tx_ready && cfg_q), .tx_flit(t_tx_flit)
  );

  assign stat     = cfg_q ? t_stat : mt_stat_t'('0);
  assign rx_ready = cfg_q && t_rx_ready;
  assign tx_valid = cfg_q && t_tx_valid;
  assign tx_flit  = cfg_q ? t_tx_flit : flit_t'('0);
endmodule
