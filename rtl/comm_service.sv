// comm_service: the hardware OS communication service (CS). It gives the
// hardware tasks in the PRRs OPEN/CLOSE system calls on logical channels and
// sets up each channel over the network without the tasks knowing where
// their peer is: directly to the peer task when both ends are open
// (non-blocking), or through a memory task when the writer would otherwise
// block: the static local memory (LM) first, then a dynamic memory task (DM)
// that the scheduler has configured in a PRR, and if neither is free the
// decision goes to the scheduler (DM or global memory).
//
// Inside: one cs_fsm per PRR (none for LM_PORT, which holds the LM), the LM
// monitor lm_fsm (lmFSM_1), the Shared Table and a lock. A csFSM takes the
// lock (round-robin among requesters) for the whole of a call, so table
// updates and memory commands of different PRRs never interleave. The lock
// holder drives the Shared Table write port and the memory command bus.
//
// Interfaces (arrays indexed by PRR network address):
//   sc_*/resp_*  system calls of the task in each PRR (see cs_fsm).
//   lm_cmd/lm_stat  control of the LM memory_task.
//   dm_cmd/dm_stat  control of the DM that may sit in each PRR.
//   prr_is_dm    from the scheduler: PRR k currently holds a DM.
//   dm_req/dm_req_prr/dm_req_ch, dm_grant/dm_deny  escalation to the scheduler.
//   dm_release   pulse: the DM in PRR k is free and may be removed.
//   mem_busy     occupancy of every memory (bit 0 LM, bit 1+k DM in PRR k).
// Timing: 5 cycles for a call that needs no memory, 11 when the LM or a DM
// has to be opened (no lock contention); calls of different PRRs are
// served one after another.
module comm_service
  import hwos_pkg::*;
#(
  parameter port_t LM_PORT = 3'd4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sc_valid  [NPORTS],
  output logic      sc_ready  [NPORTS],
  input  syscall_t  sc_req    [NPORTS],
  output logic      resp_valid[NPORTS],
  output sc_resp_t  resp      [NPORTS],
  output mt_cmd_t   lm_cmd,
  input  mt_stat_t  lm_stat,
  output mt_cmd_t   dm_cmd    [NPORTS],
  input  mt_stat_t  dm_stat   [NPORTS],
  input  logic [NPORTS-1:0] prr_is_dm,
  output logic      dm_req,
  output port_t     dm_req_prr,
  output ch_t       dm_req_ch,
  input  logic      dm_grant,
  input  logic      dm_deny,
  output logic [NPORTS-1:0] dm_release,
  output logic [NMEM-1:0]   mem_busy
);
  logic [NPORTS-1:0] lock_req, lock_gnt, arb_gnt, f_dm_req;
  logic [ADDR_W-1:0] arb_idx;
  logic              owner_valid;
  port_t             owner;

  ch_t       f_rd_ch [NPORTS];
  logic      f_we    [NPORTS];
  st_entry_t f_wr    [NPORTS];
  mc_bus_t   f_mc    [NPORTS];
  st_entry_t rd_entry;
  mc_bus_t   mc;
  logic [NMEM-1:0]   mem_opened;
  logic [NPORTS-1:0] dm_map;

  // ---- lock
  rr_arbiter #(.N(NPORTS)) u_lock_arb (
    .clk, .rst_n, .req(lock_req), .advance(!owner_valid),
    .gnt(arb_gnt), .gnt_idx(arb_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_valid <= 1'b0;
      owner       <= '0;
    end else if (owner_valid) begin
      if (!lock_req[owner]) owner_valid <= 1'b0;
    end else if (lock_req != '0) begin
      owner_valid <= 1'b1;
      owner       <= arb_idx;
    end
  end

  always_comb
    for (int i = 0; i < NPORTS; i++)
      lock_gnt[i] = owner_valid ? (owner == port_t'(i)) : arb_gnt[i];

  // ---- Shared Table, accessed by the lock holder
  shared_table u_st (
    .clk, .rst_n,
    .rd_ch(f_rd_ch[owner]), .rd_entry,
    .we(owner_valid && f_we[owner]), .wr_ch(f_rd_ch[owner]), .wr_entry(f_wr[owner]),
    .ch_busy()
  );

  always_comb begin
    mc = f_mc[owner];
    mc.valid = owner_valid && f_mc[owner].valid;
  end

  // ---- LM monitor (lmFSM)
  lm_fsm u_lm_mon (
    .clk, .rst_n, .my_id('0), .mc,
    .mt_cmd(lm_cmd), .mt_stat(lm_stat),
    .busy(mem_busy[0]), .opened(mem_opened[0]), .released(), .cur_ch()
  );

  always_comb begin
    dm_map = prr_is_dm;
    dm_map[LM_PORT] = 1'b0;
  end

  // ---- one csFSM per task PRR
  for (genvar p = 0; p < NPORTS; p++) begin : g_prr
    if (port_t'(p) == LM_PORT) begin : g_lm_slot
      assign sc_ready[p]   = 1'b0;
      assign resp_valid[p] = 1'b0;
      assign resp[p]       = '0;
      assign lock_req[p]   = 1'b0;
      assign f_rd_ch[p]    = '0;
      assign f_we[p]       = 1'b0;
      assign f_wr[p]       = '0;
      assign f_mc[p]       = '0;
      assign f_dm_req[p]   = 1'b0;
      assign dm_cmd[p]     = '0;
      assign dm_release[p] = 1'b0;
      assign mem_busy[p+1]   = 1'b1;  // no DM can live in the LM's slot
      assign mem_opened[p+1] = 1'b0;
    end else begin : g_cs
      cs_fsm #(.PRR_ID(port_t'(p)), .LM_PORT(LM_PORT)) u_cs (
        .clk, .rst_n,
        .sc_valid(sc_valid[p]), .sc_ready(sc_ready[p]), .sc_req(sc_req[p]),
        .resp_valid(resp_valid[p]), .resp(resp[p]),
        .lock_req(lock_req[p]), .lock_gnt(lock_gnt[p]),
        .st_rd_ch(f_rd_ch[p]), .st_rd_entry(rd_entry),
        .st_we(f_we[p]), .st_wr_entry(f_wr[p]),
        .mc_out(f_mc[p]), .mc_in(mc),
        .mem_busy, .mem_opened, .prr_is_dm(dm_map),
        .dm_req(f_dm_req[p]), .dm_grant, .dm_deny,
        .dm_cmd(dm_cmd[p]), .dm_stat(dm_stat[p]),
        .dm_busy(mem_busy[p+1]), .dm_opened(mem_opened[p+1]),
        .dm_released(dm_release[p])
      );
    end
  end

  assign dm_req     = owner_valid && f_dm_req[owner];
  assign dm_req_prr = owner;
  assign dm_req_ch  = f_rd_ch[owner];

  // At most one csFSM may hold the lock.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(lock_gnt));
endmodule
