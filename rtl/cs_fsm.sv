// cs_fsm: the communication service's dedicated FSM for one PRR (csFSM_i).
// It takes the OPEN and CLOSE system calls of the task configured in its
// PRR, decides how the channel is served and answers with the network
// address the task must use. It also holds the monitor (lm_fsm) of a
// dynamic memory task (DM) when the scheduler has configured one in this
// PRR; while prr_is_dm[PRR_ID] is set the PRR takes no system calls.
//
// Every call runs under the CS lock, so the Shared Table read-modify-write
// is atomic: IDLE -> REQ (wait for lock) -> LOOKUP (read entry, decide) ->
// UPDATE (write entry / command a memory) -> RESP.
//   OPEN(ch, w): a reader has the channel open -> direct, peer = reader.
//     Otherwise the writer would block: the channel is given to the local
//     memory (LM) if free, else to a free configured DM, via MC_RECV; the
//     FSM waits in WAIT_MEM until that memory is open for receiving, records
//     it in the table (ST_UPD) and answers RS_MEM with the memory's address.
//     If no memory is free it asks the scheduler (SCHED, dm_req): a grant
//     means a DM has been configured and the decision is made again; a
//     denial answers RS_GLOBAL (the task uses global memory).
//   OPEN(ch, r): registers the reader. If the data is in a memory, that
//     memory is told to send it here (MC_SEND) and the answer is RS_MEM;
//     if a writer is open it is RS_DIRECT; else RS_OK.
//   CLOSE(ch, w/r): clears the caller's side; a reader's close releases the
//     channel's memory (MC_RELEASE).
// A second writer or reader on a channel, or a close by a task that does
// not hold the channel, answers RS_ERR and changes nothing.
//
// Timing, with no wait for the lock: resp_valid rises 4 cycles after the
// cycle in which the call is accepted (5 cycles in all) for direct and
// non-memory calls, and 10 cycles after (11 in all) when a memory task has
// to be opened. These two figures are the document's; the state sequence
// that produces them is this design's own. resp_valid is a one-cycle pulse.
module cs_fsm
  import hwos_pkg::*;
#(
  parameter port_t PRR_ID  = 3'd0,
  parameter port_t LM_PORT = 3'd4
) (
  input  logic      clk,
  input  logic      rst_n,
  // system calls of the task in this PRR
  input  logic      sc_valid,
  output logic      sc_ready,
  input  syscall_t  sc_req,
  output logic      resp_valid,
  output sc_resp_t  resp,
  // CS lock and Shared Table
  output logic      lock_req,
  input  logic      lock_gnt,
  output ch_t       st_rd_ch,
  input  st_entry_t st_rd_entry,
  output logic      st_we,
  output st_entry_t st_wr_entry,
  // memory command bus (driven by the lock holder) and memory status
  output mc_bus_t   mc_out,
  input  mc_bus_t   mc_in,
  input  logic [NMEM-1:0]   mem_busy,
  input  logic [NMEM-1:0]   mem_opened,
  input  logic [NPORTS-1:0] prr_is_dm,
  // scheduler
  output logic      dm_req,
  input  logic      dm_grant,
  input  logic      dm_deny,
  // the DM that may be configured in this PRR
  output mt_cmd_t   dm_cmd,
  input  mt_stat_t  dm_stat,
  output logic      dm_busy,
  output logic      dm_opened,
  output logic      dm_released
);
  typedef enum logic [2:0] {
    C_IDLE, C_REQ, C_LOOKUP, C_UPDATE, C_SCHED, C_WAIT_MEM, C_ST_UPD, C_RESP
  } cs_state_e;

  typedef enum logic [1:0] {
    N_RESP,   // write the entry (if wr) and answer
    N_MEM,    // open memory mem_q as receiver
    N_SCHED   // escalate to the scheduler
  } next_e;

  cs_state_e state;
  syscall_t  req_q;
  st_entry_t e, new_e, new_q;
  sc_resp_t  rsp, resp_q;
  logic      wr, wr_q;
  mc_bus_t   mc_d, mc_q;
  next_e     nx, nx_q;
  mem_id_t   pick;
  logic      pick_ok;
  mem_id_t   mem_q;

  localparam mem_id_t MY_MEM = mem_id_t'(PRR_ID) + 1'b1;

  function automatic port_t mem_port(mem_id_t id);
    return (id == '0) ? LM_PORT : port_t'(id - 1'b1);
  endfunction

  // ---- DM monitor of this PRR
  lm_fsm u_dm_mon (
    .clk, .rst_n, .my_id(MY_MEM), .mc(mc_in),
    .mt_cmd(dm_cmd), .mt_stat(dm_stat),
    .busy(dm_busy), .opened(dm_opened), .released(dm_released), .cur_ch()
  );

  // ---- free memory: the LM first, then the lowest configured free DM
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    if (!mem_busy[0]) begin
      pick_ok = 1'b1;
    end else begin
      for (int k = NPORTS - 1; k >= 0; k--)
        if (prr_is_dm[k] && !mem_busy[k+1]) begin
          pick_ok = 1'b1;
          pick    = mem_id_t'(k + 1);
        end
    end
  end

  // ---- decision on the table entry
  assign st_rd_ch = req_q.ch;
  assign e        = st_rd_entry;

  always_comb begin
    new_e = e;
    wr    = 1'b0;
    nx    = N_RESP;
    rsp.status = RS_ERR;
    rsp.peer   = PRR_ID;
    mc_d  = '0;
    mc_d.ch = req_q.ch;
    if (req_q.op == SC_OPEN && req_q.mode == MODE_W) begin
      if (e.w_open || e.in_mem) begin
        rsp.status = RS_ERR;
      end else if (e.r_open) begin
        new_e.w_open = 1'b1;
        new_e.w_prr  = PRR_ID;
        wr           = 1'b1;
        rsp.status   = RS_DIRECT;
        rsp.peer     = e.r_prr;
      end else if (pick_ok) begin
        nx           = N_MEM;
        new_e.w_open = 1'b1;
        new_e.w_prr  = PRR_ID;
        new_e.in_mem = 1'b1;
        new_e.mem    = pick;
        wr           = 1'b1;
        rsp.status   = RS_MEM;
        rsp.peer     = mem_port(pick);
        mc_d.valid   = 1'b1;
        mc_d.cmd     = MC_RECV;
        mc_d.target  = pick;
      end else begin
        nx = N_SCHED;
      end
    end else if (req_q.op == SC_OPEN) begin
      if (e.r_open) begin
        rsp.status = RS_ERR;
      end else begin
        new_e.r_open = 1'b1;
        new_e.r_prr  = PRR_ID;
        wr           = 1'b1;
        if (e.in_mem) begin
          rsp.status  = RS_MEM;
          rsp.peer    = mem_port(e.mem);
          mc_d.valid  = 1'b1;
          mc_d.cmd    = MC_SEND;
          mc_d.target = e.mem;
          mc_d.peer   = PRR_ID;
        end else if (e.w_open) begin
          rsp.status = RS_DIRECT;
          rsp.peer   = e.w_prr;
        end else begin
          rsp.status = RS_OK;
        end
      end
    end else if (req_q.mode == MODE_W) begin
      if (e.w_open && e.w_prr == PRR_ID) begin
        new_e.w_open = 1'b0;
        wr           = 1'b1;
        rsp.status   = RS_OK;
      end
    end else begin
      if (e.r_open && e.r_prr == PRR_ID) begin
        new_e.r_open = 1'b0;
        wr           = 1'b1;
        rsp.status   = RS_OK;
        if (e.in_mem) begin
          new_e.in_mem = 1'b0;
          mc_d.valid   = 1'b1;
          mc_d.cmd     = MC_RELEASE;
          mc_d.target  = e.mem;
        end
      end
    end
    // a channel with no writer, no reader and no buffered data is cleared
    if (!new_e.w_open && !new_e.r_open && !new_e.in_mem) new_e = '0;
  end

  // ---- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= C_IDLE;
      req_q  <= '0;
      new_q  <= '0;
      resp_q <= '0;
      wr_q   <= 1'b0;
      mc_q   <= '0;
      nx_q   <= N_RESP;
      mem_q  <= '0;
    end else begin
      unique case (state)
        C_IDLE:
          if (sc_valid && sc_ready) begin
            req_q <= sc_req;
            state <= C_REQ;
          end
        C_REQ:
          if (lock_gnt) state <= C_LOOKUP;
        C_LOOKUP: begin
          new_q  <= new_e;
          resp_q <= rsp;
          wr_q   <= wr;
          mc_q   <= mc_d;
          nx_q   <= nx;
          mem_q  <= mc_d.target;
          state  <= C_UPDATE;
        end
        C_UPDATE:
          unique case (nx_q)
            N_MEM:   state <= C_WAIT_MEM;
            N_SCHED: state <= C_SCHED;
            default: state <= C_RESP;
          endcase
        C_SCHED:
          if (dm_grant) begin
            state <= C_LOOKUP;
          end else if (dm_deny) begin
            resp_q.status <= RS_GLOBAL;
            resp_q.peer   <= PRR_ID;
            state         <= C_RESP;
          end
        C_WAIT_MEM:
          if (mem_opened[mem_q]) state <= C_ST_UPD;
        C_ST_UPD:
          state <= C_RESP;
        C_RESP:
          state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  assign sc_ready    = (state == C_IDLE) && !prr_is_dm[PRR_ID];
  assign lock_req    = (state inside {C_REQ, C_LOOKUP, C_UPDATE, C_SCHED, C_WAIT_MEM, C_ST_UPD});
  assign dm_req      = (state == C_SCHED);
  assign resp_valid  = (state == C_RESP);
  assign resp        = resp_q;
  // the entry is written in UPDATE, except for a memory that must first open
  assign st_we       = ((state == C_UPDATE) && wr_q && nx_q == N_RESP) || (state == C_ST_UPD);
  assign st_wr_entry = new_q;
  always_comb begin
    mc_out = mc_q;
    mc_out.valid = mc_q.valid && (state == C_UPDATE);
  end

  // Table and command bus are used only under the lock.
  a_lock_held: assert property (@(posedge clk) disable iff (!rst_n)
    (st_we || mc_out.valid) |-> lock_gnt);
endmodule
