// lm_fsm: the communication service's monitor of one memory task (lmFSM for
// the static local memory; each csFSM holds one for a dynamic memory task in
// its PRR). It owns the memory for exactly one blocked channel at a time.
//
// States: FREE -> OPENING -> RECEIVING -> HOLDING -> SENDING -> DRAINED -> FREE.
// An MC_RECV command on the CS command bus addressed to MEM_ID wakes it: it
// tells the memory task to open as the channel's receiver and reports
// `opened` once the task is in its receive state. An MC_SEND command (the
// reader has opened the channel) is remembered and turned into a Send
// command for the memory task as soon as all data is stored. After the task
// has sent everything, the monitor stays occupied until MC_RELEASE (the
// reader has closed the channel), then pulses `released` and is free.
// A second blocked channel cannot use the memory before that, even if the
// memory is not full.
//
// Timing: the command to the memory task is registered, and the task's
// status is registered once at the monitor's input before `opened` is
// derived (also registered). With memory_task this makes `opened` rise five
// cycles after the MC_RECV command is on the bus.
module lm_fsm
  import hwos_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  mem_id_t  my_id,
  input  mc_bus_t  mc,
  output mt_cmd_t  mt_cmd,
  input  mt_stat_t mt_stat,
  output logic     busy,
  output logic     opened,    // one-cycle pulse: memory ready to receive
  output logic     released,  // one-cycle pulse: memory free again
  output ch_t      cur_ch
);
  typedef enum logic [2:0] {
    M_FREE, M_OPENING, M_RECEIVING, M_HOLDING, M_SENDING, M_DRAINED
  } mon_state_e;

  mon_state_e state;
  mt_stat_t   stat_q;
  logic       send_pend, rel_pend;
  port_t      peer_q;
  logic       hit;

  assign hit = mc.valid && (mc.target == my_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_FREE;
      stat_q    <= '0;
      send_pend <= 1'b0;
      rel_pend  <= 1'b0;
      peer_q    <= '0;
      cur_ch    <= '0;
      mt_cmd    <= '0;
      opened    <= 1'b0;
      released  <= 1'b0;
    end else begin
      stat_q   <= mt_stat;
      mt_cmd   <= '0;
      opened   <= 1'b0;
      released <= 1'b0;
      if (hit && mc.cmd == MC_SEND && state != M_FREE) begin
        send_pend <= 1'b1;
        peer_q    <= mc.peer;
      end
      if (hit && mc.cmd == MC_RELEASE && state != M_FREE) rel_pend <= 1'b1;
      unique case (state)
        M_FREE:
          if (hit && mc.cmd == MC_RECV) begin
            cur_ch       <= mc.ch;
            send_pend    <= 1'b0;
            rel_pend     <= 1'b0;
            mt_cmd.valid <= 1'b1;
            mt_cmd.op    <= MT_RECV;
            mt_cmd.ch    <= mc.ch;
            state        <= M_OPENING;
          end
        M_OPENING:
          if (stat_q.rx_open) begin
            opened <= 1'b1;
            state  <= M_RECEIVING;
          end
        M_RECEIVING:
          if (stat_q.recv_done) state <= M_HOLDING;
        M_HOLDING:
          if (send_pend) begin
            mt_cmd.valid <= 1'b1;
            mt_cmd.op    <= MT_SEND;
            mt_cmd.ch    <= cur_ch;
            mt_cmd.peer  <= peer_q;
            state        <= M_SENDING;
          end
        M_SENDING:
          if (stat_q.send_done) state <= M_DRAINED;
        M_DRAINED:
          if (rel_pend || (hit && mc.cmd == MC_RELEASE)) begin
            released <= 1'b1;
            send_pend <= 1'b0;
            rel_pend  <= 1'b0;
            state     <= M_FREE;
          end
        default: state <= M_FREE;
      endcase
    end
  end

  assign busy = (state != M_FREE);

  // Only a free memory may be given a new channel.
  a_recv_only_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    (hit && mc.cmd == MC_RECV) |-> (state == M_FREE));
endmodule
