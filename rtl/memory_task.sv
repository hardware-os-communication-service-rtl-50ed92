// memory_task: a storage task that sits on a network port and acts as the
// receiving or the sending end of a channel on behalf of the communication
// service (CS). It holds the LM_FSM, a network interface and a single-port
// BRAM (sp_bram).
//
// LM_FSM: IDLE --Recv--> OPEN_R -> RECV -> IDLE, and
//         IDLE --Send--> OPEN_S -> SEND -> CLOSE -> IDLE.
// A Recv command (cmd.op = MT_RECV) names the channel; in RECV every flit of
// that channel is written to the BRAM at the next address until the flit
// marked last, then recv_done pulses and the word count is kept. A Send
// command names the destination port; in SEND the stored words are read
// back in order and sent as flits of the stored channel to that port, the
// final one marked last; CLOSE pulses send_done. The network interface
// always accepts flits (rx_ready = 1) so that nothing stalls the network;
// flits of another channel, or arriving outside RECV, are dropped. Words
// beyond DEPTH are dropped and set the sticky overflow flag.
//
// Timing: a command is taken in IDLE only; rx_open rises two cycles after
// the Recv command. Storing runs at one word per cycle. Sending starts
// three cycles after the Send command and then runs at one word per cycle
// while tx_ready stays high (BRAM reads are prefetched into a two-entry
// buffer).
//
// The state diagram, the BRAM and the network interface follow the
// document; the command/status encoding, the word size and the drop
// policy are this design's choices.
module memory_task
  import hwos_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  input  port_t    my_addr,
  input  mt_cmd_t  cmd,
  output mt_stat_t stat,
  output logic [$clog2(DEPTH+1)-1:0] stored_words,
  // network interface
  input  logic     rx_valid,
  output logic     rx_ready,
  input  flit_t    rx_flit,
  output logic     tx_valid,
  input  logic     tx_ready,
  output flit_t    tx_flit
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_OPEN_R, S_RECV, S_OPEN_S, S_SEND, S_CLOSE
  } lm_state_e;

  lm_state_e state;
  ch_t       ch_q;
  port_t     peer_q;
  logic [CW-1:0] wp, count_q, rd_ptr, sent;
  logic      inflight, inflight_last;
  logic      overflow_q, recv_done_q;

  // BRAM port
  logic          ram_en, ram_we;
  logic [AW-1:0] ram_addr;
  word_t         ram_rdata;

  // read-out buffer
  logic       fifo_in_ready;
  logic [1:0] fifo_count;
  flit_t      fifo_in;

  logic rx_take, rx_match, do_write, do_read;

  assign rx_ready = 1'b1;
  assign rx_take  = rx_valid;
  assign rx_match = rx_take && (state == S_RECV) && (rx_flit.ch == ch_q);
  assign do_write = rx_match && (wp < CW'(DEPTH));
  // read when the buffer will have room for the word one cycle later,
  // counting the word in flight and the word leaving this cycle
  assign do_read  = (state == S_SEND) && (rd_ptr < count_q) &&
                    ({1'b0, fifo_count} + {2'b0, inflight} - {2'b0, tx_valid && tx_ready} < 3'd2);

  always_comb begin
    ram_en   = do_write || do_read;
    ram_we   = do_write;
    ram_addr = do_write ? wp[AW-1:0] : rd_ptr[AW-1:0];
  end

  sp_bram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_bram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr),
    .wdata(rx_flit.data), .rdata(ram_rdata)
  );

  always_comb begin
    fifo_in.dest = peer_q;
    fifo_in.src  = my_addr;
    fifo_in.ch   = ch_q;
    fifo_in.last = inflight_last;
    fifo_in.data = ram_rdata;
  end

  sync_fifo #(.T(flit_t), .DEPTH(2)) u_txq (
    .clk, .rst_n,
    .in_valid(inflight), .in_ready(fifo_in_ready), .in_data(fifo_in),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_flit),
    .count(fifo_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      ch_q          <= '0;
      peer_q        <= '0;
      wp            <= '0;
      count_q       <= '0;
      rd_ptr        <= '0;
      sent          <= '0;
      inflight      <= 1'b0;
      inflight_last <= 1'b0;
      overflow_q    <= 1'b0;
      recv_done_q   <= 1'b0;
    end else begin
      recv_done_q <= 1'b0;
      inflight    <= do_read;
      inflight_last <= do_read && (rd_ptr == count_q - 1'b1);
      if (do_read) rd_ptr <= rd_ptr + 1'b1;
      unique case (state)
        S_IDLE:
          if (cmd.valid) begin
            if (cmd.op == MT_RECV) begin
              ch_q  <= cmd.ch;
              state <= S_OPEN_R;
            end else begin
              peer_q <= cmd.peer;
              state  <= S_OPEN_S;
            end
          end
        S_OPEN_R: begin
          wp         <= '0;
          overflow_q <= 1'b0;
          state      <= S_RECV;
        end
        S_RECV:
          if (rx_match) begin
            if (do_write) wp <= wp + 1'b1;
            else          overflow_q <= 1'b1;
            if (rx_flit.last) begin
              count_q     <= do_write ? wp + 1'b1 : wp;
              recv_done_q <= 1'b1;
              state       <= S_IDLE;
            end
          end
        S_OPEN_S: begin
          rd_ptr <= '0;
          sent   <= '0;
          state  <= (count_q == '0) ? S_CLOSE : S_SEND;
        end
        S_SEND: begin
          if (tx_valid && tx_ready) begin
            sent <= sent + 1'b1;
            if (sent + 1'b1 == count_q) state <= S_CLOSE;
          end
        end
        S_CLOSE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign stat.idle      = (state == S_IDLE);
  assign stat.rx_open   = (state == S_RECV);
  assign stat.recv_done = recv_done_q;
  assign stat.send_done = (state == S_CLOSE);
  assign stat.overflow  = overflow_q;
  assign stored_words   = count_q;

  // The prefetch never overruns the two-entry read-out buffer.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    inflight |-> fifo_in_ready);
endmodule
