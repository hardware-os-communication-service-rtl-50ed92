// traffic_gen: the random traffic generator hardware task. On `start` it
// performs OPEN(ch, w) with the communication service, sends `nwords`
// pseudo-random 32-bit words to the network address the service returns,
// and then CLOSE(ch). The words come from a 32-bit Galois LFSR with taps
// x^32 + x^22 + x^2 + x + 1, loaded from `seed` (0 is replaced by 1); the
// first word sent is the seed itself. If the service answers RS_GLOBAL or
// RS_ERR nothing is sent and no CLOSE follows. `done` pulses at the end and
// `status` keeps the answer to the OPEN. Flits arriving on its receive port
// are accepted and dropped.
//
// Timing: one word per cycle while tx_ready is high; the last word carries
// the `last` flag. The document names this task only; its sequence of
// system calls follows the document's task programs, the rest is this
// design's own.
module traffic_gen
  import hwos_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  port_t      my_addr,
  input  logic       start,
  input  ch_t        ch,
  input  logic [15:0] nwords,
  input  word_t      seed,
  output logic       busy,
  output logic       done,
  output sc_status_e status,
  // system calls
  output logic       sc_valid,
  input  logic       sc_ready,
  output syscall_t   sc_req,
  input  logic       resp_valid,
  input  sc_resp_t   resp,
  // network
  output logic       tx_valid,
  input  logic       tx_ready,
  output flit_t      tx_flit,
  input  logic       rx_valid,
  output logic       rx_ready,
  input  flit_t      rx_flit
);
  typedef enum logic [2:0] {
    G_IDLE, G_OPEN, G_WAIT_OPEN, G_SEND, G_CLOSE, G_WAIT_CLOSE, G_DONE
  } tg_state_e;

  tg_state_e   state;
  ch_t         ch_q;
  logic [15:0] left;
  word_t       lfsr;
  port_t       peer_q;

  function automatic word_t lfsr_next(word_t s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= G_IDLE;
      ch_q   <= '0;
      left   <= '0;
      lfsr   <= 32'd1;
      peer_q <= '0;
      status <= RS_OK;
    end else begin
      unique case (state)
        G_IDLE:
          if (start) begin
            ch_q  <= ch;
            left  <= nwords;
            lfsr  <= (seed == '0) ? 32'd1 : seed;
            state <= G_OPEN;
          end
        G_OPEN:
          if (sc_ready) state <= G_WAIT_OPEN;
        G_WAIT_OPEN:
          if (resp_valid) begin
            status <= resp.status;
            peer_q <= resp.peer;
            if (resp.status inside {RS_DIRECT, RS_MEM})
              state <= (left == '0) ? G_CLOSE : G_SEND;
            else
              state <= G_DONE;
          end
        G_SEND:
          if (tx_ready) begin
            lfsr <= lfsr_next(lfsr);
            left <= left - 1'b1;
            if (left == 16'd1) state <= G_CLOSE;
          end
        G_CLOSE:
          if (sc_ready) state <= G_WAIT_CLOSE;
        G_WAIT_CLOSE:
          if (resp_valid) state <= G_DONE;
        G_DONE:
          state <= G_IDLE;
        default: state <= G_IDLE;
      endcase
    end
  end

  assign busy      = (state != G_IDLE);
  assign done      = (state == G_DONE);
  assign sc_valid  = (state == G_OPEN) || (state == G_CLOSE);
  assign sc_req.op   = (state == G_CLOSE) ? SC_CLOSE : SC_OPEN;
  assign sc_req.mode = MODE_W;
  assign sc_req.ch   = ch_q;
  assign tx_valid  = (state == G_SEND);
  assign tx_flit.dest = peer_q;
  assign tx_flit.src  = my_addr;
  assign tx_flit.ch   = ch_q;
  assign tx_flit.last = (left == 16'd1);
  assign tx_flit.data = lfsr;
  assign rx_ready  = 1'b1;

  logic unused_rx;
  assign unused_rx = rx_valid ^ (^rx_flit);
endmodule
