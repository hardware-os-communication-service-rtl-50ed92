// hwos_pkg: types and constants shared by the hardware OS communication
// service, the memory tasks, the traffic generator and the on-chip network.
//
// The platform has NPORTS = 8 network ports, one per partially reconfigurable
// region (PRR1..PRR8 are network addresses 0..7), wired to four routers
// R1..R4 as in the experimental set-up: R1 serves PRR1/PRR2, R2 serves
// PRR3/PRR4, R3 serves PRR5/PRR6 and R4 serves PRR7/PRR8; R1 and R2 each link
// to R3 and R4. The data width, the number of channels and the flit format
// are this design's own choices.
//
// A flit carries one data word together with its routing and channel
// information, so every flit is routed on its own (no multi-flit worms).
// Memory identifiers: 0 is the static local memory (LM); 1+k is a dynamic
// memory task (DM) configured in PRR k.
package hwos_pkg;

  localparam int unsigned NPORTS  = 8;   // PRRs on the network
  localparam int unsigned ADDR_W  = 3;   // $clog2(NPORTS)
  localparam int unsigned DATA_W  = 32;  // data word width
  localparam int unsigned CH_W    = 4;   // 16 logical channels
  localparam int unsigned NCH     = 1 << CH_W;
  localparam int unsigned NMEM    = NPORTS + 1;  // LM + one DM slot per PRR
  localparam int unsigned MEMID_W = 4;   // $clog2(NMEM)

  typedef logic [ADDR_W-1:0]  port_t;
  typedef logic [CH_W-1:0]    ch_t;
  typedef logic [MEMID_W-1:0] mem_id_t;
  typedef logic [DATA_W-1:0]  word_t;

  // Network flit
  typedef struct packed {
    port_t dest;
    port_t src;
    ch_t   ch;
    logic  last;
    word_t data;
  } flit_t;

  // System calls raised by a hardware task
  typedef enum logic {SC_OPEN = 1'b0, SC_CLOSE = 1'b1} sc_op_e;
  typedef enum logic {MODE_R = 1'b0, MODE_W = 1'b1} sc_mode_e;

  typedef struct packed {
    sc_op_e   op;
    sc_mode_e mode;
    ch_t      ch;
  } syscall_t;

  // Outcome of a system call
  typedef enum logic [2:0] {
    RS_DIRECT = 3'd0,  // peer task found: non-blocking communication
    RS_MEM    = 3'd1,  // data goes to / comes from a memory task
    RS_OK     = 3'd2,  // reader registered or channel closed
    RS_GLOBAL = 3'd3,  // no memory task: use global memory
    RS_ERR    = 3'd4   // illegal call (channel already open, not owner)
  } sc_status_e;

  typedef struct packed {
    sc_status_e status;
    port_t      peer;   // network address to send to (writer) or of the source (reader)
  } sc_resp_t;

  // Shared Table entry, one per channel
  typedef struct packed {
    logic    w_open;   // a writer has opened the channel and not yet closed it
    port_t   w_prr;
    logic    r_open;   // a reader has opened the channel and not yet closed it
    port_t   r_prr;
    logic    in_mem;   // channel data is (being) buffered in a memory task
    mem_id_t mem;
  } st_entry_t;

  // Commands from the communication service to a memory monitor
  typedef enum logic [1:0] {
    MC_RECV    = 2'd0,  // memory becomes the receiver of a channel
    MC_SEND    = 2'd1,  // memory becomes the sender of its stored data
    MC_RELEASE = 2'd2   // the reader has closed: memory is free again
  } mc_cmd_e;

  typedef struct packed {
    logic    valid;
    mc_cmd_e cmd;
    mem_id_t target;
    ch_t     ch;
    port_t   peer;
  } mc_bus_t;

  // Control of a memory task (from its monitor) ...
  typedef enum logic {MT_RECV = 1'b0, MT_SEND = 1'b1} mt_op_e;

  typedef struct packed {
    logic   valid;
    mt_op_e op;
    ch_t    ch;
    port_t  peer;
  } mt_cmd_t;

  // ... and its status back
  typedef struct packed {
    logic idle;       // LM_FSM in IDLE
    logic rx_open;    // LM_FSM in Recv: ready to take the channel's data
    logic recv_done;  // one-cycle pulse: last word stored
    logic send_done;  // one-cycle pulse: Close state reached after sending
    logic overflow;   // sticky: words were dropped because the memory was full
  } mt_stat_t;

  // Router of a network address, and the output port a router uses for a
  // destination. Router ports: 0 and 1 local PRRs, 2 and 3 links.
  // R1 (0): link 2 -> R3, link 3 -> R4.  R2 (1): link 2 -> R3, link 3 -> R4.
  // R3 (2): link 2 -> R1, link 3 -> R2.  R4 (3): link 2 -> R1, link 3 -> R2.
  // R1<->R2 traffic goes through R3, R3<->R4 traffic goes through R1; the
  // resulting channel dependencies have no cycle.
  function automatic logic [1:0] router_of(port_t a);
    return a[ADDR_W-1:1];
  endfunction

  function automatic logic [1:0] route_port(logic [1:0] r, port_t dest);
    logic [1:0] dr;
    dr = router_of(dest);
    if (dr == r) return {1'b0, dest[0]};
    if (r < 2) begin
      // bottom router R1/R2: R3 via port 2, R4 via port 3, other bottom via R3
      return (dr == 2'd3) ? 2'd3 : 2'd2;
    end
    // top router R3/R4: R1 via port 2, R2 via port 3, other top via R1
    return (dr == 2'd1) ? 2'd3 : 2'd2;
  endfunction

endpackage
