// Shared constants and types of the f(4,4,4) circuit-switched Clos network.
//
// The network sizes (three stages of four 4x4 switches, 8-bit data links, 4-bit
// arbiter priorities and a 6-bit arbiter address) follow the design's description
// and its simulation traces. The arbitration-scheme encoding, the input-control
// states and the routing modes are this implementation's own choices.
package clos_pkg;

  // Network geometry f(p, q, r): q inputs per first-stage switch, r first-stage
  // switches, p middle-stage switches. The main configuration is f(4,4,4).
  localparam int unsigned NET_P      = 4;
  localparam int unsigned NET_Q      = 4;
  localparam int unsigned NET_R      = 4;
  localparam int unsigned NET_STAGES = 3;

  localparam int unsigned DEF_DATA_W = 8;  // width of every data link
  localparam int unsigned DEF_PRIO_W = 4;  // width of one priority-table entry

  // Arbitration scheme run by every output arbiter.
  typedef enum logic [1:0] {
    SCHEME_GBW   = 2'd0,  // guaranteed bandwidth: winner's priority drops by one per grant
    SCHEME_FIXED = 2'd1,  // fixed priority: programmed priorities, never changed
    SCHEME_RR    = 2'd2   // round robin: rotate from the last granted master
  } scheme_e;

  // How an input control picks the output it asks for.
  typedef enum logic [1:0] {
    ROUTE_ADAPTIVE = 2'd0,  // any free output (first stage: any middle switch)
    ROUTE_FIELD    = 2'd1   // a fixed field of the destination address
  } route_mode_e;

  // Input-control connection states.
  typedef enum logic [1:0] {
    IC_IDLE = 2'd0,  // no connection on this input
    IC_WAIT = 2'd1,  // probe latched, waiting for an output to be granted
    IC_CONN = 2'd2   // connected through the crossbar to one output
  } ic_state_e;

endpackage
