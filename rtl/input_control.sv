// Input control (IC) of one switch input.
//
// A connection is opened by raising `req_in` with a probe on `data_in`; the probe
// carries the destination port address in its low bits, so probes need no wires
// of their own. The IC looks at the status bus (`oc_busy`), picks the output it
// needs and, only if that output is free, asks the arbiter for it on the request
// bus (`req_valid`, `req_port`). In ROUTE_ADAPTIVE mode (first stage) any free
// output will do and the lowest-numbered free one is asked for; in ROUTE_FIELD
// mode the output is the destination field data_in[FIELD_LSB +: log2(N_OUT)].
// When `granted` comes back the IC holds the connection until `req_in` drops; a
// request that is not granted keeps being retried, with the latched probe field,
// while `req_in` stays high. The answer of the downstream path (`ans_grant`,
// routed back by the owning output control) is registered and returned upstream on
// `ans_in`.
//
// Timing: the request is combinational from the inputs, so a probe arriving in
// cycle t can be granted in cycle t; the state and `ans_in` change on the clock
// edge. Synchronous active-low reset.
//
// The IC's job (probe in, status check, request to the arbiter, answer back over
// the grant bus) follows the design's description; the probe format, the adaptive
// lowest-free-output choice of the first stage, the retry while blocked and the
// release on a dropped request are this implementation's choices.
module input_control #(
  parameter int unsigned          N_OUT      = 4,
  parameter int unsigned          DATA_W     = clos_pkg::DEF_DATA_W,
  parameter clos_pkg::route_mode_e ROUTE_MODE = clos_pkg::ROUTE_FIELD,
  parameter int unsigned          FIELD_LSB  = 0,
  localparam int unsigned         PW         = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // link from the previous stage
  input  logic               req_in,
  input  logic [DATA_W-1:0]  data_in,
  output logic               ans_in,
  // status bus
  input  logic [N_OUT-1:0]   oc_busy,
  // request bus
  output logic               req_valid,
  output logic [PW-1:0]      req_port,
  // grant bus
  input  logic               granted,
  input  logic               ans_grant,
  // connection state (observation)
  output clos_pkg::ic_state_e state,
  output logic [PW-1:0]      port
);

  clos_pkg::ic_state_e state_q;
  logic [PW-1:0]       dest_q, port_q;
  logic                ans_q;

  // Output this IC wants in the current cycle.
  logic [PW-1:0] field, target;
  logic          target_ok;

  always_comb begin
    field = (state_q == clos_pkg::IC_IDLE) ? data_in[FIELD_LSB +: PW] : dest_q;
    if (ROUTE_MODE == clos_pkg::ROUTE_ADAPTIVE) begin
      target    = '0;
      target_ok = 1'b0;
      for (int k = N_OUT - 1; k >= 0; k--) begin
        if (!oc_busy[k]) begin
          target    = PW'(k);
          target_ok = 1'b1;
        end
      end
    end else begin
      target    = field;
      target_ok = !oc_busy[field];
    end
  end

  assign req_valid = req_in && (state_q != clos_pkg::IC_CONN) && target_ok;
  assign req_port  = target;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= clos_pkg::IC_IDLE;
      dest_q  <= '0;
      port_q  <= '0;
      ans_q   <= 1'b0;
    end else begin
      ans_q <= (state_q == clos_pkg::IC_CONN) && req_in && ans_grant;
      case (state_q)
        clos_pkg::IC_IDLE, clos_pkg::IC_WAIT: begin
          if (state_q == clos_pkg::IC_IDLE) dest_q <= data_in[FIELD_LSB +: PW];
          if (!req_in) begin
            state_q <= clos_pkg::IC_IDLE;
          end else if (req_valid && granted) begin
            state_q <= clos_pkg::IC_CONN;
            port_q  <= target;
          end else begin
            state_q <= clos_pkg::IC_WAIT;
          end
        end
        default: begin
          if (!req_in) state_q <= clos_pkg::IC_IDLE;
        end
      endcase
    end
  end

  assign ans_in = ans_q;
  assign state  = state_q;
  assign port   = port_q;

  // A grant only answers a request.
  a_grant_needs_request: assert property (@(posedge clk) disable iff (!rst_n) granted |-> req_valid);

endmodule
