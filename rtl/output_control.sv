// Output control (OC) of one switch output.
//
// An OC is either free or owned by one input control. The switch arbiter seizes a
// free OC for an input through the control bus (`set`, `set_ic`); the OC then
// drives its busy bit on the status bus, tells the crossbar which input to pass,
// forwards that input's request (probe) to the next stage on `req_out`, and routes
// the answer coming back on `ans_out` to its owner only (the owner's line of
// `ans_to_ic`). When the owner's incoming request drops, the OC frees itself on the
// same clock edge on which the input control releases the connection.
//
// Timing: `req_out` is registered, in step with the registered crossbar output, so
// the forward path has one register per stage; `ans_to_ic` is combinational.
// Synchronous active-low reset frees the output.
//
// The OC's role (status bus, control bus, Req_out/Ans_out, answer routed back over
// the grant bus) follows the design's description; the release rule (the owner's
// request dropping) and the register placement are this implementation's choices.
module output_control #(
  parameter int unsigned N_IN = 4,
  localparam int unsigned IW  = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // control bus from the arbiter
  input  logic            set,        // connect this output to input set_ic
  input  logic [IW-1:0]   set_ic,
  // request lines of all inputs of the switch
  input  logic [N_IN-1:0] req_in,
  // status bus
  output logic            busy,
  output logic [IW-1:0]   owner,      // crossbar select
  // link to the next stage
  output logic            req_out,
  input  logic            ans_out,
  // answer routed back to the owner (grant bus)
  output logic [N_IN-1:0] ans_to_ic
);

  logic          busy_q, req_q;
  logic [IW-1:0] owner_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      req_q   <= 1'b0;
    end else begin
      req_q <= busy_q && req_in[owner_q];
      if (busy_q) begin
        if (!req_in[owner_q]) busy_q <= 1'b0;
      end else if (set) begin
        busy_q  <= 1'b1;
        owner_q <= set_ic;
      end
    end
  end

  always_comb begin
    ans_to_ic = '0;
    if (busy_q) ans_to_ic[owner_q] = ans_out;
  end

  assign busy    = busy_q;
  assign owner   = owner_q;
  assign req_out = req_q;

  // The arbiter only seizes free outputs.
  a_set_only_when_free: assert property (@(posedge clk) disable iff (!rst_n) set |-> !busy_q);

endmodule
