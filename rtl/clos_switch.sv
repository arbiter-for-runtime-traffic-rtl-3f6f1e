// N_IN x N_OUT circuit switch, the common building block of all three stages.
//
// The control part has one input control (IC) per input, one output control (OC)
// per output and one switch arbiter; the data part is the crossbar. An IC that
// receives a probe checks the OCs' busy bits (status bus) and asks the arbiter
// for an output (request bus). The arbiter runs one programmable arbiter per OC,
// seizes the OC for the winner (control bus) and answers the IC (grant bus); the
// OC then steers the crossbar, forwards the request, and routes the answer coming
// back from the next stage to the IC. The connection is held until the source
// drops its request, so a switch holds up to min(N_IN, N_OUT) circuits at once.
// The switches of the three stages differ only in how their ICs choose an output
// (ROUTE_MODE, FIELD_LSB).
//
// Link signals follow the figure of the switch: Req_in/Ans_in and the data input
// on the input side, Req_out/Ans_out and the data output on the output side.
// Timing: a probe arriving at a free output is granted in its first cycle and
// appears on req_out/data_out two clock edges later; afterwards data words pass
// with one cycle of latency. Answers take one cycle per switch on the way back.
//
// The structure (ICs, OCs, arbiter, crossbar and the four buses) follows the
// design's description; the timing and the probe format are this implementation's.
module clos_switch #(
  parameter int unsigned           N_IN       = 4,
  parameter int unsigned           N_OUT      = 4,
  parameter int unsigned           DATA_W     = clos_pkg::DEF_DATA_W,
  parameter int unsigned           PRIO_W     = clos_pkg::DEF_PRIO_W,
  parameter clos_pkg::route_mode_e ROUTE_MODE = clos_pkg::ROUTE_FIELD,
  parameter int unsigned           FIELD_LSB  = 0,
  localparam int unsigned          IW         = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned          PW         = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  clos_pkg::scheme_e            scheme,
  // programming of this switch's arbiters
  input  logic                         prog_write,
  input  logic [PW-1:0]                prog_port,
  input  logic [IW-1:0]                prog_master,
  input  logic [PRIO_W-1:0]            prog_priority,
  // input links
  input  logic [N_IN-1:0]              req_in,
  input  logic [N_IN-1:0][DATA_W-1:0]  data_in,
  output logic [N_IN-1:0]              ans_in,
  // output links
  output logic [N_OUT-1:0]             req_out,
  output logic [N_OUT-1:0][DATA_W-1:0] data_out,
  input  logic [N_OUT-1:0]             ans_out,
  // observation
  output logic [N_OUT-1:0]             oc_busy,
  output logic [N_OUT-1:0]             conflict,
  output logic [N_OUT-1:0]             reload,
  output logic [N_IN-1:0]              ic_waiting
);

  // Buses of the control part.
  logic [N_IN-1:0]                ic_req_valid;    // request bus
  logic [N_IN-1:0][PW-1:0]        ic_req_port;
  logic [N_IN-1:0]                ic_granted;      // grant bus
  logic [N_IN-1:0]                ic_ans;
  logic [N_OUT-1:0]               oc_set;          // control bus
  logic [N_OUT-1:0][IW-1:0]       oc_set_ic;
  logic [N_OUT-1:0][IW-1:0]       oc_owner;
  logic [N_OUT-1:0][N_IN-1:0]     oc_ans_to_ic;
  logic [N_OUT-1:0][N_IN-1:0][PRIO_W-1:0] prio_tables;

  for (genvar i = 0; i < N_IN; i++) begin : g_ic
    clos_pkg::ic_state_e st;
    logic [PW-1:0]       port;

    input_control #(
      .N_OUT(N_OUT), .DATA_W(DATA_W), .ROUTE_MODE(ROUTE_MODE), .FIELD_LSB(FIELD_LSB)
    ) u_ic (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_in   (req_in[i]),
      .data_in  (data_in[i]),
      .ans_in   (ans_in[i]),
      .oc_busy  (oc_busy),
      .req_valid(ic_req_valid[i]),
      .req_port (ic_req_port[i]),
      .granted  (ic_granted[i]),
      .ans_grant(ic_ans[i]),
      .state    (st),
      .port     (port)
    );
    assign ic_waiting[i] = (st == clos_pkg::IC_WAIT);

    always_comb begin
      ic_ans[i] = 1'b0;
      for (int k = 0; k < N_OUT; k++) ic_ans[i] = ic_ans[i] | oc_ans_to_ic[k][i];
    end
  end

  switch_arbiter #(.N_IN(N_IN), .N_OUT(N_OUT), .PRIO_W(PRIO_W)) u_arbiter (
    .clk           (clk),
    .rst_n         (rst_n),
    .scheme        (scheme),
    .prog_write    (prog_write),
    .prog_port     (prog_port),
    .prog_master   (prog_master),
    .prog_priority (prog_priority),
    .ic_req_valid  (ic_req_valid),
    .ic_req_port   (ic_req_port),
    .oc_busy       (oc_busy),
    .oc_set        (oc_set),
    .oc_set_ic     (oc_set_ic),
    .ic_granted    (ic_granted),
    .conflict      (conflict),
    .reload        (reload),
    .priority_table(prio_tables)
  );

  for (genvar k = 0; k < N_OUT; k++) begin : g_oc
    output_control #(.N_IN(N_IN)) u_oc (
      .clk      (clk),
      .rst_n    (rst_n),
      .set      (oc_set[k]),
      .set_ic   (oc_set_ic[k]),
      .req_in   (req_in),
      .busy     (oc_busy[k]),
      .owner    (oc_owner[k]),
      .req_out  (req_out[k]),
      .ans_out  (ans_out[k]),
      .ans_to_ic(oc_ans_to_ic[k])
    );
  end

  crossbar #(.N_IN(N_IN), .N_OUT(N_OUT), .DATA_W(DATA_W)) u_crossbar (
    .clk     (clk),
    .rst_n   (rst_n),
    .data_in (data_in),
    .sel     (oc_owner),
    .en      (oc_busy),
    .data_out(data_out)
  );

endmodule
