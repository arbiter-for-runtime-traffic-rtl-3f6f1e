// Arbiter of one switch: one programmable arbiter per output control.
//
// The request bus carries, from every input control, a valid bit and the number
// of the output it wants. For each output k the requests naming k form the
// request vector of a gbw_arbiter, which may arbitrate only while output k is free
// (status bus). A grant seizes output k for the winning input (control bus:
// `oc_set`, `oc_set_ic`) and tells that input it has been granted (grant bus:
// `ic_granted`). Each input asks for one output at a time, so it receives at most
// one grant per cycle. Programming writes one priority-table entry of one output's
// arbiter, chosen by `prog_port`, per cycle.
//
// Timing: grants are combinational in the cycle of the request; the priority
// tables update on the clock edge.
//
// The switch arbiter's role follows the design's description; splitting it into
// one arbiter per output and the bus encodings are this implementation's choices.
module switch_arbiter #(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned N_OUT  = 4,
  parameter int unsigned PRIO_W = clos_pkg::DEF_PRIO_W,
  localparam int unsigned IW    = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned PW    = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  clos_pkg::scheme_e           scheme,
  // programming
  input  logic                        prog_write,
  input  logic [PW-1:0]               prog_port,
  input  logic [IW-1:0]               prog_master,
  input  logic [PRIO_W-1:0]           prog_priority,
  // request bus
  input  logic [N_IN-1:0]             ic_req_valid,
  input  logic [N_IN-1:0][PW-1:0]     ic_req_port,
  // status bus
  input  logic [N_OUT-1:0]            oc_busy,
  // control bus
  output logic [N_OUT-1:0]            oc_set,
  output logic [N_OUT-1:0][IW-1:0]    oc_set_ic,
  // grant bus
  output logic [N_IN-1:0]             ic_granted,
  // observation
  output logic [N_OUT-1:0]            conflict,   // more than one input contends
  output logic [N_OUT-1:0]            reload,     // a GBW table was refilled
  output logic [N_OUT-1:0][N_IN-1:0][PRIO_W-1:0] priority_table
);

  logic [N_OUT-1:0][N_IN-1:0] request;

  always_comb begin
    for (int k = 0; k < N_OUT; k++)
      for (int i = 0; i < N_IN; i++)
        request[k][i] = ic_req_valid[i] && (ic_req_port[i] == PW'(k));
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    gbw_arbiter #(.N(N_IN), .PRIO_W(PRIO_W)) u_arb (
      .clk           (clk),
      .rst_n         (rst_n),
      .scheme        (scheme),
      .write         (prog_write && (prog_port == PW'(k))),
      .master_number (prog_master),
      .priority_value(prog_priority),
      .arbitrate     (!oc_busy[k]),
      .request       (request[k]),
      .grant         (oc_set[k]),
      .current_master(oc_set_ic[k]),
      .reload        (reload[k]),
      .priority_table(priority_table[k])
    );
    assign conflict[k] = !oc_busy[k] && ((request[k] & (request[k] - 1'b1)) != '0);
  end

  always_comb begin
    ic_granted = '0;
    for (int k = 0; k < N_OUT; k++)
      if (oc_set[k]) ic_granted[oc_set_ic[k]] = 1'b1;
  end

endmodule
