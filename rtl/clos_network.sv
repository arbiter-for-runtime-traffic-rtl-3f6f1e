// Three-stage Clos network f(P,Q,R) with pipelined circuit switching, dynamic path
// setup and programmable guaranteed-bandwidth arbiters. Top of the design.
//
// R first-stage switches of Q inputs, P middle-stage switches and R third-stage
// switches connect Q*R = 16 sources to 16 destinations in the main configuration
// f(4,4,4). Output p of first-stage switch i feeds input i of middle switch p;
// output j of middle switch p feeds input p of third-stage switch j. Source and
// destination ports are numbered switch*Q + port, i.e. {switch, port} in binary.
//
// A source opens a circuit by raising in_req[s] with a probe on in_data[s] whose
// low log2(Q*R) bits are the destination port. The probe sets the path up one
// stage at a time, holding every link it has acquired (pipelined circuit
// switching): a first-stage switch takes any free middle switch (dynamic path
// setup), a middle switch routes by the destination's third-stage switch number
// and a third-stage switch by its port number. Where several probes want the same
// output of a switch, that output's arbiter picks one and the others wait. The
// probe reaches out_req/out_data of the destination 6 cycles after the source
// raised in_req if nothing blocks it; the destination answers on out_ans, which
// travels back one cycle per switch to in_ans of the source. The source then sends
// one data word per cycle, each arriving 3 cycles later, and drops in_req to tear
// the circuit down.
//
// Arbiter programming: while program_priorities is high, the priority of input
// master_number of the arbiter at arbiter_addr = {stage, switch, output port} is
// set to priority_value (stages 0..2). `scheme` selects the arbitration scheme of
// all arbiters (guaranteed bandwidth, fixed priority or round robin).
//
// From the design's description: the f(4,4,4) topology and its port numbering, the
// switch structure, the guaranteed-bandwidth arbiter and its programming signals
// and their widths (6-bit arbiter address, 2-bit master number, 4-bit priority,
// 8-bit data). This implementation's own choices: the probe format, the
// request/answer handshake and its timing, the lowest-free-output choice of the
// first stage, and the layout of the arbiter address.
module clos_network #(
  parameter int unsigned P      = clos_pkg::NET_P,
  parameter int unsigned Q      = clos_pkg::NET_Q,
  parameter int unsigned R      = clos_pkg::NET_R,
  parameter int unsigned DATA_W = clos_pkg::DEF_DATA_W,
  parameter int unsigned PRIO_W = clos_pkg::DEF_PRIO_W,
  localparam int unsigned N      = Q * R,                       // ports per side
  localparam int unsigned QW     = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned RW     = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned PWID   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned MAXD   = (P > Q) ? ((P > R) ? P : R) : ((Q > R) ? Q : R),
  localparam int unsigned PORT_W = (MAXD > 1) ? $clog2(MAXD) : 1, // port / master field
  localparam int unsigned SW_W   = (P > R) ? PWID : RW,          // switch field
  localparam int unsigned ADDR_W = 2 + SW_W + PORT_W             // {stage, switch, port}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  clos_pkg::scheme_e        scheme,
  // arbiter programming
  input  logic                     program_priorities,
  input  logic [ADDR_W-1:0]        arbiter_addr,
  input  logic [PORT_W-1:0]        master_number,
  input  logic [PRIO_W-1:0]        priority_value,
  // source side
  input  logic [N-1:0]             in_req,
  input  logic [N-1:0][DATA_W-1:0] in_data,
  output logic [N-1:0]             in_ans,
  // destination side
  output logic [N-1:0]             out_req,
  output logic [N-1:0][DATA_W-1:0] out_data,
  input  logic [N-1:0]             out_ans
);

  // Decoded programming address.
  logic [1:0]        prog_stage;
  logic [SW_W-1:0]   prog_switch;
  logic [PORT_W-1:0] prog_port;
  assign {prog_stage, prog_switch, prog_port} = arbiter_addr;

  // Inter-stage links: s12 = first to middle stage, s23 = middle to third stage,
  // indexed [middle switch][first/third-stage switch].
  logic [P-1:0][R-1:0]             s12_req, s12_ans, s23_req, s23_ans;
  logic [P-1:0][R-1:0][DATA_W-1:0] s12_data, s23_data;

  // ---- first stage: R switches, Q inputs, P outputs, adaptive ----
  for (genvar i = 0; i < R; i++) begin : g_s1
    logic [P-1:0]             req_o, ans_o;
    logic [P-1:0][DATA_W-1:0] data_o;
    logic [P-1:0]             busy, conflict, reload;
    logic [Q-1:0]             waiting;

    clos_switch #(
      .N_IN(Q), .N_OUT(P), .DATA_W(DATA_W), .PRIO_W(PRIO_W),
      .ROUTE_MODE(clos_pkg::ROUTE_ADAPTIVE), .FIELD_LSB(0)
    ) u_sw (
      .clk(clk), .rst_n(rst_n), .scheme(scheme),
      .prog_write   (program_priorities && prog_stage == 2'd0 && prog_switch == SW_W'(i)),
      .prog_port    (prog_port[PWID-1:0]),
      .prog_master  (master_number[QW-1:0]),
      .prog_priority(priority_value),
      .req_in  (in_req[i*Q +: Q]),
      .data_in (in_data[i*Q +: Q]),
      .ans_in  (in_ans[i*Q +: Q]),
      .req_out (req_o),
      .data_out(data_o),
      .ans_out (ans_o),
      .oc_busy(busy), .conflict(conflict), .reload(reload), .ic_waiting(waiting)
    );

    for (genvar p = 0; p < P; p++) begin : g_link
      assign s12_req[p][i]  = req_o[p];
      assign s12_data[p][i] = data_o[p];
      assign ans_o[p]       = s12_ans[p][i];
    end
  end

  // ---- middle stage: P switches, R x R, routed by the third-stage switch number ----
  for (genvar p = 0; p < P; p++) begin : g_s2
    logic [R-1:0]             busy, conflict, reload, waiting;

    clos_switch #(
      .N_IN(R), .N_OUT(R), .DATA_W(DATA_W), .PRIO_W(PRIO_W),
      .ROUTE_MODE(clos_pkg::ROUTE_FIELD), .FIELD_LSB(QW)
    ) u_sw (
      .clk(clk), .rst_n(rst_n), .scheme(scheme),
      .prog_write   (program_priorities && prog_stage == 2'd1 && prog_switch == SW_W'(p)),
      .prog_port    (prog_port[RW-1:0]),
      .prog_master  (master_number[RW-1:0]),
      .prog_priority(priority_value),
      .req_in  (s12_req[p]),
      .data_in (s12_data[p]),
      .ans_in  (s12_ans[p]),
      .req_out (s23_req[p]),
      .data_out(s23_data[p]),
      .ans_out (s23_ans[p]),
      .oc_busy(busy), .conflict(conflict), .reload(reload), .ic_waiting(waiting)
    );
  end

  // ---- third stage: R switches, P inputs, Q outputs, routed by the port number ----
  for (genvar j = 0; j < R; j++) begin : g_s3
    logic [P-1:0]             req_i, ans_i;
    logic [P-1:0][DATA_W-1:0] data_i;
    logic [Q-1:0]             busy, conflict, reload;
    logic [P-1:0]             waiting;

    for (genvar p = 0; p < P; p++) begin : g_link
      assign req_i[p]       = s23_req[p][j];
      assign data_i[p]      = s23_data[p][j];
      assign s23_ans[p][j]  = ans_i[p];
    end

    clos_switch #(
      .N_IN(P), .N_OUT(Q), .DATA_W(DATA_W), .PRIO_W(PRIO_W),
      .ROUTE_MODE(clos_pkg::ROUTE_FIELD), .FIELD_LSB(0)
    ) u_sw (
      .clk(clk), .rst_n(rst_n), .scheme(scheme),
      .prog_write   (program_priorities && prog_stage == 2'd2 && prog_switch == SW_W'(j)),
      .prog_port    (prog_port[QW-1:0]),
      .prog_master  (master_number[PWID-1:0]),
      .prog_priority(priority_value),
      .req_in  (req_i),
      .data_in (data_i),
      .ans_in  (ans_i),
      .req_out (out_req[j*Q +: Q]),
      .data_out(out_data[j*Q +: Q]),
      .ans_out (out_ans[j*Q +: Q]),
      .oc_busy(busy), .conflict(conflict), .reload(reload), .ic_waiting(waiting)
    );
  end

endmodule
