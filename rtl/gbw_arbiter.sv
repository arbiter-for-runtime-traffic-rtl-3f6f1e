// Programmable guaranteed-bandwidth (GBW) arbiter for N masters.
//
// A priority table holds one PRIO_W-bit priority per master. The request vector
// masks the table (bitwise AND) and a parallel comparator picks the requesting
// master with the highest priority: the current master. When `arbitrate` is high
// and some master requests, the current master is granted in the same cycle and,
// at the next clock edge, the "mux and decrementer" writes its priority back
// decremented by one. A master that keeps winning thus sinks until it meets the
// next highest requester, and every requester is served in turn. The same single
// table write port is used for programming: while `write` is high the entry
// `master_number` is loaded with `priority_value` and no grant is given.
//
// Two further schemes can be selected with `scheme`, so the arbiter can be set to
// the discipline that suits the application: fixed priority (the programmed
// priorities, never decremented) and round robin (the first requester after the
// last granted master).
//
// Interface and timing: `grant` and `current_master` are combinational from the
// table, the request vector and `arbitrate`; the table changes on the rising edge
// of `clk` after a grant or a write. Reset is active-low and synchronous.
//
// From the design's description: the priority table, the bitwise AND with the
// request vector, the parallel comparator, the mux/decrementer with its write,
// arbitrate and current-master inputs, and the decrement of the winner after each
// grant. This implementation's own choices: ties go to the lowest index; a
// shadow copy of the programmed priorities is kept, and when the winner's priority
// is already zero the whole table is reloaded from that copy instead of being
// decremented (without it, masters that reach zero would be served in fixed order
// forever); reset clears both tables to zero, so an unprogrammed arbiter serves by
// lowest index; programming takes precedence over arbitration.
module gbw_arbiter #(
  parameter int unsigned N      = 4,
  parameter int unsigned PRIO_W = clos_pkg::DEF_PRIO_W,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  clos_pkg::scheme_e        scheme,          // arbitration scheme
  // programming port
  input  logic                     write,           // load one table entry
  input  logic [IW-1:0]            master_number,   // entry to load
  input  logic [PRIO_W-1:0]        priority_value,  // value to load
  // arbitration
  input  logic                     arbitrate,       // arbitration allowed this cycle
  input  logic [N-1:0]             request,         // request vector
  output logic                     grant,           // current_master is granted
  output logic [IW-1:0]            current_master,  // index of the granted master
  output logic                     reload,          // GBW table refilled this cycle
  output logic [N-1:0][PRIO_W-1:0] priority_table   // current priorities (observation)
);

  logic [N-1:0][PRIO_W-1:0] prio_q;   // priority table
  logic [N-1:0][PRIO_W-1:0] prog_q;   // programmed priorities
  logic [IW-1:0]            last_q;   // last granted master (round robin)

  // Request masking and parallel comparison.
  logic [N-1:0][PRIO_W-1:0] table_sel, masked;
  logic                     cmp_valid;
  logic [IW-1:0]            cmp_index;
  logic [PRIO_W-1:0]        cmp_value;

  always_comb begin
    table_sel = (scheme == clos_pkg::SCHEME_FIXED) ? prog_q : prio_q;
    for (int i = 0; i < N; i++) masked[i] = table_sel[i] & {PRIO_W{request[i]}};
  end

  parallel_comparator #(.N(N), .W(PRIO_W)) u_cmp (
    .value    (masked),
    .request  (request),
    .valid    (cmp_valid),
    .max_index(cmp_index),
    .max_value(cmp_value)
  );

  // Round robin: first requester after the last granted master.
  logic [IW-1:0] rr_index;
  always_comb begin
    rr_index = '0;
    for (int k = N; k >= 1; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last_q) + k) % N);
      if (request[idx]) rr_index = idx;
    end
  end

  assign current_master = (scheme == clos_pkg::SCHEME_RR) ? rr_index : cmp_index;
  assign grant          = arbitrate && !write && cmp_valid;

  // Mux and decrementer: one table write port, shared by programming and by the
  // current-master feedback.
  logic              tbl_we;
  logic [IW-1:0]     tbl_addr;
  logic [PRIO_W-1:0] tbl_data;

  always_comb begin
    tbl_we   = 1'b0;
    tbl_addr = master_number;
    tbl_data = priority_value;
    reload   = 1'b0;
    if (write) begin
      tbl_we = 1'b1;
    end else if (grant && scheme == clos_pkg::SCHEME_GBW) begin
      tbl_addr = current_master;
      tbl_data = cmp_value - 1'b1;
      if (cmp_value == '0) reload = 1'b1;
      else                 tbl_we = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prio_q <= '0;
      prog_q <= '0;
      last_q <= IW'(N - 1);
    end else begin
      if (reload)      prio_q           <= prog_q;
      else if (tbl_we) prio_q[tbl_addr] <= tbl_data;
      if (write)       prog_q[master_number] <= priority_value;
      if (grant)       last_q <= current_master;
    end
  end

  assign priority_table = prio_q;

endmodule
