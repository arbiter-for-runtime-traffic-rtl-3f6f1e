// Self-checking testbench of input_control.
//
// Two instances run side by side on the same random stimulus: one in adaptive
// mode (any free output, lowest number first) and one routing by the destination
// field in bits [3:2] of the probe. A reference model of each tracks the state,
// the latched destination, the connected port and the registered answer. Grants
// are given at random, only to a valid request.
module tb_input_control;
  import clos_pkg::*;
  localparam int N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, req_in;
  logic [7:0]   data_in;
  logic [N-1:0] oc_busy;
  logic [1:0]   ans_in, req_valid, granted, ans_grant;
  logic [1:0][1:0] req_port, port;
  ic_state_e    state [2];
  int checks = 0, failures = 0;

  input_control #(.N_OUT(N), .DATA_W(8), .ROUTE_MODE(ROUTE_ADAPTIVE), .FIELD_LSB(0)) dut_a (
    .clk, .rst_n, .req_in, .data_in, .ans_in(ans_in[0]), .oc_busy,
    .req_valid(req_valid[0]), .req_port(req_port[0]), .granted(granted[0]),
    .ans_grant(ans_grant[0]), .state(state[0]), .port(port[0]));
  input_control #(.N_OUT(N), .DATA_W(8), .ROUTE_MODE(ROUTE_FIELD), .FIELD_LSB(2)) dut_f (
    .clk, .rst_n, .req_in, .data_in, .ans_in(ans_in[1]), .oc_busy,
    .req_valid(req_valid[1]), .req_port(req_port[1]), .granted(granted[1]),
    .ans_grant(ans_grant[1]), .state(state[1]), .port(port[1]));

  ic_state_e m_state [2];
  logic [1:0] m_dest [2], m_port [2];
  logic m_ans [2];
  int conns = 0, waits = 0;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b t=%0t", what, got, exp, $time); end
  endtask

  initial begin
    rst_n = 1'b0; req_in = 1'b0; data_in = '0; oc_busy = '0; granted = '0; ans_grant = '0;
    for (int d = 0; d < 2; d++) begin m_state[d] = IC_IDLE; m_dest[d] = '0; m_port[d] = '0; m_ans[d] = 1'b0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      logic [1:0] field, tgt;
      logic ok, exp_valid;
      if ($urandom_range(0, 5) == 0) req_in = ~req_in;
      data_in = 8'($urandom);
      oc_busy = N'($urandom);
      ans_grant = 2'($urandom);
      #1;
      for (int d = 0; d < 2; d++) begin
        field = (m_state[d] == IC_IDLE) ? data_in[3:2] : m_dest[d];
        if (d == 0) begin
          ok = 1'b0; tgt = '0;
          for (int k = 0; k < N; k++) if (!ok && !oc_busy[k]) begin ok = 1'b1; tgt = 2'(k); end
        end else begin
          tgt = field; ok = !oc_busy[field];
        end
        exp_valid = req_in && (m_state[d] != IC_CONN) && ok;
        chk(req_valid[d], exp_valid, "req_valid");
        if (exp_valid) chk(req_port[d] == tgt, 1'b1, "req_port");
        chk(ans_in[d], m_ans[d], "ans_in");
        chk(state[d] == m_state[d], 1'b1, "state");
        if (m_state[d] == IC_CONN) chk(port[d] == m_port[d], 1'b1, "port");
        granted[d] = exp_valid && ($urandom_range(0, 2) == 0);
        // model of the coming edge
        m_ans[d] = (m_state[d] == IC_CONN) && req_in && ans_grant[d];
        if (m_state[d] == IC_IDLE) m_dest[d] = data_in[3:2];
        if (m_state[d] == IC_CONN) begin
          if (!req_in) m_state[d] = IC_IDLE;
        end else if (!req_in) m_state[d] = IC_IDLE;
        else if (granted[d]) begin m_state[d] = IC_CONN; m_port[d] = tgt; conns++; end
        else begin m_state[d] = IC_WAIT; waits++; end
      end
      @(posedge clk);
      #1;
      granted = '0;
    end
    checks++;
    if (conns == 0 || waits == 0) begin failures++; $display("FAIL no connection or wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
