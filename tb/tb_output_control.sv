// Self-checking testbench of output_control.
//
// A reference model tracks busy, owner and the registered request. The arbiter's
// set strobe is driven at random, only while the output is free; the inputs'
// request lines and the downstream answer change at random. Checks the status,
// the owner, the forwarded request (one cycle late) and that the answer reaches
// the owner only.
module tb_output_control;
  localparam int N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, set, busy, req_out, ans_out;
  logic [1:0]   set_ic, owner;
  logic [N-1:0] req_in, ans_to_ic;
  int checks = 0, failures = 0;

  output_control #(.N_IN(N)) dut (.*);

  logic m_busy, m_req;
  logic [1:0] m_owner;
  int sets = 0, releases = 0;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b t=%0t", what, got, exp, $time); end
  endtask

  initial begin
    rst_n = 1'b0; set = 1'b0; set_ic = '0; req_in = '0; ans_out = 1'b0;
    m_busy = 1'b0; m_req = 1'b0; m_owner = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // inputs keep their request most of the time
      for (int i = 0; i < N; i++) if ($urandom_range(0, 7) == 0) req_in[i] = ~req_in[i];
      ans_out = 1'($urandom);
      set     = !m_busy && ($urandom_range(0, 1) == 1);
      set_ic  = 2'($urandom);
      #1;
      chk(busy, m_busy, "busy");
      chk(req_out, m_req, "req_out");
      if (m_busy) chk(owner == m_owner, 1'b1, "owner");
      for (int i = 0; i < N; i++)
        chk(ans_to_ic[i], m_busy && (m_owner == 2'(i)) && ans_out, "ans_to_ic");
      // model of the coming edge
      m_req = m_busy && req_in[m_owner];
      if (m_busy) begin
        if (!req_in[m_owner]) begin m_busy = 1'b0; releases++; end
      end else if (set) begin
        m_busy = 1'b1; m_owner = set_ic; sets++;
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (sets == 0 || releases == 0) begin failures++; $display("FAIL no set/release"); end
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
