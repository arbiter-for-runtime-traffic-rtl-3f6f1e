// Self-checking testbench of gbw_arbiter.
//
// Programs the four priorities a, c, 6, 8 (the values used in the design's own
// simulation) and first checks the guaranteed-bandwidth grant sequence worked out
// by hand for four masters that request all the time: 1, 1, 0, 1, 0, 1, 0, 1, 3.
// It then checks that, over a long run, every requester is served, and compares
// grants and table contents cycle by cycle with a reference model under random
// requests, arbitrate strobes, programming writes and all three schemes.
module tb_gbw_arbiter;
  import clos_pkg::*;
  localparam int N = 4;
  localparam int W = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n;
  scheme_e            scheme;
  logic               write, arbitrate;
  logic [1:0]         master_number;
  logic [W-1:0]       priority_value;
  logic [N-1:0]       request;
  logic               grant, reload;
  logic [1:0]         current_master;
  logic [N-1:0][W-1:0] priority_table;
  int checks = 0, failures = 0;

  gbw_arbiter #(.N(N), .PRIO_W(W)) dut (.*);

  // reference model
  int m_prio[N], m_prog[N], m_last;

  function automatic int model_winner();
    int best = -1;
    if (scheme == SCHEME_RR) begin
      for (int k = 1; k <= N; k++)
        if (best < 0 && request[(m_last + k) % N]) best = (m_last + k) % N;
    end else begin
      for (int i = 0; i < N; i++) begin
        int v = (scheme == SCHEME_FIXED) ? m_prog[i] : m_prio[i];
        int bv = (best < 0) ? -1 : ((scheme == SCHEME_FIXED) ? m_prog[best] : m_prio[best]);
        if (request[i] && v > bv) best = i;
      end
    end
    return best;
  endfunction

  // compares the outputs, then advances the model over the coming clock edge
  task automatic step_and_check();
    int w;
    #1;
    w = model_winner();
    checks++;
    if (grant !== (arbitrate && !write && w >= 0) || (grant && current_master !== 2'(w))) begin
      failures++;
      $display("FAIL t=%0t scheme=%0d req=%b arb=%b grant=%b cm=%0d exp %0d", $time, scheme, request,
               arbitrate, grant, current_master, w);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (priority_table[i] !== W'(m_prio[i])) begin
        failures++; $display("FAIL table[%0d]=%h exp %h", i, priority_table[i], m_prio[i]);
      end
    end
    if (write) begin
      m_prog[master_number] = priority_value;
      m_prio[master_number] = priority_value;
    end else if (arbitrate && w >= 0) begin
      m_last = w;
      if (scheme == SCHEME_GBW) begin
        if (m_prio[w] == 0) m_prio = m_prog;
        else m_prio[w]--;
      end
    end
    @(posedge clk);
    #1;  // drive the next inputs away from the clock edge
  endtask

  int exp_seq[9] = '{1, 1, 0, 1, 0, 1, 0, 1, 3};
  int served[N];
  int reloads;

  initial begin
    rst_n = 1'b0; scheme = SCHEME_GBW; write = 1'b0; arbitrate = 1'b0;
    master_number = '0; priority_value = '0; request = '0;
    for (int i = 0; i < N; i++) begin m_prio[i] = 0; m_prog[i] = 0; end
    m_last = N - 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // programming: a, c, 6, 8
    write = 1'b1;
    foreach (exp_seq[i]) if (i < N) begin
      master_number = 2'(i);
      priority_value = (i == 0) ? 4'ha : (i == 1) ? 4'hc : (i == 2) ? 4'h6 : 4'h8;
      step_and_check();
    end
    write = 1'b0;
    // hand-worked GBW sequence with all four requesting
    request = 4'b1111; arbitrate = 1'b1;
    foreach (exp_seq[n]) begin
      #1;
      checks++;
      if (!grant || current_master != 2'(exp_seq[n])) begin
        failures++; $display("FAIL sequence step %0d: got %0d exp %0d", n, current_master, exp_seq[n]);
      end
      step_and_check();
    end
    // every requester keeps being served; the table is refilled when exhausted
    reloads = 0;
    for (int i = 0; i < N; i++) served[i] = 0;
    repeat (200) begin
      #1;
      if (grant) served[current_master]++;
      if (reload) reloads++;
      step_and_check();
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] == 0) begin failures++; $display("FAIL master %0d starved", i); end
    end
    checks++;
    if (reloads == 0) begin failures++; $display("FAIL no table reload"); end
    // random traffic in all schemes
    for (int n = 0; n < 3000; n++) begin
      scheme = scheme_e'((n / 500) % 3);
      request = N'($urandom);
      arbitrate = ($urandom_range(0, 3) != 0);
      write = ($urandom_range(0, 15) == 0);
      master_number = 2'($urandom);
      priority_value = W'($urandom);
      step_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
