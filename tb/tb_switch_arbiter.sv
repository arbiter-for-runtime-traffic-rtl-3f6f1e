// Self-checking testbench of switch_arbiter.
//
// Four inputs place random requests for outputs (request bus) while the outputs'
// busy bits (status bus) change at random. A reference model holds one
// guaranteed-bandwidth priority table per output and predicts, for every output,
// whether it is seized and for which input (control bus), which inputs are told
// they are granted (grant bus), and the tables after each grant. Programming
// writes to random outputs are mixed in; the first writes load a, c, 6, 8 into
// every output's table.
module tb_switch_arbiter;
  import clos_pkg::*;
  localparam int N = 4;
  localparam int W = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, prog_write;
  scheme_e             scheme;
  logic [1:0]          prog_port, prog_master;
  logic [W-1:0]        prog_priority;
  logic [N-1:0]        ic_req_valid, oc_busy, oc_set, ic_granted, conflict, reload;
  logic [N-1:0][1:0]   ic_req_port, oc_set_ic;
  logic [N-1:0][N-1:0][W-1:0] priority_table;
  int checks = 0, failures = 0;

  switch_arbiter #(.N_IN(N), .N_OUT(N), .PRIO_W(W)) dut (.*);

  int m_prio[N][N], m_prog[N][N];
  int grants = 0, conflicts = 0;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b t=%0t", what, got, exp, $time); end
  endtask

  initial begin
    rst_n = 1'b0; scheme = SCHEME_GBW; prog_write = 1'b0; prog_port = '0; prog_master = '0;
    prog_priority = '0; ic_req_valid = '0; ic_req_port = '0; oc_busy = '0;
    for (int k = 0; k < N; k++) for (int i = 0; i < N; i++) begin m_prio[k][i] = 0; m_prog[k][i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      logic [N-1:0] exp_granted;
      if (n < 16) begin
        prog_write = 1'b1; prog_port = 2'(n / 4); prog_master = 2'(n % 4);
        prog_priority = (n % 4 == 0) ? 4'ha : (n % 4 == 1) ? 4'hc : (n % 4 == 2) ? 4'h6 : 4'h8;
      end else begin
        prog_write = ($urandom_range(0, 31) == 0);
        prog_port = 2'($urandom); prog_master = 2'($urandom); prog_priority = W'($urandom);
      end
      ic_req_valid = N'($urandom);
      for (int i = 0; i < N; i++) ic_req_port[i] = 2'($urandom);
      oc_busy = N'($urandom) & N'($urandom);
      #1;
      exp_granted = '0;
      for (int k = 0; k < N; k++) begin
        int best, nreq;
        logic exp_set;
        best = -1;
        nreq = 0;
        for (int i = 0; i < N; i++)
          if (ic_req_valid[i] && ic_req_port[i] == 2'(k)) begin
            nreq++;
            if (best < 0 || m_prio[k][i] > m_prio[k][best]) best = i;
          end
        begin
          exp_set = !oc_busy[k] && !(prog_write && prog_port == 2'(k)) && best >= 0;
          chk(oc_set[k], exp_set, "oc_set");
          chk(conflict[k], !oc_busy[k] && nreq > 1, "conflict");
          if (exp_set) begin
            chk(oc_set_ic[k] == 2'(best), 1'b1, "oc_set_ic");
            exp_granted[best] = 1'b1;
            grants++;
            if (nreq > 1) conflicts++;
            if (m_prio[k][best] == 0) m_prio[k] = m_prog[k];
            else m_prio[k][best]--;
          end
        end
      end
      for (int i = 0; i < N; i++) chk(ic_granted[i], exp_granted[i], "ic_granted");
      if (prog_write) begin
        m_prio[prog_port][prog_master] = prog_priority;
        m_prog[prog_port][prog_master] = prog_priority;
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < N; k++)
        for (int i = 0; i < N; i++) chk(priority_table[k][i] == W'(m_prio[k][i]), 1'b1, "table");
    end
    checks++;
    if (grants == 0 || conflicts == 0) begin failures++; $display("FAIL no grant/conflict"); end
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
