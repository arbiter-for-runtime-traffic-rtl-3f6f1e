// End-to-end, full-size testbench of clos_network, the f(4,4,4) network with all
// parameters at their defaults.
//
// Behavioural sources open circuits with a probe (bit 7 set, destination in bits
// [3:0]), wait for the answer, send numbered payload words
// {0, sequence[2:0], source[3:0]} one per cycle and tear the circuit down.
// Behavioural sinks answer one cycle after they see a request and check that the
// payload of every circuit arrives whole, in order, at the right destination,
// 3 cycles after it was sent. Phases:
//   0. program all 48 arbiters: inputs 0..3 of every output get a, c, 6, 8;
//   1. one circuit alone (0 -> 5): probe after 6 cycles, answer after 10;
//   2. sources 0..3 all to destination 0 (third stage, switch 0, port 0). The
//      first stage spreads them over the four middle switches; the third-stage
//      arbiter must then serve sources 1, 0, 2, 3 in that order; then source 0
//      opens twelve circuits in a row, which must refill a priority table;
//   3. random traffic from all 16 sources, once per arbitration scheme
//      (guaranteed bandwidth, fixed priority, round robin).
// Each mechanism (programming, contention, blocking, spreading over middle
// switches, table refill, teardown, each scheme) is counted and must occur.
module tb_clos_network;
  import clos_pkg::*;
  localparam int N     = 16;
  localparam int CONNS = 12;  // random circuits per source and scheme

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, program_priorities;
  scheme_e           scheme;
  logic [5:0]        arbiter_addr;
  logic [1:0]        master_number;
  logic [3:0]        priority_value;
  logic [N-1:0]      in_req, in_ans, out_req, out_ans;
  logic [N-1:0][7:0] in_data, out_data;
  int checks = 0, failures = 0;

  clos_network dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // sinks answer one cycle after the request
  always_ff @(posedge clk) out_ans <= rst_n ? out_req : '0;

  // ---- observation of the switches ----
  logic [3:0][3:0] conf1, conf2, conf3, rel1, rel2, rel3, wait1, wait2, wait3, busy2;
  for (genvar s = 0; s < 4; s++) begin : g_obs
    assign conf1[s] = dut.g_s1[s].conflict;
    assign conf2[s] = dut.g_s2[s].conflict;
    assign conf3[s] = dut.g_s3[s].conflict;
    assign rel1[s]  = dut.g_s1[s].reload;
    assign rel2[s]  = dut.g_s2[s].reload;
    assign rel3[s]  = dut.g_s3[s].reload;
    assign wait1[s] = dut.g_s1[s].waiting;
    assign wait2[s] = dut.g_s2[s].waiting;
    assign wait3[s] = dut.g_s3[s].waiting;
    assign busy2[s] = dut.g_s2[s].busy;
  end

  int n_prog, n_conflict, n_reload, n_wait, n_mid_used[4], n_teardown, n_circuits[3];

  always @(negedge clk) if (rst_n) begin
    if (program_priorities) n_prog++;
    n_conflict += $countones({conf1, conf2, conf3});
    n_reload   += $countones({rel1, rel2, rel3});
    n_wait     += $countones({wait1, wait2, wait3});
    for (int p = 0; p < 4; p++) if (busy2[p] != '0) n_mid_used[p]++;
  end

  // ---- sinks ----
  int dest_of[N], nw_of[N];
  int sent_at[N][8], sent_dest[N][8], sent_nw[N][8];
  int probe_at[N];
  int order[$];
  int cur_src[N], cur_seq[N], cur_nw[N], words_ok;
  logic [N-1:0] req_prev;

  task automatic fail(input string msg);
    failures++; $display("FAIL %s (cycle %0d)", msg, cyc);
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) begin
      if (out_req[k] && !req_prev[k]) begin
        probe_at[k] = cyc;
        checks++;
        if (!out_data[k][7] || int'(out_data[k][3:0]) != k) fail($sformatf("out %0d bad probe %h", k, out_data[k]));
      end
      if (out_req[k] && !out_data[k][7]) begin
        int src, seq;
        src = int'(out_data[k][3:0]);
        seq = int'(out_data[k][6:4]);
        checks++;
        if (seq == 0) begin
          if (cur_src[k] >= 0) fail($sformatf("out %0d new circuit before end", k));
          cur_src[k] = src; cur_nw[k] = sent_nw[src][0]; order.push_back(src);
          if (sent_dest[src][0] != k) fail($sformatf("src %0d arrived at %0d", src, k));
        end else if (src != cur_src[k] || seq != cur_seq[k] + 1) begin
          fail($sformatf("out %0d word %h out of order", k, out_data[k]));
        end
        cur_seq[k] = seq;
        checks++;
        if (cyc != sent_at[src][seq] + 3) fail($sformatf("latency of word %h", out_data[k]));
      end
      if (!out_req[k] && req_prev[k]) begin
        n_teardown++;
        checks++;
        if (cur_src[k] < 0 || cur_seq[k] != cur_nw[k] - 1)
          fail($sformatf("out %0d circuit incomplete", k));
        else words_ok++;
        cur_src[k] = -1;
      end
    end
    req_prev = out_req;
  end

  // ---- sources ----
  task automatic source(input int i, input int dest, input int nw, input bit check_timing);
    int t0;
    dest_of[i] = dest; nw_of[i] = nw;
    in_req[i] = 1'b1; in_data[i] = 8'h80 | 8'(dest); t0 = cyc;
    while (!in_ans[i]) begin @(posedge clk); #1; end
    if (check_timing) begin
      checks += 2;
      if (probe_at[dest] != t0 + 6) fail($sformatf("probe latency %0d", probe_at[dest] - t0));
      if (cyc != t0 + 10) fail($sformatf("answer latency %0d", cyc - t0));
    end
    for (int w = 0; w < nw; w++) begin
      in_data[i] = {1'b0, 3'(w), 4'(i)}; sent_at[i][w] = cyc;
      sent_dest[i][w] = dest; sent_nw[i][w] = nw;
      @(posedge clk); #1;
    end
    in_req[i] = 1'b0; in_data[i] = '0;
    @(posedge clk); #1;
  endtask

  task automatic random_source(input int i, input int sch);
    for (int c = 0; c < CONNS; c++) begin
      repeat ($urandom_range(0, 4)) begin @(posedge clk); #1; end
      source(i, $urandom_range(0, N - 1), $urandom_range(1, 8), 1'b0);
      n_circuits[sch]++;
    end
  endtask

  task automatic settle();
    repeat (6) begin @(posedge clk); #1; end
  endtask

  initial begin
    int exp_order[4] = '{1, 0, 2, 3};
    rst_n = 1'b0; scheme = SCHEME_GBW; program_priorities = 1'b0; arbiter_addr = '0;
    master_number = '0; priority_value = '0; in_req = '0; in_data = '0; req_prev = '0;
    words_ok = 0; n_prog = 0; n_conflict = 0; n_reload = 0; n_wait = 0; n_teardown = 0;
    for (int p = 0; p < 4; p++) n_mid_used[p] = 0;
    for (int s = 0; s < 3; s++) n_circuits[s] = 0;
    for (int k = 0; k < N; k++) begin cur_src[k] = -1; probe_at[k] = 0; dest_of[k] = -1; nw_of[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // phase 0: program every arbiter, address {stage, switch, port}
    program_priorities = 1'b1;
    for (int a = 0; a < 48; a++)
      for (int m = 0; m < 4; m++) begin
        arbiter_addr = 6'(a); master_number = 2'(m);
        priority_value = (m == 0) ? 4'ha : (m == 1) ? 4'hc : (m == 2) ? 4'h6 : 4'h8;
        @(posedge clk); #1;
      end
    program_priorities = 1'b0;

    // phase 1: one circuit alone
    source(0, 5, 4, 1'b1);
    settle();

    // phase 2: four sources of the first switch to destination 0
    order.delete();
    fork
      source(0, 0, 4, 1'b0);
      source(1, 0, 4, 1'b0);
      source(2, 0, 4, 1'b0);
      source(3, 0, 4, 1'b0);
    join
    settle();
    checks++;
    if (order.size() != 4) fail($sformatf("%0d circuits reached destination 0", order.size()));
    else foreach (exp_order[n])
      if (order[n] != exp_order[n]) fail($sformatf("service order %p, expected 1 0 2 3", order));
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_mid_used[p] == 0) fail($sformatf("middle switch %0d never used", p));
    end

    // phase 2b: twelve circuits in a row from source 0 to destination 0. Input 0
    // of the first-stage arbiter starts at priority a, so its tenth grant brings
    // it to 0 and the eleventh must refill the table.
    begin
      int refills_before;
      refills_before = n_reload;
      for (int c = 0; c < 12; c++) source(0, 0, 2, 1'b0);
      settle();
      checks++;
      if (n_reload == refills_before) fail("twelve grants in a row did not refill the table");
    end

    // phase 3: random traffic under each scheme
    for (int sch = 0; sch < 3; sch++) begin
      scheme = scheme_e'(sch);
      for (int i = 0; i < N; i++) begin
        automatic int ii = i;
        automatic int ss = sch;
        fork random_source(ii, ss); join_none
      end
      wait fork;
      settle();
      checks++;
      if (n_circuits[sch] != N * CONNS) fail($sformatf("scheme %0d: %0d circuits", sch, n_circuits[sch]));
    end

    // mechanisms
    checks += 6;
    if (n_prog != 192)   fail($sformatf("%0d programming writes", n_prog));
    if (n_conflict == 0) fail("no contention");
    if (n_wait == 0)     fail("no blocked probe");
    if (n_reload == 0)   fail("no priority-table refill");
    if (n_teardown != words_ok || words_ok != 17 + 3 * N * CONNS)
      fail($sformatf("%0d teardowns, %0d complete circuits", n_teardown, words_ok));
    if (in_ans != '0 || out_req != '0) fail("network not idle at the end");
    $display("programming writes %0d, contention cycles %0d, blocked-probe cycles %0d, table refills %0d",
             n_prog, n_conflict, n_wait, n_reload);
    $display("middle switch busy cycles %0d %0d %0d %0d, circuits completed %0d",
             n_mid_used[0], n_mid_used[1], n_mid_used[2], n_mid_used[3], words_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
