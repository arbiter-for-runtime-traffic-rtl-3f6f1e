// Self-checking testbench of clos_switch (a 4x4 switch routing by port number).
//
// Behavioural sources open circuits with a probe (bit 7 set, destination port in
// the low bits), wait for the answer, send numbered payload words
// {0, sequence[2:0], source[3:0]} one per cycle and tear the circuit down.
// Behavioural sinks answer one cycle after they see a request and check that the
// payload of each circuit arrives whole, in order, from the right source, one
// cycle after it was sent. Three phases:
//   1. one circuit alone: the probe must reach the output 2 cycles after the
//      request was raised, the answer must come back 2 cycles after that;
//   2. a full permutation, four circuits at once, none of which may wait;
//   3. all four inputs to output 0 with priorities a, c, 6, 8: circuits must be
//      served in the order 1, 0, 3, 2 (highest remaining priority first).
module tb_clos_switch;
  import clos_pkg::*;
  localparam int N  = 4;
  localparam int NW = 4;   // payload words per circuit

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, prog_write;
  scheme_e              scheme;
  logic [1:0]           prog_port, prog_master;
  logic [3:0]           prog_priority;
  logic [N-1:0]         req_in, ans_in, req_out, ans_out, oc_busy, conflict, reload, ic_waiting;
  logic [N-1:0][7:0]    data_in, data_out;
  int checks = 0, failures = 0;

  clos_switch #(.N_IN(N), .N_OUT(N), .DATA_W(8), .PRIO_W(4),
                .ROUTE_MODE(ROUTE_FIELD), .FIELD_LSB(0)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // sinks: answer one cycle after the request
  always_ff @(posedge clk) ans_out <= rst_n ? req_out : '0;

  int dest_of[N];
  int sent_at[N][NW];
  int probe_at[N];
  int order[$];
  int cur_src[N], cur_seq[N], words_ok;
  logic [N-1:0] req_prev;

  task automatic fail(input string msg);
    failures++; $display("FAIL %s (cycle %0d)", msg, cyc);
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) begin
      if (req_out[k] && !req_prev[k]) probe_at[k] = cyc;
      if (req_out[k] && !data_out[k][7]) begin
        int src, seq;
        src = int'(data_out[k][3:0]);
        seq = int'(data_out[k][6:4]);
        checks++;
        if (seq == 0) begin
          if (cur_src[k] >= 0) fail($sformatf("out %0d new circuit before end", k));
          cur_src[k] = src; order.push_back(src);
          if (dest_of[src] != k) fail($sformatf("src %0d arrived at %0d", src, k));
        end else if (src != cur_src[k] || seq != cur_seq[k] + 1) begin
          fail($sformatf("out %0d word %h out of order", k, data_out[k]));
        end
        cur_seq[k] = seq;
        checks++;
        if (cyc != sent_at[src][seq] + 1) fail($sformatf("latency of word %h", data_out[k]));
        if (seq == NW - 1) begin cur_src[k] = -1; words_ok++; end
      end
      if (!req_out[k] && req_prev[k] && cur_src[k] >= 0) begin
        fail($sformatf("out %0d circuit cut short", k)); cur_src[k] = -1;
      end
    end
    req_prev = req_out;
  end

  task automatic source(input int i, input int dest, input bit check_timing);
    int t0;
    dest_of[i] = dest;
    req_in[i] = 1'b1; data_in[i] = 8'h80 | 8'(dest); t0 = cyc;
    while (!ans_in[i]) begin @(posedge clk); #1; end
    if (check_timing) begin
      checks += 2;
      if (probe_at[dest] != t0 + 2) fail($sformatf("probe latency %0d", probe_at[dest] - t0));
      if (cyc != t0 + 4) fail($sformatf("answer latency %0d", cyc - t0));
    end
    for (int w = 0; w < NW; w++) begin
      data_in[i] = {1'b0, 3'(w), 4'(i)}; sent_at[i][w] = cyc;
      @(posedge clk); #1;
    end
    req_in[i] = 1'b0; data_in[i] = '0;
    @(posedge clk); #1;
  endtask

  int waits;
  always @(negedge clk) if (rst_n) waits += $countones(ic_waiting);

  initial begin
    rst_n = 1'b0; scheme = SCHEME_GBW; prog_write = 1'b0; prog_port = '0; prog_master = '0;
    prog_priority = '0; req_in = '0; data_in = '0; req_prev = '0; words_ok = 0; waits = 0;
    for (int k = 0; k < N; k++) begin cur_src[k] = -1; probe_at[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // program output 0's arbiter: inputs 0..3 get a, c, 6, 8
    prog_write = 1'b1; prog_port = 2'd0;
    for (int i = 0; i < N; i++) begin
      prog_master = 2'(i);
      prog_priority = (i == 0) ? 4'ha : (i == 1) ? 4'hc : (i == 2) ? 4'h6 : 4'h8;
      @(posedge clk); #1;
    end
    prog_write = 1'b0;

    // phase 1: single circuit 0 -> 2, with timing
    source(0, 2, 1'b1);
    repeat (3) @(posedge clk); #1;

    // phase 2: permutation 0->3, 1->2, 2->1, 3->0, no waiting
    waits = 0;
    fork
      source(0, 3, 1'b1);
      source(1, 2, 1'b1);
      source(2, 1, 1'b1);
      source(3, 0, 1'b1);
    join
    checks++;
    if (waits != 0) fail("permutation had to wait");
    repeat (3) @(posedge clk); #1;

    // phase 3: all inputs to output 0
    order.delete();
    fork
      source(0, 0, 1'b0);
      source(1, 0, 1'b0);
      source(2, 0, 1'b0);
      source(3, 0, 1'b0);
    join
    repeat (3) @(posedge clk); #1;
    checks++;
    if (order.size() != 4 || order[0] != 1 || order[1] != 0 || order[2] != 3 || order[3] != 2)
      fail($sformatf("service order %p, expected 1 0 3 2", order));
    checks++;
    if (words_ok != 9) fail($sformatf("%0d complete circuits, expected 9", words_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
