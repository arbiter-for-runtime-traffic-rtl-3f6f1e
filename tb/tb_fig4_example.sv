// Replays the four-to-one example on the full-size clos_network.
//
// Every arbiter address 0..47 is programmed in turn, four write cycles (inputs
// 0..3 get priorities a, c, 6, 8) followed by one idle cycle. Input port m of
// first-stage switch s holds the data word 8'ha0 + 4*m + s. Sources 0..3 (ports
// 0..3 of first-stage switch 0) then all request destination 0, which is port 0
// of switch 0 in the third stage. Each source holds its probe until answered,
// then sends its own data word for one cycle and releases. The destination
// must receive all four words, in the order the guaranteed-bandwidth arbiters
// give: source 1 (8'ha4), source 0 (8'ha0), source 2 (8'ha8), source 3 (8'hac).
module tb_fig4_example;
  import clos_pkg::*;
  localparam int N = 16;

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

  always_ff @(posedge clk) out_ans <= rst_n ? out_req : '0;

  // destination 0: the last word of each circuit is its payload
  logic [7:0] received[$];
  logic       req_q;
  logic [7:0] last_word;
  always @(negedge clk) begin
    if (!out_req[0] && req_q) received.push_back(last_word);
    req_q     = out_req[0];
    last_word = out_data[0];
  end

  function automatic logic [7:0] word_of(input int src);
    return 8'ha0 + 8'(4 * (src % 4)) + 8'(src / 4);
  endfunction

  task automatic source(input int i);
    in_req[i] = 1'b1; in_data[i] = 8'h00;  // probe to destination 0
    while (!in_ans[i]) begin @(posedge clk); #1; end
    in_data[i] = word_of(i);
    @(posedge clk); #1;
    in_req[i] = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [7:0] expected[4];
    expected = '{8'ha4, 8'ha0, 8'ha8, 8'hac};
    rst_n = 1'b0; scheme = SCHEME_GBW; program_priorities = 1'b0; arbiter_addr = '0;
    master_number = '0; priority_value = '0; in_req = '0; req_q = 1'b0; last_word = '0;
    for (int i = 0; i < N; i++) in_data[i] = word_of(i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int a = 0; a < 48; a++) begin
      arbiter_addr = 6'(a);
      program_priorities = 1'b1;
      for (int m = 0; m < 4; m++) begin
        master_number = 2'(m);
        priority_value = (m == 0) ? 4'ha : (m == 1) ? 4'hc : (m == 2) ? 4'h6 : 4'h8;
        @(posedge clk); #1;
      end
      program_priorities = 1'b0;
      @(posedge clk); #1;
    end
    // the programmed tables of destination 0's arbiter
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (dut.g_s3[0].u_sw.u_arbiter.priority_table[0][m] !=
          ((m == 0) ? 4'ha : (m == 1) ? 4'hc : (m == 2) ? 4'h6 : 4'h8)) begin
        failures++; $display("FAIL priority of input %0d not programmed", m);
      end
    end
    fork
      source(0);
      source(1);
      source(2);
      source(3);
    join
    repeat (8) @(posedge clk);
    checks++;
    if (received.size() != 4) begin
      failures++; $display("FAIL %0d words received", received.size());
    end else begin
      foreach (expected[n]) begin
        checks++;
        if (received[n] != expected[n]) begin
          failures++; $display("FAIL word %0d = %h, expected %h", n, received[n], expected[n]);
        end
      end
    end
    $display("destination 0 received %p", received);
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
