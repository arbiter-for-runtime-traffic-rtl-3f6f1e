// Self-checking testbench of parallel_comparator.
//
// Drives every request pattern with random priority values and compares the
// winning index and value with a sequential reference search (highest value among
// requesters, lowest index on a tie). Also checks the Fig.-style example in which
// priorities a, c, 6, 8 all request: master 1 must win.
module tb_parallel_comparator;
  localparam int N = 4;
  localparam int W = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0][W-1:0] value;
  logic [N-1:0]        request;
  logic                valid;
  logic [1:0]          max_index;
  logic [W-1:0]        max_value;
  int checks = 0, failures = 0;

  parallel_comparator #(.N(N), .W(W)) dut (.*);

  task automatic check_one();
    int best = -1;
    logic [W-1:0] bv = '0;
    for (int i = 0; i < N; i++)
      if (request[i] && (best < 0 || (value[i] & {W{1'b1}}) > bv)) begin
        best = i; bv = value[i];
      end
    #1;
    checks++;
    if (valid !== (best >= 0)) begin
      failures++; $display("FAIL valid req=%b", request);
    end else if (best >= 0 && (max_index !== 2'(best) || max_value !== bv)) begin
      failures++;
      $display("FAIL req=%b val=%h got idx %0d val %h exp %0d %h", request, value, max_index, max_value, best, bv);
    end
  endtask

  initial begin
    // example: priorities a, c, 6, 8, all requesting
    value = {4'h8, 4'h6, 4'hc, 4'ha}; request = 4'b1111; check_one();
    if (max_index != 2'd1) begin failures++; $display("FAIL example winner %0d", max_index); end
    checks++;
    // ties: equal values go to the lowest requesting index
    value = {4'h5, 4'h5, 4'h5, 4'h5}; request = 4'b1110; check_one();
    value = '0; request = 4'b0100; check_one();
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk);
      for (int i = 0; i < N; i++) value[i] = W'($urandom_range(0, (n % 3 == 0) ? 3 : 15));
      request = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
