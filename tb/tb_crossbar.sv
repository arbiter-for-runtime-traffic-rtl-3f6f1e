// Self-checking testbench of crossbar.
//
// Random data, selects and enables every cycle; each output must show, one cycle
// later, the selected input's word when enabled and zero otherwise.
module tb_crossbar;
  localparam int N = 4;
  localparam int DW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n;
  logic [N-1:0][DW-1:0] data_in, data_out, expected;
  logic [N-1:0][1:0]    sel;
  logic [N-1:0]         en;
  int checks = 0, failures = 0;

  crossbar #(.N_IN(N), .N_OUT(N), .DATA_W(DW)) dut (.*);

  initial begin
    rst_n = 1'b0; data_in = '0; sel = '0; en = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N; i++) begin
        data_in[i] = DW'($urandom);
        sel[i]     = 2'($urandom);
      end
      en = N'($urandom);
      for (int k = 0; k < N; k++) expected[k] = en[k] ? data_in[sel[k]] : '0;
      @(posedge clk);
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (data_out[k] !== expected[k]) begin
          failures++; $display("FAIL out %0d = %h exp %h", k, data_out[k], expected[k]);
        end
      end
    end
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
