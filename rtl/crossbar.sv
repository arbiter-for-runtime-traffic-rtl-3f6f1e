// Crossbar (data part) of one switch.
//
// One multiplexer per output selects the data word of the input that owns the
// output, as told by the output control (`sel`, `en`). The selected word is
// registered, so each switch adds one pipeline stage to the data path of a circuit
// and a word entering at cycle t leaves at cycle t+1. An output that is not
// connected (en low) drives zero. Probes travel on the same data lines as payload.
//
// A multiplexer per output follows the design's figure; the output register and
// the zero on idle outputs are this implementation's choices.
module crossbar #(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned N_OUT  = 4,
  parameter int unsigned DATA_W = clos_pkg::DEF_DATA_W,
  localparam int unsigned IW    = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_IN-1:0][DATA_W-1:0]   data_in,
  input  logic [N_OUT-1:0][IW-1:0]      sel,
  input  logic [N_OUT-1:0]              en,
  output logic [N_OUT-1:0][DATA_W-1:0]  data_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_out <= '0;
    end else begin
      for (int k = 0; k < N_OUT; k++) data_out[k] <= en[k] ? data_in[sel[k]] : '0;
    end
  end

endmodule
