// Parallel comparator of the guaranteed-bandwidth arbiter.
//
// Takes N priority values that have already been ANDed with their request bits
// and the request vector itself, and returns the index of the highest value among
// the requesting masters. Every pair of entries is compared at once (N*(N-1)
// comparators): entry i wins if it is requesting and, against every other
// requesting entry j, its value is greater, or equal with i < j. Ties therefore go
// to the lowest index, and a requester whose priority has reached zero can still
// win when no other requester is higher. Purely combinational.
//
// Comparing all masked values and outputting the index of the highest follows the
// design's description; the all-pairs structure, the lowest-index tie rule and the
// use of the request vector to tell a zero-priority requester from an idle master
// are this implementation's choices.
module parallel_comparator #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] value,      // masked priority values
  input  logic [N-1:0]        request,    // request vector
  output logic                valid,      // at least one request
  output logic [IW-1:0]       max_index,  // index of the highest requesting entry
  output logic [W-1:0]        max_value   // its value
);

  logic [N-1:0] win;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      win[i] = request[i];
      for (int j = 0; j < N; j++) begin
        if (j != i && request[j]) begin
          if (value[i] < value[j] || (value[i] == value[j] && j < i)) win[i] = 1'b0;
        end
      end
    end
  end

  // win is one-hot or zero: encode it.
  always_comb begin
    max_index = '0;
    max_value = '0;
    for (int i = 0; i < N; i++) begin
      if (win[i]) begin
        max_index = IW'(i);
        max_value = value[i];
      end
    end
  end

  assign valid = |request;

endmodule
