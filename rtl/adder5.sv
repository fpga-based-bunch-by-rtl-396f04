// adder5: registered five-input adder of signed tap products.
//
// The FIR filter sums its tap products five at a time in one adder stage
// instead of a chain of two-input adders, which shortens the adder path
// between registers. With 28-bit products the sum is 31 bits wide, as in
// the document's 9-tap filter; unused inputs are tied to zero by the caller.
// Timing: y is the sum of the inputs of the previous clock edge.
module adder5 #(
  parameter int unsigned IN_W  = 28,
  parameter int unsigned OUT_W = IN_W + 3
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  a [5],
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 5; i++) sum += OUT_W'(a[i]);
  end

  always_ff @(posedge clk) y <= sum;

endmodule
