// tb_adder5: random operands, including the extremes, into the five-input
// adder; the registered sum must equal the sum of the previous inputs.
module tb_adder5;
  localparam int IN_W = 28, OUT_W = 31;
  logic clk = 0;
  logic signed [IN_W-1:0]  a [5];
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;
  longint exp_q;

  adder5 #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.clk, .a, .y);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      exp_q = 0;
      for (int i = 0; i < 5; i++) begin
        case (n % 3)
          0: a[i] = IN_W'($urandom);
          1: a[i] = {1'b0, {(IN_W-1){1'b1}}};     // largest positive
          default: a[i] = {1'b1, {(IN_W-1){1'b0}}}; // most negative
        endcase
        exp_q += longint'(a[i]);
      end
      @(negedge clk);
      checks++;
      if (longint'(y) != exp_q) begin
        failures++;
        $display("sum %0d expected %0d", y, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
