// tb_ddr_out: random sample pairs each clock; the output must show the
// first of each pair in the high half of the next clock period and the
// second in the low half that follows.
module tb_ddr_out;
  localparam int W = 12;
  logic clk = 0;
  logic [W-1:0] d_rise = '0, d_fall = '0, q;
  logic [W-1:0] pr, pf;
  int checks = 0, failures = 0;

  ddr_out #(.W(W)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); #1;
      if (n > 0) begin
        checks++;
        if (q !== pf) begin failures++; if (failures < 10) $display("low half %h expected %h", q, pf); end
      end
      pr = W'($urandom); pf = W'($urandom);
      d_rise = pr; d_fall = pf;
      @(posedge clk); #1;
      checks++;
      if (q !== pr) begin failures++; if (failures < 10) $display("high half %h expected %h", q, pr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
