// tb_delay_fifo: random stream with gaps through the output delay at
// several settings, up to the full 2048-word depth; dout must carry the
// input of delay+1 enabled cycles earlier.
module tb_delay_fifo;
  localparam int W = 24, DEPTH = 2048, AW = 11;
  logic clk = 0, rst_n = 0, en = 0, out_valid;
  logic [AW-1:0] delay;
  logic [W-1:0]  din, dout;
  logic [W-1:0]  hist [$];
  int checks = 0, failures = 0;

  delay_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int d, int steps);
    bit last_en = 0;
    rst_n = 0; en = 0; delay = AW'(d); hist.delete();
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < steps; n++) begin
      @(negedge clk);
      if (last_en) begin
        checks++;
        if (!out_valid) begin failures++; $display("out_valid missing"); end
        if (hist.size() > d + 1) begin
          checks++;
          if (dout !== hist[hist.size() - 1 - (d + 1)]) begin
            failures++;
            if (failures < 10) $display("delay %0d: got %h expected %h", d, dout,
                                        hist[hist.size() - 1 - (d + 1)]);
          end
        end
      end
      en = ($urandom % 4) != 0;
      last_en = en;
      din = W'($urandom);
      if (en) hist.push_back(din);
    end
  endtask

  initial begin
    run(0, 200);
    run(1, 200);
    run(37, 400);
    run(1217, 4000);
    run(2047, 6000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
