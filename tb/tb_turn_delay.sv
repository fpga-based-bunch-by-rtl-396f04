// tb_turn_delay: feeds a random stream with random gaps in the enable and
// checks that dout always shows the input of exactly turn_len enabled
// samples earlier, for the SPring-8 length (406) and a short one.
module tb_turn_delay;
  localparam int W = 12, DEPTH = 1024, LW = 11;
  logic clk = 0, rst_n = 0, en = 0;
  logic [LW-1:0] turn_len;
  logic [W-1:0]  din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  turn_delay #(.W(W), .DEPTH(DEPTH), .LW(LW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int tl, int steps);
    hist.delete();
    rst_n = 0; en = 0; turn_len = LW'(tl);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < steps; ) begin
      @(negedge clk);
      // after the previous enabled step, dout holds hist[size - tl]
      if (hist.size() >= tl) begin
        checks++;
        if (dout !== hist[hist.size() - tl]) begin
          failures++;
          if (failures < 10) $display("turn %0d step %0d: got %h expected %h",
                                      tl, n, dout, hist[hist.size() - tl]);
        end
      end
      en  = ($urandom % 4) != 0;
      din = W'($urandom);
      if (en) begin hist.push_back(din); n++; end
    end
    @(negedge clk); en = 0;
  endtask

  initial begin
    run(406, 2000);
    run(7, 300);
    run(2, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
