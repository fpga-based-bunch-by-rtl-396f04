// tb_out_mux: frames of six (then four) channel samples on the slow clock
// must come out of the fast side as pairs in bunch order, with the fast
// clock at three times (six ADC mode) or twice (four ADC mode) the slow
// clock. Also checked: the first pair leaves on the first fast edge after the slow
// edge that took the frame, and the pairs follow back to back.
module tb_out_mux;
  import bbf_pkg::*;
  localparam int NCH_T = 6, W = 12;
  logic clk = 0, clk_fast = 0, rst_n = 0, rst_fast_n = 0, in_valid = 0, out_valid;
  logic [W-1:0] din [NCH_T];
  logic [W-1:0] dout [2];
  adc_mode_e mode = MODE_SIX;
  int half_slow = 6, half_fast = 2;
  int checks = 0, failures = 0, gaps = 0;
  logic [W-1:0] expq [$];
  time t_take [$];

  out_mux #(.NCH(NCH_T), .W(W)) dut (.*);

  initial forever begin #(half_slow) clk = ~clk; end
  initial forever begin #(half_fast) clk_fast = ~clk_fast; end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fast-side checker
  int nout = 0;
  always @(posedge clk_fast) begin
    #1;
    if (rst_fast_n && out_valid) begin
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (expq.size() == 0) begin failures++; $display("unexpected output"); end
        else if (dout[i] !== expq.pop_front()) begin
          failures++; if (failures < 10) $display("pair word %0d wrong", i);
        end
      end
      nout++;
    end
  end

  task automatic run(adc_mode_e m, int frames);
    int nact = (m == MODE_FOUR) ? 4 : 6;
    rst_n = 0; rst_fast_n = 0; in_valid = 0; expq.delete();
    mode = m;
    half_fast = (m == MODE_FOUR) ? 3 : 2;   // slow half period is 6
    @(negedge clk); @(negedge clk);
    rst_n = 1; rst_fast_n = 1;
    for (int f = 0; f < frames; f++) begin
      @(negedge clk);
      in_valid = (f % 7) != 6;      // an idle slow cycle now and then
      for (int c = 0; c < NCH_T; c++) din[c] = W'($urandom);
      if (in_valid) for (int c = 0; c < nact; c++) expq.push_back(din[c]);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d samples not sent", expq.size()); end
  endtask

  // timing: first pair on the first fast edge after the slow edge, pairs back to back
  task automatic timing_check();
    rst_n = 0; rst_fast_n = 0; mode = MODE_SIX; half_fast = 2; expq.delete();
    @(negedge clk); rst_n = 1; rst_fast_n = 1;
    @(negedge clk);
    in_valid = 1;
    for (int c = 0; c < NCH_T; c++) begin din[c] = W'(c); expq.push_back(W'(c)); end
    @(posedge clk); #1;
    // out_valid should be high for exactly 3 fast cycles, from the first fast edge after the slow edge
    for (int k = 1; k <= 5; k++) begin
      @(posedge clk_fast); #1;
      if (k == 2) in_valid = 0;
      if (k <= 3) begin checks++; if (!out_valid) begin failures++; $display("pair %0d missing", k); end end
      else begin checks++; if (out_valid) begin failures++; $display("valid at edge %0d", k); end end
    end
  endtask

  initial begin
    run(MODE_SIX, 300);
    run(MODE_FOUR, 300);
    run(MODE_SIX, 100);
    timing_check();
    checks++;
    if (nout < 1000) begin failures++; $display("only %0d pairs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
