// tb_coef_bank: fills all 32 sets of 50 coefficients with random values,
// selects sets by software and by the external pins, and checks the
// coefficients presented and the switching latency (four clock edges from
// the external pins, about 47 ns at 84.76 MHz).
module tb_coef_bank;
  localparam int NSETS = 32, TAPS = 50, COEF_W = 16, SW = 5, TW = 6;
  logic clk = 0, rst_n = 0, we = 0, ext_en = 0;
  logic [SW-1:0] wset, sw_sel = '0, ext_sel = '0, active_set;
  logic [TW-1:0] wtap;
  logic signed [COEF_W-1:0] wdata;
  logic signed [COEF_W-1:0] coef [TAPS];
  logic [COEF_W-1:0] model [NSETS][TAPS];
  int checks = 0, failures = 0;

  coef_bank #(.NSETS(NSETS), .TAPS(TAPS), .COEF_W(COEF_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit coef_is(int s);
    for (int t = 0; t < TAPS; t++) if (coef[t] !== model[s][t]) return 0;
    return 1;
  endfunction

  initial begin
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < NSETS; s++)
      for (int t = 0; t < TAPS; t++) begin
        @(negedge clk);
        we = 1; wset = SW'(s); wtap = TW'(t); wdata = COEF_W'($urandom);
        model[s][t] = wdata;
      end
    @(negedge clk); we = 0;
    // software selection: two edges to the coefficient outputs
    for (int n = 0; n < 40; n++) begin
      int s;
      s = $urandom % NSETS;
      sw_sel = SW'(s);
      @(negedge clk); @(negedge clk);
      checks++;
      if (!coef_is(s) || active_set != SW'(s)) begin
        failures++; $display("sw select %0d not presented", s);
      end
    end
    // external selection: not yet after three edges, present after four
    ext_en = 1;
    for (int n = 0; n < 40; n++) begin
      int s, prev;
      repeat (4) @(negedge clk);
      prev = int'(active_set);
      do s = $urandom % NSETS; while (s == prev);
      ext_sel = SW'(s);
      repeat (3) @(negedge clk);
      checks++;
      if (!coef_is(prev)) begin failures++; $display("ext select %0d too early", s); end
      @(negedge clk);
      checks++;
      if (!coef_is(s)) begin failures++; $display("ext select %0d late after 4 edges", s); end
    end
    // rewriting a coefficient of the active set takes effect
    @(negedge clk); we = 1; wset = active_set; wtap = 6'd7; wdata = 16'sh1234;
    model[active_set][7] = 16'h1234;
    @(negedge clk); we = 0; @(negedge clk);
    checks++;
    if (coef[7] !== 16'sh1234) begin failures++; $display("live rewrite lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
