// tb_fir_filter: the default 50-tap filter with a short turn (turn_len 3 or
// 5) so that the delay line fills quickly. A reference model keeps the
// input history and computes sum c[k]*x[n-k*turn], shifts and saturates.
// Checked: both outputs in the 50-tap and the two-20-tap arrangement, with
// small and large coefficients (saturation), random gaps in in_valid, and
// the four-clock latency from in_valid to out_valid.
module tb_fir_filter;
  import bbf_pkg::*;
  localparam int TAPS_T = 50, SPLIT_T = 20, TMAX = 8, LW_T = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [11:0] din = '0;
  logic [LW_T-1:0] turn_len;
  fir_mode_e mode;
  logic [5:0] att_shift;
  logic signed [15:0] coef [TAPS_T];
  logic signed [11:0] y_a, y_b;

  fir_filter #(.TAPS(TAPS_T), .SPLIT(SPLIT_T), .TURN_MAX(TMAX), .LW(LW_T)) dut (.*);

  int checks = 0, failures = 0, sat_seen = 0;
  int x_hist [$];
  typedef struct { int ya; int yb; bit chk; } exp_t;
  exp_t expq [$];
  int vin_cycle [$];
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int att_sat(longint s, int sh);
    longint v = s >>> sh;
    if (v > 2047)  begin sat_seen++; return 2047;  end
    if (v < -2048) begin sat_seen++; return -2048; end
    return int'(v);
  endfunction

  function automatic exp_t model(int tl);
    exp_t e;
    longint sa = 0, sb = 0;
    int n = x_hist.size() - 1;
    e.chk = (n - (TAPS_T - 1) * tl) >= 0;
    if (!e.chk) return e;
    if (mode == FIR_SINGLE) begin
      for (int k = 0; k < TAPS_T; k++) sa += longint'(coef[k]) * x_hist[n - k*tl];
      sb = sa;
    end else begin
      for (int k = 0; k < SPLIT_T; k++) begin
        sa += longint'(coef[k]) * x_hist[n - k*tl];
        sb += longint'(coef[SPLIT_T + k]) * x_hist[n - k*tl];
      end
    end
    e.ya = att_sat(sa, att_shift);
    e.yb = att_sat(sb, att_shift);
    return e;
  endfunction

  // output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (expq.size() == 0) begin
        failures++; $display("out_valid with no input pending");
      end else begin
        e = expq.pop_front();
        checks++;
        if (cycle - vin_cycle.pop_front() != 4) begin
          failures++; $display("latency not four clocks");
        end
        if (e.chk) begin
          checks++;
          if (int'(y_a) != e.ya || int'(y_b) != e.yb) begin
            failures++;
            if (failures < 10) $display("mode %0d: got %0d/%0d expected %0d/%0d",
                                        mode, y_a, y_b, e.ya, e.yb);
          end
        end
      end
    end
  end

  task automatic run(int tl, fir_mode_e m, int cmax, int sh, int steps);
    // let the pipeline drain, then reset the history for the new setting
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    rst_n = 0; x_hist.delete();
    turn_len = LW_T'(tl); mode = m; att_shift = 6'(sh);
    for (int k = 0; k < TAPS_T; k++) coef[k] = 16'($signed($urandom % (2*cmax+1)) - cmax);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < steps; ) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      din = 12'($urandom);
      if (in_valid) begin
        x_hist.push_back(int'(din));
        expq.push_back(model(tl));
        vin_cycle.push_back(cycle);
        n++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    run(3, FIR_SINGLE, 300,   9, 400);
    run(5, FIR_SINGLE, 32767, 15, 400);
    run(3, FIR_DUAL,   1000,  10, 300);
    run(4, FIR_DUAL,   32767, 14, 300);
    checks++;
    if (expq.size() != 0 || checks < 1000) begin
      failures++; $display("%0d inputs never came out", expq.size());
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never reached"); end
    $display("saturated outputs: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
