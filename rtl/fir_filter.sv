// fir_filter: turn-by-turn FIR filter for one ADC channel.
//
// Each channel carries every sixth (or fourth) bunch, so a one-turn delay of
// its stream gives the same bunch one turn earlier. The filter output for a
// bunch is sum_k c[k] * x[n - k*turn], computed in a direct form as in the
// document: a cascade of TAPS-1 one-turn delay memories, one multiplier per
// tap (12-bit sample times 16-bit coefficient, 28-bit product), products
// summed five at a time by registered five-port adders (a missing fifth
// input is zero), then the group sums added and attenuated/truncated to the
// DAC width.
//
// dual = 0: one TAPS-tap filter; y_a and y_b are equal.
// dual = 1: two SPLIT-tap filters on the same input. Filter A uses taps
//           0..SPLIT-1, filter B uses coefficient slots SPLIT..2*SPLIT-1
//           applied to the first SPLIT delays; the remaining slots are
//           unused. SPLIT must be a multiple of five so that each filter
//           owns whole five-port adders.
//
// Attenuation is an arithmetic right shift by att_shift followed by
// saturation to OUT_W bits (the document gives "att./trunc." only; the
// saturation is this design's choice). Latency: an input accepted with
// in_valid appears on y_a/y_b with out_valid four clock edges later. The
// delay line advances only on in_valid.
module fir_filter
  import bbf_pkg::fir_mode_e, bbf_pkg::FIR_DUAL;
#(
  parameter int unsigned TAPS     = 50,
  parameter int unsigned SPLIT    = 20,
  parameter int unsigned IN_W     = 12,
  parameter int unsigned COEF_W   = 16,
  parameter int unsigned OUT_W    = 12,
  parameter int unsigned TURN_MAX = 1024,
  parameter int unsigned LW       = $clog2(TURN_MAX + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   din,
  input  logic [LW-1:0]            turn_len,
  input  fir_mode_e                mode,
  input  logic [5:0]               att_shift,
  input  logic signed [COEF_W-1:0] coef [TAPS],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_a,
  output logic signed [OUT_W-1:0]  y_b
);

  localparam int unsigned PROD_W = IN_W + COEF_W;         // 28
  localparam int unsigned GRP_W  = PROD_W + 3;            // 31
  localparam int unsigned NG     = (TAPS + 4) / 5;        // five-port adders
  localparam int unsigned SUM_W  = GRP_W + $clog2(NG + 1);
  localparam int unsigned GA     = SPLIT / 5;             // adders of one split filter

  if (SPLIT % 5 != 0 || 2 * SPLIT > TAPS) begin : g_bad_split
    $error("fir_filter: SPLIT must be a multiple of 5 and at most TAPS/2");
  end

  // ---- delay line: d[k] = x[n - k*turn] -------------------------------------
  logic signed [IN_W-1:0] d [TAPS];
  assign d[0] = din;

  for (genvar k = 1; k < TAPS; k++) begin : g_dly
    turn_delay #(.W(IN_W), .DEPTH(TURN_MAX), .LW(LW)) u_dly (
      .clk, .rst_n, .en(in_valid), .turn_len,
      .din(d[k-1]), .dout(d[k])
    );
  end

  // ---- multipliers ------------------------------------------------------------
  logic signed [PROD_W-1:0] prod [NG*5];
  logic                     dual;
  assign dual = (mode == FIR_DUAL);

  for (genvar k = 0; k < NG*5; k++) begin : g_mul
    if (k < TAPS) begin : g_used
      logic signed [IN_W-1:0]   x_k;
      logic signed [COEF_W-1:0] c_k;
      if (k >= SPLIT && k < 2*SPLIT) begin : g_b
        assign x_k = dual ? d[k-SPLIT] : d[k];
      end else begin : g_plain
        assign x_k = d[k];
      end
      assign c_k = (dual && k >= 2*SPLIT) ? '0 : coef[k];
      always_ff @(posedge clk) prod[k] <= x_k * c_k;
    end else begin : g_pad
      assign prod[k] = '0;
    end
  end

  // ---- five-port adders -------------------------------------------------------
  logic signed [GRP_W-1:0] grp [NG];

  for (genvar g = 0; g < NG; g++) begin : g_add
    adder5 #(.IN_W(PROD_W), .OUT_W(GRP_W)) u_add (
      .clk,
      .a(prod[g*5 +: 5]),
      .y(grp[g])
    );
  end

  // ---- final sums ---------------------------------------------------------------
  logic signed [SUM_W-1:0] sum_a, sum_b, acc_a, acc_b;

  always_comb begin
    acc_a = '0;
    acc_b = '0;
    for (int g = 0; g < NG; g++) begin
      if (!dual || g < GA)          acc_a += SUM_W'(grp[g]);
      if (dual && g >= GA && g < 2*GA) acc_b += SUM_W'(grp[g]);
    end
  end

  always_ff @(posedge clk) begin
    sum_a <= acc_a;
    sum_b <= dual ? acc_b : acc_a;
  end

  // ---- attenuation and truncation --------------------------------------------------
  function automatic logic signed [OUT_W-1:0] att_sat(logic signed [SUM_W-1:0] s,
                                                      logic [5:0] sh);
    logic signed [SUM_W-1:0] v;
    v = s >>> sh;
    if (v > SUM_W'((2**(OUT_W-1)) - 1))      return {1'b0, {(OUT_W-1){1'b1}}};
    else if (v < -SUM_W'(2**(OUT_W-1)))      return {1'b1, {(OUT_W-1){1'b0}}};
    else                                     return v[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    y_a <= att_sat(sum_a, att_shift);
    y_b <= att_sat(sum_b, att_shift);
  end

  // ---- valid pipeline (multiply, add5, sum, attenuate) -----------------------------
  logic [3:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[2:0], in_valid};
  end
  assign out_valid = vpipe[3];

endmodule
