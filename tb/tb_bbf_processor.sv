// tb_bbf_processor: end-to-end test of the feedback processor at its default
// sizes (50 taps, 32 coefficient sets, 1024-word turn memories, 32M-word
// history), with a short turn of TL samples per channel so that the 49-turn
// delay line fills quickly.
//
// The bench models six ADCs (each with its own data clock phase), the
// clock manager (fast clock = 3x or 2x the ADC clock, phase aligned) and the
// host's register accesses. A reference model computes, from the ADC sample
// arrays, the filter output of every bunch in bunch order; the DAC outputs
// are sampled in the middle of every half fast-clock period. Since the
// pipeline delay is not a model input, the bench finds the stream offset
// once per segment with a 48-sample window and then checks every sample of
// the segment against the model. Segments:
//   1  six ADC mode, one 50-tap filter, set 0: DACs 0..3 and raw DAC 4;
//      latency check against the 400 ns budget (with the ADC's own
//      10-clock latency added)
//   2  delay FIFO A and raw delay set: offsets must grow by exactly 2*delay
//   3  software switch to set 1 (large coefficients: saturation)
//   4  external-pin switch to set 2
//   5  two 20-tap filters (set 3): DAC 0 = filter A, DAC 2 = filter B
//   6  per-channel raw delay adjust
//   7  sample-history capture with the external trigger pin
//   8  four ADC mode after a reset, clock ratio 2
// Each mechanism is counted; one that never happened counts as a failure.
module tb_bbf_processor;
  import bbf_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int TL    = 8;       // samples per turn per channel in this bench
  localparam int NMAX  = 16384;   // ADC samples per channel generated
  localparam int HALF_FAST = 1966; // half period of the 254.29 MHz clock

  // ---- DUT ----------------------------------------------------------------
  logic clk = 0, clk_fast = 0, rst_n = 0;
  logic adc_dco [NCH];
  logic [ADC_W-1:0] adc_data [NCH];
  logic [SET_W-1:0] ext_coef_sel = '0;
  logic ext_trig = 0;
  logic reg_we = 0, reg_re = 0;
  logic [7:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [DAC_W-1:0] dac_data [NDAC];
  logic mem_wr_valid;
  logic [MEM_AW-1:0] mem_wr_addr;
  logic [MEM_WORD_W-1:0] mem_wr_data [NCH];
  logic [2:0] mem_wr_words;

  bbf_processor dut (.*);

  int checks = 0, failures = 0;

  // ---- clocks: slow edges coincide with fast rising edges -----------------
  int ratio = 3;           // fast half periods per slow half period
  int hcnt = 2;
  initial forever begin
    #(HALF_FAST);
    clk_fast = ~clk_fast;
    hcnt++;
    if (hcnt >= ratio) begin clk = ~clk; hcnt = 0; end
  end

  // ---- ADC models: data clock = ADC clock delayed per channel --------------
  int X [NCH][NMAX];
  int cnt [NCH];
  int fcnt = 0;            // ADC clock count; every channel's data edge follows the ADC clock edge
  always @(posedge clk) fcnt <= fcnt + 1;
  time t_set [NMAX];       // when channel 0 put sample n on its outputs

  for (genvar c = 0; c < NCH; c++) begin : g_adc
    assign #(1000 + 250 * c) adc_dco[c] = clk;
    initial begin
      cnt[c] = 0;
      adc_data[c] = '0;
      forever begin
        @(posedge adc_dco[c]);
        adc_data[c] <= ADC_W'(X[c][fcnt % NMAX]);
        if (c == 0) t_set[fcnt % NMAX] = $time;
        cnt[c] = fcnt + 1;
      end
    end
  end

  initial begin
    #4000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- DAC observation ----------------------------------------------------
  logic [DAC_W-1:0] obs [NDAC][$];
  time t_obs [$];
  always @(clk_fast) begin
    #(HALF_FAST / 2);
    for (int d = 0; d < NDAC; d++) obs[d].push_back(dac_data[d]);
    t_obs.push_back($time);
  end

  // ---- register access ------------------------------------------------------
  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = 32'(d);
    @(negedge clk); reg_we = 0;
  endtask

  task automatic rd(int a, output int d);
    @(negedge clk); reg_re = 1; reg_addr = 8'(a);
    @(negedge clk); reg_re = 0; d = int'(reg_rdata);
  endtask

  // ---- coefficients (model copy) ------------------------------------------
  int C [NSETS][TAPS];

  task automatic load_set(int s, int cmax);
    for (int k = 0; k < TAPS; k++) begin
      C[s][k] = int'($urandom % (2 * cmax + 1)) - cmax;
      wr(8'h04, (s << 8) | k);
      wr(8'h05, C[s][k] & 16'hFFFF);
    end
  endtask

  // ---- reference model -----------------------------------------------------------
  int sat_seen = 0;
  int nch_m = 6;           // channels in the current mode
  int att_m = 10;
  int raw_d [NCH] = '{default: 0};

  function automatic int att_sat(longint s);
    longint v = s >>> att_m;
    if (v > 2047)  begin sat_seen++; return 2047; end
    if (v < -2048) begin sat_seen++; return -2048; end
    return int'(v);
  endfunction

  function automatic int sx(int v);   // 12-bit code as signed
    return (v >= 2048) ? v - 4096 : v;
  endfunction

  // which: 0 = output A, 1 = output B, 2 = raw
  function automatic int model(int j, int set, bit dual, int which);
    int c = j % nch_m, n = j / nch_m;
    longint s = 0;
    if (which == 2) return X[c][(n - raw_d[c]) % NMAX];
    if (!dual)
      for (int k = 0; k < TAPS; k++) s += longint'(C[set][k]) * sx(X[c][(n - k*TL) % NMAX]);
    else
      for (int k = 0; k < SPLIT_TAPS; k++)
        s += longint'(C[set][k + (which == 1 ? SPLIT_TAPS : 0)]) * sx(X[c][(n - k*TL) % NMAX]);
    return att_sat(s) & 12'hFFF;
  endfunction

  // Find the output offset for bunches [j0, j1) on DAC d, then check them all.
  // Returns the offset (obs index minus bunch index), or -1.
  function automatic int check_stream(int d, int j0, int j1, int set, bit dual,
                                      int which, int i_lo, string what);
    int off = -1;
    int exp_w [48];
    int cand;
    for (int q = 0; q < 48; q++) exp_w[q] = model(j0 + q, set, dual, which);
    for (int i = i_lo; i + 48 < obs[d].size(); i++) begin
      bit ok = 1;
      for (int q = 0; q < 48 && ok; q++) if (int'(obs[d][i + q]) != exp_w[q]) ok = 0;
      if (ok) begin off = i - j0; break; end
    end
    checks++;
    if (off < 0) begin
      failures++; $display("%s: DAC %0d stream not found", what, d);
      return -1;
    end
    for (int j = j0; j < j1; j++) begin
      cand = j + off;
      if (cand >= obs[d].size()) break;
      checks++;
      if (int'(obs[d][cand]) != model(j, set, dual, which)) begin
        failures++;
        if (failures < 20) $display("%s: DAC %0d bunch %0d got %h expected %h", what, d, j,
                                    obs[d][cand], model(j, set, dual, which));
      end
    end
    return off;
  endfunction

  // ---- mechanism counters -------------------------------------------------
  int m_six = 0, m_four = 0, m_single = 0, m_dual = 0, m_sw_sel = 0, m_ext_sel = 0;
  int m_delay = 0, m_raw_delay = 0, m_sat = 0, m_capture = 0, m_latency = 0;

  // run `frames` ADC clocks; return the first and last+1 sample index seen
  task automatic run_frames(int frames, output int n0, output int n1, output int i0);
    i0 = obs[0].size();
    n0 = cnt[0];
    repeat (frames) @(posedge clk);
    n1 = cnt[0];
  endtask

  // capture monitor: words must be consecutive ADC samples, addresses consecutive
  int cap_writes = 0, cap_n = -1, cap_addr_exp = 0, cap_bad = 0;
  always @(posedge clk) begin
    if (rst_n && mem_wr_valid) begin
      if (cap_n < 0) begin
        for (int n = 0; n < NMAX; n++) if (X[0][n] == int'(mem_wr_data[0][11:0]) &&
                                            X[1][n] == int'(mem_wr_data[1][11:0])) begin
          cap_n = n; break;
        end
        cap_addr_exp = int'(mem_wr_addr);
      end
      for (int c = 0; c < NCH; c++)
        if (mem_wr_data[c] !== {{4{X[c][cap_n % NMAX][11]}}, 12'(X[c][cap_n % NMAX])}) cap_bad++;
      if (int'(mem_wr_addr) != cap_addr_exp || mem_wr_words != 3'd6) cap_bad++;
      cap_addr_exp += 6;
      cap_n++;
      cap_writes++;
    end
  end

  int n0, n1, i0, off_a, off_b, off_r, off_a2, off_r2, v, lat;

  initial begin
    for (int c = 0; c < NCH; c++)
      for (int n = 0; n < NMAX; n++) X[c][n] = int'($urandom % 4096);

    // ---- reset and configuration ----
    repeat (4) @(negedge clk);
    rst_n = 1;
    rd(8'h0F, v);
    checks++; if (v != 32'h0BBF_0001) begin failures++; $display("ID %h", v); end
    wr(8'h01, TL);
    wr(8'h02, att_m);
    load_set(0, 64);
    load_set(1, 32767);
    load_set(2, 100);
    load_set(3, 80);

    // ---- 1: six ADC mode, 50 taps, set 0 ----
    repeat (TAPS * TL + 20) @(posedge clk);
    run_frames(300, n0, n1, i0);
    off_a = check_stream(0, 6*n0, 6*n1 - 120, 0, 0, 0, i0, "six/50-tap A");
    void'(check_stream(1, 6*n0, 6*n1 - 120, 0, 0, 0, i0, "six/50-tap A copy"));
    off_b = check_stream(2, 6*n0, 6*n1 - 120, 0, 0, 1, i0, "six/50-tap B");
    void'(check_stream(3, 6*n0, 6*n1 - 120, 0, 0, 1, i0, "six/50-tap B copy"));
    off_r = check_stream(4, 6*n0, 6*n1 - 120, 0, 0, 2, i0, "raw");
    if (off_a >= 0) begin m_six++; m_single++; end
    // latency: ADC output of bunch 6*n0 to its DAC sample, plus the ADC's 10 clocks
    if (off_a >= 0) begin
      lat = int'((t_obs[6*n0 + off_a] - (t_set[n0 % NMAX] + 6 * HALF_FAST)) / 1000)
            + 10 * 6 * 2 * HALF_FAST / 1000;
      $display("processor latency incl. ADC: %0d ns", lat);
      checks++;
      if (lat >= 400 || lat <= 0) begin failures++; $display("latency %0d ns over budget", lat); end
      else m_latency++;
    end

    // ---- 2: output delay ----
    wr(8'h06, 100);
    wr(8'h08, 7);
    repeat (300) @(posedge clk);
    run_frames(200, n0, n1, i0);
    off_a2 = check_stream(0, 6*n0, 6*n1 - 500, 0, 0, 0, i0, "delay A");
    off_r2 = check_stream(4, 6*n0, 6*n1 - 500, 0, 0, 2, i0, "delay raw");
    checks++;
    if (off_a2 != off_a + 200 || off_r2 != off_r + 14) begin
      failures++; $display("delay offsets %0d/%0d from %0d/%0d", off_a2, off_r2, off_a, off_r);
    end else m_delay++;
    v = check_stream(2, 6*n0, 6*n1 - 500, 0, 0, 1, i0, "delay B unchanged");
    checks++; if (v != off_b) begin failures++; $display("B moved with A's delay"); end
    wr(8'h06, 0);
    wr(8'h08, 0);

    // ---- 3: software coefficient switch to set 1 (saturating) ----
    v = sat_seen;
    wr(8'h03, 1);
    repeat (300) @(posedge clk);
    run_frames(200, n0, n1, i0);
    if (check_stream(0, 6*n0, 6*n1 - 120, 1, 0, 0, i0, "set 1") >= 0) m_sw_sel++;
    if (sat_seen > v) m_sat++;

    // ---- 4: external coefficient switch to set 2 ----
    ext_coef_sel = 5'd2;
    wr(8'h00, 32'h4);
    repeat (10) @(posedge clk);
    rd(8'h0C, v);
    checks++; if (((v >> 8) & 31) != 2) begin failures++; $display("active set %0d", (v >> 8) & 31); end
    run_frames(200, n0, n1, i0);
    if (check_stream(0, 6*n0, 6*n1 - 120, 2, 0, 0, i0, "set 2 ext") >= 0) m_ext_sel++;

    // ---- 5: two 20-tap filters, set 3 ----
    ext_coef_sel = 5'd3;
    wr(8'h00, 32'h6);
    repeat (20) @(posedge clk);
    run_frames(200, n0, n1, i0);
    v = 0;
    if (check_stream(0, 6*n0, 6*n1 - 120, 3, 1, 0, i0, "dual A") >= 0) v++;
    if (check_stream(2, 6*n0, 6*n1 - 120, 3, 1, 1, i0, "dual B") >= 0) v++;
    if (v == 2) m_dual++;
    wr(8'h00, 32'h0);
    wr(8'h03, 0);

    // ---- 6: raw delay adjust per channel ----
    wr(8'h09, (3 << 3) | (5 << 9) | (1 << 15));   // ch1: 3, ch3: 5, ch5: 1
    raw_d[1] = 3; raw_d[3] = 5; raw_d[5] = 1;
    repeat (20) @(posedge clk);
    run_frames(150, n0, n1, i0);
    if (check_stream(4, 6*n0, 6*n1 - 120, 0, 0, 2, i0, "raw delay adjust") >= 0) m_raw_delay++;
    raw_d = '{default: 0};
    wr(8'h09, 0);

    // ---- 7: sample-history capture, external trigger ----
    wr(8'h0B, 20);
    wr(8'h00, 32'h8);
    wr(8'h0A, 1);
    repeat (50) @(posedge clk);
    @(negedge clk); ext_trig = 1;
    repeat (40) @(posedge clk);
    ext_trig = 0;
    rd(8'h0C, v);
    checks++; if ((v & 3) != int'(CAP_DONE)) begin failures++; $display("capture state %0d", v & 3); end
    rd(8'h0D, v);
    checks++;
    if (cap_bad != 0 || cap_writes < 60 || v != cap_addr_exp - 6*20) begin
      failures++; $display("capture: %0d writes, %0d bad, trigger address %0d", cap_writes, cap_bad, v);
    end else m_capture++;
    v = cap_writes;
    repeat (20) @(posedge clk);
    checks++; if (cap_writes != v) begin failures++; $display("writes after capture done"); end

    // ---- 8: four ADC mode ----
    @(negedge clk); rst_n = 0;
    repeat (3) @(negedge clk);
    @(posedge clk_fast);
    ratio = 2; hcnt = 1;
    repeat (6) @(negedge clk);
    rst_n = 1;
    nch_m = 4;
    wr(8'h00, 32'h1);
    wr(8'h01, TL);
    wr(8'h02, att_m);
    load_set(0, 64);
    repeat (TAPS * TL + 20) @(posedge clk);
    run_frames(300, n0, n1, i0);
    v = 0;
    if (check_stream(0, 4*n0, 4*n1 - 120, 0, 0, 0, i0, "four/50-tap A") >= 0) v++;
    if (check_stream(4, 4*n0, 4*n1 - 120, 0, 0, 2, i0, "four raw") >= 0) v++;
    if (v == 2) m_four++;

    // ---- coverage of mechanisms ----
    $display("six=%0d four=%0d single=%0d dual=%0d sw_sel=%0d ext_sel=%0d delay=%0d raw_delay=%0d sat=%0d capture=%0d latency=%0d",
             m_six, m_four, m_single, m_dual, m_sw_sel, m_ext_sel, m_delay, m_raw_delay, m_sat, m_capture, m_latency);
    checks++; if (m_six == 0)       begin failures++; $display("six ADC mode never checked"); end
    checks++; if (m_four == 0)      begin failures++; $display("four ADC mode never checked"); end
    checks++; if (m_single == 0)    begin failures++; $display("50-tap filter never checked"); end
    checks++; if (m_dual == 0)      begin failures++; $display("two 20-tap filters never checked"); end
    checks++; if (m_sw_sel == 0)    begin failures++; $display("software set switch never checked"); end
    checks++; if (m_ext_sel == 0)   begin failures++; $display("external set switch never checked"); end
    checks++; if (m_delay == 0)     begin failures++; $display("output delay never checked"); end
    checks++; if (m_raw_delay == 0) begin failures++; $display("raw delay adjust never checked"); end
    checks++; if (m_sat == 0)       begin failures++; $display("saturation never happened"); end
    checks++; if (m_capture == 0)   begin failures++; $display("capture never completed"); end
    checks++; if (m_latency == 0)   begin failures++; $display("latency never measured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
