// tb_spring8_workload: the processor in its SPring-8 configuration, all
// sizes at their defaults: six ADC mode, 406 samples per channel per turn
// (harmonic number 2436), the full 50-tap filter whose delay line spans 49
// turns. The bench fills the delay line (19,894 ADC clocks), then checks
// every one of the 2436 bunches of a whole turn in each case:
//   - with a 9-tap filter in the first nine coefficient slots, as on the
//     earlier processor, a 50-tap filter using all slots, and a 24-tap
//     filter of the kind used for two-dimensional feedback with one loop;
//   - with two 20-tap filters, output A on DAC 0 and output B on DAC 2;
//   - with the output delay set to 890 fast cycles (3.5 us, the extra delay
//     that brought the earlier system to one revolution), which must shift
//     the output by exactly 1780 bunch slots.
// ADC data are random 12-bit codes per bunch and turn.
module tb_spring8_workload;
  import bbf_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int TL        = 406;
  localparam int H         = 2436;
  localparam int NMAX      = 24000;
  localparam int HALF_FAST = 1966;

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

  int hcnt = 2;
  initial forever begin
    #(HALF_FAST);
    clk_fast = ~clk_fast;
    hcnt++;
    if (hcnt >= 3) begin clk = ~clk; hcnt = 0; end
  end

  int X [NCH][NMAX];
  int cnt [NCH];
  int fcnt = 0;            // ADC clock count; every channel's data edge follows the ADC clock edge
  always @(posedge clk) fcnt <= fcnt + 1;
  for (genvar c = 0; c < NCH; c++) begin : g_adc
    assign #(1200 + 200 * c) adc_dco[c] = clk;
    initial begin
      cnt[c] = 0;
      adc_data[c] = '0;
      forever begin
        @(posedge adc_dco[c]);
        adc_data[c] <= ADC_W'(X[c][fcnt % NMAX]);
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

  // DAC samples, taken mid-way between DAC clock edges: output A and output B
  logic [DAC_W-1:0] obs [$], obs_b [$];
  always @(clk_fast) begin
    #(HALF_FAST / 2);
    obs.push_back(dac_data[0]);
    obs_b.push_back(dac_data[2]);
  end

  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = 32'(d);
    @(negedge clk); reg_we = 0;
  endtask

  int C [4][TAPS];
  task automatic load_set(int s, int ntaps, int cmax);
    for (int k = 0; k < TAPS; k++) begin
      C[s][k] = (k < ntaps) ? int'($urandom % (2 * cmax + 1)) - cmax : 0;
      wr(8'h04, (s << 8) | k);
      wr(8'h05, C[s][k] & 16'hFFFF);
    end
  endtask

  function automatic int sx(int v);
    return (v >= 2048) ? v - 4096 : v;
  endfunction

  // part 0: one 50-tap filter; part 1: 20-tap filter A (slots 0..19);
  // part 2: 20-tap filter B (slots 20..39 on the same delays 0..19)
  function automatic int model(int j, int set, int part = 0);
    int c = j % NCH, n = j / NCH;
    int nk = (part == 0) ? TAPS : SPLIT_TAPS;
    int base = (part == 2) ? SPLIT_TAPS : 0;
    longint s = 0, v;
    for (int k = 0; k < nk; k++) s += longint'(C[set][base + k]) * sx(X[c][(n - k*TL) % NMAX]);
    v = s >>> 15;
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return int'(v) & 12'hFFF;
  endfunction

  // check one whole turn of bunches starting at bunch j0; returns the offset
  function automatic int check_turn(ref logic [DAC_W-1:0] obs [$], input int j0, set, i_lo,
                                    string what, int part = 0);
    int off = -1;
    for (int i = i_lo; i + 48 < obs.size(); i++) begin
      bit ok = 1;
      for (int q = 0; q < 48 && ok; q++) if (int'(obs[i + q]) != model(j0 + q, set, part)) ok = 0;
      if (ok) begin off = i - j0; break; end
    end
    checks++;
    if (off < 0) begin failures++; $display("%s: stream not found", what); return -1; end
    for (int j = j0; j < j0 + H; j++) begin
      checks++;
      if (j + off >= obs.size() || int'(obs[j + off]) != model(j, set, part)) begin
        failures++;
        if (failures < 20) $display("%s: bunch %0d wrong", what, j % H);
      end
    end
    return off;
  endfunction

  int n0, i0, off0, off1;

  initial begin
    for (int c = 0; c < NCH; c++)
      for (int n = 0; n < NMAX; n++) X[c][n] = int'($urandom % 4096);
    repeat (4) @(negedge clk);
    rst_n = 1;
    // turn length 406 and attenuation 15 are the reset values
    load_set(0, 9, 6000);     // 9-tap filter
    load_set(1, TAPS, 3000);  // 50-tap filter
    load_set(2, 24, 4000);    // 24-tap filter for two-dimensional feedback
    load_set(3, 2 * SPLIT_TAPS, 5000);  // two 20-tap filters
    repeat (TAPS * TL + 50) @(posedge clk);
    i0 = obs.size(); n0 = cnt[0];
    repeat (TL + 60) @(posedge clk);
    off0 = check_turn(obs, 6 * n0, 0, i0, "9-tap");
    wr(8'h03, 1);
    repeat (20) @(posedge clk);
    i0 = obs.size(); n0 = cnt[0];
    repeat (TL + 60) @(posedge clk);
    void'(check_turn(obs, 6 * n0, 1, i0, "50-tap"));
    // 24 taps exceed one 20-tap filter: single mode
    wr(8'h03, 2);
    repeat (20) @(posedge clk);
    i0 = obs.size(); n0 = cnt[0];
    repeat (TL + 60) @(posedge clk);
    void'(check_turn(obs, 6 * n0, 2, i0, "24-tap"));
    // two 20-tap filters: A on DAC 0, B on DAC 2
    wr(8'h00, 2);
    wr(8'h03, 3);
    repeat (20) @(posedge clk);
    i0 = obs.size(); n0 = cnt[0];
    repeat (TL + 60) @(posedge clk);
    void'(check_turn(obs, 6 * n0, 3, i0, "dual A", 1));
    void'(check_turn(obs_b, 6 * n0, 3, i0, "dual B", 2));
    wr(8'h00, 0);
    wr(8'h03, 1);
    // one-revolution adjustment: 3.5 us of extra delay
    wr(8'h06, 890);
    repeat (400) @(posedge clk);
    i0 = obs.size(); n0 = cnt[0];
    repeat (TL + 60 + 400) @(posedge clk);
    off1 = check_turn(obs, 6 * n0, 1, i0 + 1700, "50-tap delayed");
    checks++;
    if (off0 < 0 || off1 != off0 + 1780) begin
      failures++; $display("delay moved the stream by %0d, expected 1780", off1 - off0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
