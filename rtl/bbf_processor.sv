// bbf_processor: bunch-by-bunch transverse feedback signal processor.
//
// Turns the baseband position signal of every bunch in a storage ring into a
// kick for that same bunch one turn later. The bunch rate (fRF, 508.58 MHz
// at SPring-8) is too high for one converter, so NCH ADCs clocked at fRF/6
// (six ADC mode) or fRF/4 (four ADC mode) each sample every sixth (fourth)
// bunch. Per channel:
//
//   ADC -> async_fifo -> fir_filter (50 taps, or two 20-tap filters)
//
// where the filter's delay elements are one-turn delays, so each bunch is
// filtered over its own turn-by-turn history. The channel outputs are then
// put back into bunch order by out_mux (two bunches per fast clock), delayed
// by delay_fifo to set the loop latency, and sent through ddr_out to the
// DACs, which run at fRF:
//
//   filter output A -> out_mux -> delay_fifo -> DAC 0 and DAC 1
//   filter output B -> out_mux -> delay_fifo -> DAC 2 and DAC 3
//   raw samples -> delay_adj -> out_mux -> delay_fifo -> DAC 4 (diagnostics)
//
// In the 50-tap arrangement outputs A and B are the same filter; with two
// 20-tap filters (e.g. one kicker direction each in two-dimensional feedback
// with a single loop) they differ. coef_bank holds 32 coefficient sets that
// software or an external signal switch within a few clocks;
// history_capture streams all raw samples into the 32M-word sample memory;
// ctrl_regs is the host's view of it all.
//
// Clocks: clk is the ADC clock (84.76 MHz in six ADC mode), clk_fast is made
// from it by the FPGA clock manager, three times clk in six ADC mode (254.29
// MHz) and twice clk in four ADC mode, phase aligned with clk. adc_dco[c] is
// ADC c's data clock, of the same frequency as clk at an unknown phase. The
// DAC clock (fRF) is made outside by a x6 PLL. The clock manager, PLL,
// ADCs, DACs, USB interface and memory controller are outside this module:
// their signals are ports. rst_n is an asynchronous reset for all domains.
//
// Samples are 12-bit two's complement, as are DAC codes (the DAC interface's
// code format is not given; conversion to offset binary, if needed, belongs
// at the pins). The configuration registers are set while the loop is not
// in use; they cross into the fast domain as static signals.
module bbf_processor
  import bbf_pkg::*;
#(
  parameter int unsigned TAPS_P      = TAPS,
  parameter int unsigned SPLIT_P     = SPLIT_TAPS,
  parameter int unsigned TURN_MAX_P  = TURN_MAX,
  parameter int unsigned MEM_WORDS_P = MEM_WORDS
) (
  input  logic              clk,
  input  logic              clk_fast,
  input  logic              rst_n,
  // ADCs
  input  logic              adc_dco  [NCH],
  input  logic [ADC_W-1:0]  adc_data [NCH],
  // external controls
  input  logic [SET_W-1:0]  ext_coef_sel,
  input  logic              ext_trig,
  // host register bus (from the USB interface)
  input  logic              reg_we,
  input  logic              reg_re,
  input  logic [7:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // DACs
  output logic [DAC_W-1:0]  dac_data [NDAC],
  // sample-history memory write port
  output logic              mem_wr_valid,
  output logic [MEM_AW-1:0] mem_wr_addr,
  output logic [MEM_WORD_W-1:0] mem_wr_data [NCH],
  output logic [2:0]        mem_wr_words
);

  // ---- control ------------------------------------------------------------
  cfg_t               cfg;
  logic               coef_we;
  logic [SET_W-1:0]   coef_wset, active_set;
  logic [TAP_W-1:0]   coef_wtap;
  logic [COEF_W-1:0]  coef_wdata;
  logic               cap_arm, cap_trig, cap_stop, cap_wrapped;
  cap_state_e         cap_state;
  logic [MEM_AW-1:0]  cap_trig_addr, cap_addr;

  ctrl_regs u_regs (
    .clk, .rst_n,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
    .cfg,
    .coef_we, .coef_wset, .coef_wtap, .coef_wdata,
    .cap_arm, .cap_trig, .cap_stop,
    .active_set, .cap_state, .cap_wrapped, .cap_trig_addr, .cap_addr
  );

  logic signed [COEF_W-1:0] coef [TAPS_P];

  coef_bank #(.NSETS(NSETS), .TAPS(TAPS_P), .COEF_W(COEF_W)) u_coef (
    .clk, .rst_n,
    .we(coef_we), .wset(coef_wset), .wtap(TAP_W'(coef_wtap)), .wdata(coef_wdata),
    .sw_sel(cfg.coef_sel), .ext_en(cfg.ext_sel_en), .ext_sel(ext_coef_sel),
    .active_set, .coef
  );

  // ---- ADC input FIFOs --------------------------------------------------------
  logic [NCH-1:0]    active, empty, ren;
  logic [ADC_W-1:0]  samp [NCH];
  logic              frame_valid;

  for (genvar c = 0; c < NCH; c++) begin : g_in
    assign active[c] = (cfg.adc_mode == MODE_SIX) || (c < 4);
    async_fifo #(.W(ADC_W), .AW(4)) u_fifo (
      .wclk(adc_dco[c]), .wrst_n(rst_n), .wen(1'b1), .wdata(adc_data[c]), .full(),
      .rclk(clk), .rrst_n(rst_n), .ren(ren[c]), .rdata(samp[c]), .empty(empty[c])
    );
    // active channels are read together, so that they stay aligned; an
    // unused channel's FIFO is simply drained
    assign ren[c] = active[c] ? frame_valid : !empty[c];
  end

  assign frame_valid = ((empty & active) == '0);

  // ---- FIR filters ---------------------------------------------------------------
  logic [NCH-1:0]          fir_valid;
  logic signed [DAC_W-1:0] y_a [NCH];
  logic signed [DAC_W-1:0] y_b [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_fir
    fir_filter #(
      .TAPS(TAPS_P), .SPLIT(SPLIT_P), .IN_W(ADC_W), .COEF_W(COEF_W),
      .OUT_W(DAC_W), .TURN_MAX(TURN_MAX_P), .LW(TURN_LW)
    ) u_fir (
      .clk, .rst_n,
      .in_valid(frame_valid), .din(samp[c]),
      .turn_len(cfg.turn_len), .mode(cfg.fir_mode), .att_shift(cfg.att_shift),
      .coef,
      .out_valid(fir_valid[c]), .y_a(y_a[c]), .y_b(y_b[c])
    );
  end

  // ---- raw-data path ----------------------------------------------------------------
  logic             raw_valid;
  logic [ADC_W-1:0] raw [NCH];
  logic [RAW_DW-1:0] raw_dly [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_rawdly
    assign raw_dly[c] = cfg.raw_dly[c];
  end

  delay_adj #(.NCH(NCH), .W(ADC_W), .MAXD(RAW_MAXD)) u_dadj (
    .clk, .rst_n, .en(frame_valid), .din(samp), .dly(raw_dly),
    .out_valid(raw_valid), .dout(raw)
  );

  // ---- multiplexers, delay FIFOs, DDR outputs ---------------------------------------
  logic [DAC_W-1:0] mux_in [3][NCH];
  logic [2:0]       mux_in_valid;

  for (genvar c = 0; c < NCH; c++) begin : g_muxin
    assign mux_in[0][c] = y_a[c];
    assign mux_in[1][c] = y_b[c];
    assign mux_in[2][c] = raw[c];
  end
  assign mux_in_valid = {raw_valid, fir_valid[0], fir_valid[0]};

  logic [DAC_W-1:0]   pair  [3][2];
  logic [2:0]         pair_valid;
  logic [2*DAC_W-1:0] dly_out [3];

  for (genvar m = 0; m < 3; m++) begin : g_out
    out_mux #(.NCH(NCH), .W(DAC_W)) u_mux (
      .clk, .rst_n, .in_valid(mux_in_valid[m]), .din(mux_in[m]),
      .clk_fast, .rst_fast_n(rst_n), .mode(cfg.adc_mode),
      .out_valid(pair_valid[m]), .dout(pair[m])
    );
    delay_fifo #(.W(2*DAC_W), .DEPTH(OUT_DLY_DEPTH)) u_dly (
      .clk(clk_fast), .rst_n, .en(pair_valid[m]), .delay(cfg.out_delay[m]),
      .din({pair[m][0], pair[m][1]}), .out_valid(), .dout(dly_out[m])
    );
  end

  // DAC 0,1 <- output A; DAC 2,3 <- output B; DAC 4 <- raw data
  for (genvar d = 0; d < NDAC; d++) begin : g_dac
    ddr_out #(.W(DAC_W)) u_ddr (
      .clk(clk_fast),
      .d_rise(dly_out[d/2][2*DAC_W-1:DAC_W]),
      .d_fall(dly_out[d/2][DAC_W-1:0]),
      .q(dac_data[d])
    );
  end

  // ---- sample history --------------------------------------------------------------
  history_capture #(
    .NCH(NCH), .W(ADC_W), .WORD_W(MEM_WORD_W), .MEM_WORDS(MEM_WORDS_P), .AW(MEM_AW)
  ) u_cap (
    .clk, .rst_n, .en(frame_valid), .din(samp), .mode(cfg.adc_mode),
    .arm(cap_arm), .stop(cap_stop), .sw_trig(cap_trig),
    .ext_trig_en(cfg.ext_trig_en), .ext_trig,
    .post_len(cfg.post_len),
    .state(cap_state), .trig_addr(cap_trig_addr), .addr(cap_addr), .wrapped(cap_wrapped),
    .mem_wr_valid, .mem_wr_addr, .mem_wr_data, .mem_wr_words
  );

endmodule
