// out_mux: the "6:1 or 4:1 MUX" that puts the channel streams back into
// bunch order for one DAC.
//
// Every slow clock (the ADC clock, fRF/6 or fRF/4) delivers one sample per
// channel; channel c holds bunch 6m+c (or 4m+c). The multiplexer runs on the
// fast clock, three times the slow clock in six ADC mode (254.29 MHz for
// SPring-8) and, in this design, twice it in four ADC mode, and emits two
// bunches per fast cycle, which a DDR output register turns into one bunch
// per DAC clock edge (fRF). dout[0] is the earlier bunch of the pair.
//
// The slow side registers the frame of channel samples and toggles a flag.
// The two clocks come from one clock manager and are phase aligned, so the
// fast side sees the toggle one fast cycle after the slow edge, copies the
// frame (stable for the whole slow period) and sends pairs (0,1),(2,3),(4,5)
// on consecutive fast cycles, or (0,1),(2,3) in four ADC mode; out_valid
// marks them. The frame register is read across the clock boundary as a
// multicycle path. mode must only change while the data are not used.
module out_mux
  import bbf_pkg::adc_mode_e, bbf_pkg::MODE_FOUR;
#(
  parameter int unsigned NCH = 6,
  parameter int unsigned W   = 12
) (
  // slow domain
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] din [NCH],
  // fast domain
  input  logic         clk_fast,
  input  logic         rst_fast_n,
  input  adc_mode_e    mode,
  output logic         out_valid,
  output logic [W-1:0] dout [2]
);

  localparam int unsigned NPAIR = NCH / 2;
  localparam int unsigned PW    = $clog2(NPAIR + 1);

  logic [W-1:0] frame [NCH];
  logic         tog;

  always_ff @(posedge clk) begin
    if (in_valid) frame <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        tog <= 1'b0;
    else if (in_valid) tog <= ~tog;
  end

  logic [W-1:0] shadow [NCH];
  logic         tog_q;
  logic [PW-1:0] phase;
  logic [PW-1:0] npair;

  assign npair = (mode == MODE_FOUR) ? PW'(2) : PW'(NPAIR);

  always_ff @(posedge clk_fast or negedge rst_fast_n) begin
    if (!rst_fast_n) begin
      tog_q     <= 1'b0;
      phase     <= '0;
      out_valid <= 1'b0;
    end else begin
      tog_q <= tog;
      if (tog != tog_q) begin
        phase     <= PW'(1);
        out_valid <= 1'b1;
      end else if (phase != '0 && phase < npair) begin
        phase     <= phase + PW'(1);
        out_valid <= 1'b1;
      end else begin
        phase     <= '0;
        out_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk_fast) begin
    if (tog != tog_q) begin
      shadow  <= frame;
      dout[0] <= frame[0];
      dout[1] <= frame[1];
    end else if (phase != '0 && phase < npair) begin
      dout[0] <= shadow[2*phase];
      dout[1] <= shadow[2*phase+1];
    end
  end

endmodule
