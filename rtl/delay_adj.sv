// delay_adj: per-channel delay adjustment of the raw ADC streams.
//
// The raw samples of all channels are multiplexed onto one diagnostic DAC.
// Each channel may be delayed by its own whole number of sample clocks
// (dly[c], 0..MAXD-1) so that the channels line up in bunch order at the
// multiplexer. Each channel is a MAXD-deep shift register advanced on en with
// a selectable tap; the selected word is registered. Latency: dly[c]+1
// enabled samples; out_valid follows en by one clock. The document names the
// block only: the tap-selecting shift register and MAXD are this design's
// choices.
module delay_adj #(
  parameter int unsigned NCH  = 6,
  parameter int unsigned W    = 12,
  parameter int unsigned MAXD = 8,
  parameter int unsigned DW   = $clog2(MAXD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  din  [NCH],
  input  logic [DW-1:0] dly  [NCH],
  output logic          out_valid,
  output logic [W-1:0]  dout [NCH]
);

  logic [W-1:0] sr [NCH][MAXD];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [W-1:0] tap;
    always_comb begin
      tap = din[c];
      for (int i = 1; i < MAXD; i++)
        if (DW'(i) == dly[c]) tap = sr[c][i-1];
    end

    always_ff @(posedge clk) begin
      if (en) begin
        sr[c][0] <= din[c];
        for (int i = 1; i < MAXD; i++) sr[c][i] <= sr[c][i-1];
        dout[c] <= tap;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= en;
  end

endmodule
