// ddr_out: double-data-rate output register in front of a DAC.
//
// Takes a pair of samples each fast clock cycle and presents the first
// (d_rise) while the clock is high and the second (d_fall) while it is low,
// so the DAC, clocked at twice the fast clock (fRF), receives one bunch per
// edge. d_rise is registered on the rising edge; d_fall is registered on the
// rising edge and re-timed on the falling edge, the usual arrangement of an
// FPGA's DDR output flip-flop. Output q changes half a fast cycle apart;
// latency is one fast cycle for d_rise and one and a half for d_fall.
module ddr_out #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic [W-1:0] d_rise,
  input  logic [W-1:0] d_fall,
  output logic [W-1:0] q
);

  logic [W-1:0] r_rise, r_fall_p, r_fall;

  always_ff @(posedge clk) begin
    r_rise   <= d_rise;
    r_fall_p <= d_fall;
  end

  always_ff @(negedge clk) r_fall <= r_fall_p;

  assign q = clk ? r_rise : r_fall;

endmodule
