// delay_fifo: programmable delay of a multiplexed output stream.
//
// Sets the loop latency so that the kick reaches a bunch one (or two) turns
// after it was measured, and lets each kicker output be timed individually.
// Built as a RAM ring with a registered read-before-write port, like the
// one-turn delays: each enabled fast cycle the oldest word is read into dout
// and replaced by din. The ring is delay+1 words long, so dout carries the
// din of delay+1 enabled cycles earlier (one pair of bunches per cycle, 3.93
// ns at 254.29 MHz). delay ranges over 0..DEPTH-1; DEPTH = 2048 pairs holds
// more than one 2436-bunch turn (1218 pairs). out_valid follows en by one
// clock. The ring structure and DEPTH are this design's choices; the document
// gives only the name and purpose.
module delay_fifo #(
  parameter int unsigned W     = 24,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [AW-1:0] delay,
  input  logic [W-1:0]  din,
  output logic          out_valid,
  output logic [W-1:0]  dout
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) ptr <= (ptr >= delay) ? '0 : ptr + AW'(1);
    end
  end

endmodule
