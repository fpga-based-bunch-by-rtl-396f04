// turn_delay: the "1 turn delay" (z^-1) of the turn-by-turn FIR filter.
//
// A channel's ADC sees each of its bunches once per turn, so delaying its
// sample stream by turn_len samples yields the same bunch one turn earlier.
// As in the document's filter, the delay is an SRAM (here a block-RAM style
// array with a registered, read-before-write port) used as a ring: each
// enabled cycle reads the oldest word into dout and overwrites it with din.
// The ring is turn_len-1 words long; with the output register the delay seen
// by a consumer that samples dout together with the next din is exactly
// turn_len enabled samples. turn_len is run-time (406 for a 2436-bunch ring
// in six ADC mode) and must lie in 2..DEPTH. The memory is not cleared: the
// first turn_len outputs after reset are whatever the SRAM held.
module turn_delay #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned LW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,        // one sample of this channel this cycle
  input  logic [LW-1:0] turn_len,  // samples per turn for this channel
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout       // din of turn_len samples earlier
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic [LW-1:0] last;             // index of the last ring word

  assign last = turn_len - LW'(2);

  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (en)
      ptr <= (LW'(ptr) >= last) ? '0 : ptr + AW'(1);
  end

endmodule
