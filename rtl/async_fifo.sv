// async_fifo: dual-clock FIFO that carries ADC samples from the ADC's data
// clock into the FPGA processing clock.
//
// One such FIFO sits behind each ADC. Both clocks run at the same rate, so
// the FIFO only absorbs the unknown phase between them. Pointers are kept in
// Gray code and passed through two-flop synchronisers; the full and empty
// flags are therefore conservative (a few cycles late to clear), never wrong.
// The read side is first-word-fall-through: rdata shows the oldest entry
// whenever empty is low, and ren pops it. Writes while full and reads while
// empty are ignored. The document names the FIFO only; depth, Gray-pointer
// scheme and show-ahead read are this design's choices.
module async_fifo #(
  parameter int unsigned W  = 12,
  parameter int unsigned AW = 4          // 2**AW entries
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wen,
  input  logic [W-1:0] wdata,
  output logic         full,

  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         ren,
  output logic [W-1:0] rdata,
  output logic         empty
);

  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;      // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;      // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(1);
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wen && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wen && !full) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  // read side
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(1);
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (ren && !empty) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end

endmodule
