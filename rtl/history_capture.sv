// history_capture: writes the history of ADC samples into the 32M-word
// sample memory.
//
// Each processing clock the samples of all channels (six, or four in four
// ADC mode) are sign-extended to 16-bit words and written as one beat to
// consecutive word addresses of the external memory, which is used as a ring:
// when the next beat would not fit, writing wraps to address 0 and `wrapped`
// is set. At 508.58 MS/s the 32M words hold about 66 ms, several radiation
// damping times. Software arms the capture; a trigger (a register write, or
// the external trigger pin when enabled) lets post_len more beats be written
// and then freezes the memory so that it can be read out. trig_addr records
// the first address written after the trigger. The memory controller is
// outside this block: mem_wr_* is a registered write request of `words`
// 16-bit words starting at mem_wr_addr, assumed always accepted. Ring
// addressing, trigger scheme and interface are this design's choices; the
// document gives only the capacity and purpose.
module history_capture
  import bbf_pkg::adc_mode_e, bbf_pkg::MODE_FOUR, bbf_pkg::cap_state_e,
         bbf_pkg::CAP_IDLE, bbf_pkg::CAP_RUN, bbf_pkg::CAP_POST, bbf_pkg::CAP_DONE;
#(
  parameter int unsigned NCH       = 6,
  parameter int unsigned W         = 12,
  parameter int unsigned WORD_W    = 16,
  parameter int unsigned MEM_WORDS = 32 * 1024 * 1024,
  parameter int unsigned AW        = $clog2(MEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,          // a frame of samples this cycle
  input  logic [W-1:0]      din [NCH],
  input  adc_mode_e         mode,
  // control
  input  logic              arm,         // pulse: restart at address 0
  input  logic              stop,        // pulse: back to idle
  input  logic              sw_trig,     // pulse
  input  logic              ext_trig_en,
  input  logic              ext_trig,    // asynchronous, rising edge
  input  logic [AW-1:0]     post_len,
  // status
  output cap_state_e        state,
  output logic [AW-1:0]     trig_addr,
  output logic [AW-1:0]     addr,        // next address to write
  output logic              wrapped,
  // memory write port
  output logic              mem_wr_valid,
  output logic [AW-1:0]     mem_wr_addr,
  output logic [WORD_W-1:0] mem_wr_data [NCH],
  output logic [2:0]        mem_wr_words
);

  logic [2:0] nwords;
  assign nwords = (mode == MODE_FOUR) ? 3'd4 : 3'(NCH);

  // external trigger: synchronise and detect the rising edge
  logic [2:0] xt;
  logic       trig;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xt <= '0;
    else        xt <= {xt[1:0], ext_trig};
  end
  assign trig = sw_trig || (ext_trig_en && xt[1] && !xt[2]);

  logic [AW:0]   next_addr;
  logic [AW-1:0] cnt;
  logic          write;

  assign next_addr = {1'b0, addr} + (AW+1)'(nwords);
  assign write = en && (state == CAP_RUN || (state == CAP_POST && cnt != '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CAP_IDLE;
      addr      <= '0;
      trig_addr <= '0;
      cnt       <= '0;
      wrapped   <= 1'b0;
    end else if (stop) begin
      state <= CAP_IDLE;
    end else if (arm) begin
      state   <= CAP_RUN;
      addr    <= '0;
      wrapped <= 1'b0;
    end else begin
      if (write) begin
        if (next_addr + (AW+1)'(nwords) > (AW+1)'(MEM_WORDS)) begin
          addr    <= '0;
          wrapped <= 1'b1;
        end else begin
          addr <= next_addr[AW-1:0];
        end
      end
      case (state)
        CAP_RUN: if (trig) begin
          state     <= CAP_POST;
          cnt       <= post_len;
          trig_addr <= write ? ((next_addr + (AW+1)'(nwords) > (AW+1)'(MEM_WORDS))
                                ? '0 : next_addr[AW-1:0])
                             : addr;
        end
        CAP_POST: begin
          if (write) cnt <= cnt - AW'(1);
          if (cnt == '0 || (write && cnt == AW'(1))) state <= CAP_DONE;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_wr_valid <= 1'b0;
    else        mem_wr_valid <= write && !stop && !arm;
  end

  always_ff @(posedge clk) begin
    mem_wr_addr  <= addr;
    mem_wr_words <= nwords;
    for (int c = 0; c < NCH; c++) begin
      mem_wr_data[c] <= (c < int'(nwords)) ? WORD_W'($signed(din[c])) : '0;
    end
  end

endmodule
