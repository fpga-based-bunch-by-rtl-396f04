// ctrl_regs: control and status registers of the feedback processor.
//
// The processor is run from a host computer over USB; the USB interface
// turns host requests into single-word register accesses on this bus.
// Writes take effect on the clock edge of reg_we; reads return reg_rdata one
// clock after reg_re. The register map (word addresses) is this design's:
//
//   0x00 CTRL      [0] four ADC mode  [1] two 20-tap filters  [2] coefficient
//                  set from external pins  [3] external capture trigger
//   0x01 TURN_LEN  samples per turn per channel (reset 406)
//   0x02 ATT       FIR output right shift (reset 15)
//   0x03 COEF_SEL  software-selected coefficient set
//   0x04 COEF_ADDR [12:8] set, [5:0] tap for the next COEF_DATA write
//   0x05 COEF_DATA write: stores [15:0] as that coefficient
//   0x06 DLY_A / 0x07 DLY_B / 0x08 DLY_RAW  output delay FIFO settings
//   0x09 RAW_DLY   3 bits per channel, channel 0 in [2:0]
//   0x0A CAP_CMD   write pulses: [0] arm  [1] trigger  [2] stop
//   0x0B CAP_POST  beats written after a capture trigger
//   0x0C STATUS    (read) [1:0] capture state [2] wrapped [12:8] active set
//   0x0D CAP_TRIG  (read) first address written after the trigger
//   0x0E CAP_ADDR  (read) next capture address
//   0x0F ID        (read) 0x0BBF_0001
//
// Reset values select six ADC mode, one 50-tap filter, set 0, zero delays.
module ctrl_regs
  import bbf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              reg_we,
  input  logic              reg_re,
  input  logic [7:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // configuration
  output cfg_t              cfg,
  // coefficient write port
  output logic              coef_we,
  output logic [SET_W-1:0]  coef_wset,
  output logic [TAP_W-1:0]  coef_wtap,
  output logic [COEF_W-1:0] coef_wdata,
  // capture commands
  output logic              cap_arm,
  output logic              cap_trig,
  output logic              cap_stop,
  // status
  input  logic [SET_W-1:0]  active_set,
  input  cap_state_e        cap_state,
  input  logic              cap_wrapped,
  input  logic [MEM_AW-1:0] cap_trig_addr,
  input  logic [MEM_AW-1:0] cap_addr
);

  localparam logic [31:0] ID = 32'h0BBF_0001;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg          <= '0;
      cfg.turn_len <= TURN_LW'(TURN_LEN_DEFAULT);
      cfg.att_shift <= 6'd15;
      coef_wset    <= '0;
      coef_wtap    <= '0;
      coef_wdata   <= '0;
      coef_we      <= 1'b0;
      cap_arm      <= 1'b0;
      cap_trig     <= 1'b0;
      cap_stop     <= 1'b0;
    end else begin
      coef_we  <= 1'b0;
      cap_arm  <= 1'b0;
      cap_trig <= 1'b0;
      cap_stop <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          8'h00: begin
            cfg.adc_mode    <= adc_mode_e'(reg_wdata[0]);
            cfg.fir_mode    <= fir_mode_e'(reg_wdata[1]);
            cfg.ext_sel_en  <= reg_wdata[2];
            cfg.ext_trig_en <= reg_wdata[3];
          end
          8'h01: cfg.turn_len  <= reg_wdata[TURN_LW-1:0];
          8'h02: cfg.att_shift <= reg_wdata[5:0];
          8'h03: cfg.coef_sel  <= reg_wdata[SET_W-1:0];
          8'h04: begin
            coef_wset <= reg_wdata[8 +: SET_W];
            coef_wtap <= reg_wdata[TAP_W-1:0];
          end
          8'h05: begin
            coef_wdata <= reg_wdata[COEF_W-1:0];
            coef_we    <= 1'b1;
          end
          8'h06: cfg.out_delay[0] <= reg_wdata[OUT_DLY_AW-1:0];
          8'h07: cfg.out_delay[1] <= reg_wdata[OUT_DLY_AW-1:0];
          8'h08: cfg.out_delay[2] <= reg_wdata[OUT_DLY_AW-1:0];
          8'h09: cfg.raw_dly      <= reg_wdata[NCH*RAW_DW-1:0];
          8'h0A: begin
            cap_arm  <= reg_wdata[0];
            cap_trig <= reg_wdata[1];
            cap_stop <= reg_wdata[2];
          end
          8'h0B: cfg.post_len <= reg_wdata[MEM_AW-1:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_rdata <= '0;
    else if (reg_re) begin
      unique case (reg_addr)
        8'h00: reg_rdata <= 32'({cfg.ext_trig_en, cfg.ext_sel_en, cfg.fir_mode, cfg.adc_mode});
        8'h01: reg_rdata <= 32'(cfg.turn_len);
        8'h02: reg_rdata <= 32'(cfg.att_shift);
        8'h03: reg_rdata <= 32'(cfg.coef_sel);
        8'h04: reg_rdata <= 32'({coef_wset, 8'(coef_wtap)});
        8'h05: reg_rdata <= 32'(coef_wdata);
        8'h06: reg_rdata <= 32'(cfg.out_delay[0]);
        8'h07: reg_rdata <= 32'(cfg.out_delay[1]);
        8'h08: reg_rdata <= 32'(cfg.out_delay[2]);
        8'h09: reg_rdata <= 32'(cfg.raw_dly);
        8'h0B: reg_rdata <= 32'(cfg.post_len);
        8'h0C: reg_rdata <= 32'({active_set, 5'd0, cap_wrapped, cap_state});
        8'h0D: reg_rdata <= 32'(cap_trig_addr);
        8'h0E: reg_rdata <= 32'(cap_addr);
        8'h0F: reg_rdata <= ID;
        default: reg_rdata <= '0;
      endcase
    end
  end

endmodule
