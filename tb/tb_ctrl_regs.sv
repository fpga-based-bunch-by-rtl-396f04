// tb_ctrl_regs: reset values, write and read-back of every configuration
// register, the one-clock command pulses (coefficient write, capture
// arm/trigger/stop), the status registers and the ID word.
module tb_ctrl_regs;
  import bbf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_we = 0, reg_re = 0;
  logic [7:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  cfg_t cfg;
  logic coef_we;
  logic [SET_W-1:0] coef_wset;
  logic [TAP_W-1:0] coef_wtap;
  logic [COEF_W-1:0] coef_wdata;
  logic cap_arm, cap_trig, cap_stop;
  logic [SET_W-1:0] active_set = 5'd19;
  cap_state_e cap_state = CAP_POST;
  logic cap_wrapped = 1'b1;
  logic [MEM_AW-1:0] cap_trig_addr = 25'h1234567, cap_addr = 25'h0ABCDEF;
  int checks = 0, failures = 0, pulses = 0;

  ctrl_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (coef_we || cap_arm || cap_trig || cap_stop) pulses++;

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic rd_check(int a, logic [31:0] exp_v);
    @(negedge clk); reg_re = 1; reg_addr = 8'(a);
    @(negedge clk); reg_re = 0;
    checks++;
    if (reg_rdata !== exp_v) begin
      failures++; $display("reg %h read %h expected %h", a, reg_rdata, exp_v);
    end
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(cfg.turn_len == 406 && cfg.att_shift == 15 && cfg.adc_mode == MODE_SIX &&
        cfg.fir_mode == FIR_SINGLE && cfg.coef_sel == 0, "reset values");
    rd_check(8'h01, 406);
    rd_check(8'h0F, 32'h0BBF_0001);
    wr(8'h00, 32'hF);
    chk(cfg.adc_mode == MODE_FOUR && cfg.fir_mode == FIR_DUAL && cfg.ext_sel_en && cfg.ext_trig_en, "CTRL fields");
    rd_check(8'h00, 32'hF);
    wr(8'h00, 32'h2);
    chk(cfg.adc_mode == MODE_SIX && cfg.fir_mode == FIR_DUAL && !cfg.ext_sel_en, "CTRL fields 2");
    wr(8'h01, 609);  chk(cfg.turn_len == 609, "TURN_LEN");  rd_check(8'h01, 609);
    wr(8'h02, 20);   chk(cfg.att_shift == 20, "ATT");       rd_check(8'h02, 20);
    wr(8'h03, 31);   chk(cfg.coef_sel == 31, "COEF_SEL");   rd_check(8'h03, 31);
    wr(8'h06, 1217); chk(cfg.out_delay[0] == 1217, "DLY_A"); rd_check(8'h06, 1217);
    wr(8'h07, 5);    chk(cfg.out_delay[1] == 5, "DLY_B");   rd_check(8'h07, 5);
    wr(8'h08, 2047); chk(cfg.out_delay[2] == 2047, "DLY_RAW"); rd_check(8'h08, 2047);
    wr(8'h09, 32'o765432); chk(cfg.raw_dly[5] == 7 && cfg.raw_dly[0] == 2, "RAW_DLY"); rd_check(8'h09, 32'o765432);
    wr(8'h0B, 1000); chk(cfg.post_len == 1000, "CAP_POST"); rd_check(8'h0B, 1000);
    // coefficient write: address then data, one write pulse
    wr(8'h04, (7 << 8) | 49);
    @(negedge clk); reg_we = 1; reg_addr = 8'h05; reg_wdata = 32'h0000_8001;
    @(negedge clk); reg_we = 0;
    chk(coef_we && coef_wset == 7 && coef_wtap == 49 && coef_wdata == 16'h8001, "coefficient write");
    @(negedge clk);
    chk(!coef_we, "coefficient write pulse one clock");
    // capture commands
    @(negedge clk); reg_we = 1; reg_addr = 8'h0A; reg_wdata = 32'h1;
    @(negedge clk); reg_we = 0; chk(cap_arm && !cap_trig && !cap_stop, "arm pulse");
    @(negedge clk); chk(!cap_arm, "arm pulse one clock");
    wr(8'h0A, 32'h2); chk(cap_trig && !cap_arm, "trigger pulse");
    wr(8'h0A, 32'h4);
    chk(pulses == 4, "four command pulses");
    // status
    rd_check(8'h0C, {19'd0, 5'd19, 5'd0, 1'b1, 2'd2});
    rd_check(8'h0D, 32'h1234567);
    rd_check(8'h0E, 32'h0ABCDEF);
    rd_check(8'h40, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
