// tb_history_capture: a 64-word memory so that the ring wraps quickly.
// Checks every write request (address, words, sign-extended data) against
// the frames driven, the wrap to address 0, the post-trigger count for the
// register trigger and the external trigger pin (ignored while disabled),
// the stop command, and four ADC mode's four-word beats.
module tb_history_capture;
  import bbf_pkg::*;
  localparam int NCH_T = 6, W = 12, WORDS = 64, AW_T = 6;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] din [NCH_T];
  adc_mode_e mode = MODE_SIX;
  logic arm = 0, stop = 0, sw_trig = 0, ext_trig_en = 0, ext_trig = 0;
  logic [AW_T-1:0] post_len = '0, trig_addr, addr;
  cap_state_e state;
  logic wrapped, mem_wr_valid;
  logic [AW_T-1:0] mem_wr_addr;
  logic [15:0] mem_wr_data [NCH_T];
  logic [2:0] mem_wr_words;

  history_capture #(.NCH(NCH_T), .W(W), .WORD_W(16), .MEM_WORDS(WORDS)) dut (.*);

  typedef struct { int a; int n; logic [15:0] d [NCH_T]; } wr_t;
  wr_t expq [$];
  int checks = 0, failures = 0, exp_addr = 0, wraps = 0;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write monitor
  always @(negedge clk) begin
    if (rst_n && mem_wr_valid) begin
      wr_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected write at %0d", mem_wr_addr);
      end else begin
        e = expq.pop_front();
        if (int'(mem_wr_addr) != e.a || int'(mem_wr_words) != e.n) begin
          failures++; $display("write at %0d/%0d words, expected %0d/%0d", mem_wr_addr, mem_wr_words, e.a, e.n);
        end
        for (int c = 0; c < NCH_T; c++) if (mem_wr_data[c] !== e.d[c]) begin
          failures++; $display("word %0d %h expected %h", c, mem_wr_data[c], e.d[c]);
        end
      end
    end
  end

  // one frame; expect a write if `write` is set
  task automatic frame(bit write);
    int n = (mode == MODE_FOUR) ? 4 : 6;
    wr_t e;
    @(negedge clk);
    en = 1;
    for (int c = 0; c < NCH_T; c++) din[c] = W'($urandom);
    if (write) begin
      e.a = exp_addr; e.n = n;
      for (int c = 0; c < NCH_T; c++) e.d[c] = (c < n) ? {{4{din[c][W-1]}}, din[c]} : 16'h0;
      expq.push_back(e);
      exp_addr += n;
      if (exp_addr + n > WORDS) begin exp_addr = 0; wraps++; end
    end
    @(negedge clk); en = 0;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic expect_state(cap_state_e s, string what);
    checks++;
    if (state != s) begin failures++; $display("%s: state %0d expected %0d", what, state, s); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // idle: nothing written
    repeat (3) frame(0);
    // arm, run over a wrap, trigger, five more beats
    pulse(arm); exp_addr = 0;
    expect_state(CAP_RUN, "armed");
    repeat (23) frame(1);
    checks++; if (!wrapped) begin failures++; $display("wrap not flagged"); end
    post_len = 6'd5;
    pulse(sw_trig);
    expect_state(CAP_POST, "triggered");
    checks++; if (int'(trig_addr) != exp_addr) begin failures++; $display("trig_addr %0d expected %0d", trig_addr, exp_addr); end
    repeat (5) frame(1);
    repeat (4) frame(0);
    expect_state(CAP_DONE, "post-trigger count");
    // external trigger, ignored while disabled, four ADC mode
    mode = MODE_FOUR;
    pulse(arm); exp_addr = 0;
    repeat (6) frame(1);
    pulse(ext_trig);
    repeat (3) @(negedge clk);
    expect_state(CAP_RUN, "external trigger disabled");
    ext_trig_en = 1; post_len = 6'd3;
    repeat (20) frame(1);
    pulse(ext_trig);
    repeat (4) @(negedge clk);
    expect_state(CAP_POST, "external trigger");
    repeat (3) frame(1);
    repeat (2) frame(0);
    expect_state(CAP_DONE, "external post-trigger count");
    // stop from running
    mode = MODE_SIX;
    pulse(arm); exp_addr = 0;
    repeat (2) frame(1);
    pulse(stop);
    expect_state(CAP_IDLE, "stopped");
    repeat (3) frame(0);
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d writes missing", expq.size()); end
    checks++;
    if (wraps < 2) begin failures++; $display("ring wrapped %0d times", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
