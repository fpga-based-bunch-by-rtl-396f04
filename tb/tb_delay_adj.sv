// tb_delay_adj: random per-channel delays; each output must show the
// channel's input of dly+1 enabled samples earlier.
module tb_delay_adj;
  localparam int NCH = 6, W = 12, MAXD = 8, DW = 3;
  logic clk = 0, rst_n = 0, en = 0, out_valid;
  logic [W-1:0]  din  [NCH];
  logic [DW-1:0] dly  [NCH];
  logic [W-1:0]  dout [NCH];
  logic [W-1:0]  hist [NCH][$];
  int checks = 0, failures = 0;

  delay_adj #(.NCH(NCH), .W(W), .MAXD(MAXD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last_en;
    last_en = 0;
    @(negedge clk); rst_n = 1;
    for (int seg = 0; seg < 8; seg++) begin
      for (int c = 0; c < NCH; c++) begin
        dly[c] = DW'((seg == 0) ? c : $urandom);
        hist[c].delete();
      end
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        if (last_en) begin
          checks++;
          if (!out_valid) begin failures++; $display("out_valid missing"); end
        end
        for (int c = 0; c < NCH; c++) begin
          int k;
          k = hist[c].size() - 1 - int'(dly[c]);
          if (k >= 0 && last_en) begin
            checks++;
            if (dout[c] !== hist[c][k]) begin
              failures++;
              if (failures < 10) $display("ch %0d dly %0d: got %h expected %h", c, dly[c], dout[c], hist[c][k]);
            end
          end
        end
        en = ($urandom % 3) != 0;
        last_en = en;
        for (int c = 0; c < NCH; c++) begin
          din[c] = W'($urandom);
          if (en) hist[c].push_back(din[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
