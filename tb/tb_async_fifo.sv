// tb_async_fifo: writer and reader on unrelated clocks with random enables;
// every word written while not full must be read back once, in order, and
// the flags must stop both overflow and underflow.
module tb_async_fifo;
  localparam int W = 12, AW = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, wen = 0, ren = 0, full, empty;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0, nread = 0, saw_full = 0, saw_empty = 0;
  logic [W-1:0] q [$];

  async_fifo #(.W(W), .AW(AW)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 wrst_n = 1; rrst_n = 1;
  end

  // writer: bursty, faster than the reader for a while so that it fills
  initial begin
    @(posedge wrst_n);
    for (int n = 0; n < 6000; n++) begin
      @(negedge wclk);
      wen   = (n < 3000) ? 1'b1 : (($urandom % 3) == 0);
      wdata = W'($urandom);
      if (full) saw_full++;
      if (wen && !full) q.push_back(wdata);
    end
    @(negedge wclk); wen = 0;
  end

  // reader
  initial begin
    @(posedge rrst_n);
    for (int n = 0; n < 12000; n++) begin
      @(negedge rclk);
      if (empty) saw_empty++;
      ren = (n > 200) && (($urandom % 4) != 0);
      if (ren && !empty) begin
        checks++;
        if (q.size() == 0) begin
          failures++; $display("read with nothing written");
        end else begin
          if (rdata !== q[0]) begin
            failures++;
            if (failures < 10) $display("read %h expected %h", rdata, q[0]);
          end
          void'(q.pop_front());
        end
        nread++;
      end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words never read", q.size()); end
    checks++;
    if (saw_full == 0 || saw_empty == 0) begin failures++; $display("flags never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
