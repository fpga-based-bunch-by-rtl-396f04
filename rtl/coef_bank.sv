// coef_bank: store of FIR coefficient sets with fast switching.
//
// NSETS (32) complete sets of TAPS coefficients are held inside the FPGA. One
// set is active at a time and all of its coefficients are presented in
// parallel to the filters. The active set is chosen by software (sw_sel) or,
// when ext_en is set, by an external logic signal (ext_sel) so that the
// filter can follow a fast change of tune or bunch current.
//
// Storage is one small RAM per tap (NSETS words each), written one
// coefficient at a time from the control registers and read all together at
// the active set's address. ext_sel is asynchronous and passes through a
// two-flop synchroniser; the selection register and the coefficient output
// register follow, so a change of ext_sel reaches coef four clock edges
// later (47 ns at 84.76 MHz), in line with the "several tens of nanoseconds"
// switching the document quotes. Storage form, synchroniser and that latency
// are this design's choices. A coefficient written into the active set takes
// effect two edges after the write.
module coef_bank #(
  parameter int unsigned NSETS  = 32,
  parameter int unsigned TAPS   = 50,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned SW     = $clog2(NSETS),
  parameter int unsigned TW     = $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // coefficient write port
  input  logic                     we,
  input  logic [SW-1:0]            wset,
  input  logic [TW-1:0]            wtap,
  input  logic signed [COEF_W-1:0] wdata,
  // set selection
  input  logic [SW-1:0]            sw_sel,
  input  logic                     ext_en,
  input  logic [SW-1:0]            ext_sel,   // asynchronous
  // active coefficients
  output logic [SW-1:0]            active_set,
  output logic signed [COEF_W-1:0] coef [TAPS]
);

  logic [SW-1:0] ext_s1, ext_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_s1     <= '0;
      ext_s2     <= '0;
      active_set <= '0;
    end else begin
      ext_s1     <= ext_sel;
      ext_s2     <= ext_s1;
      active_set <= ext_en ? ext_s2 : sw_sel;
    end
  end

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    logic signed [COEF_W-1:0] ram [NSETS];

    always_ff @(posedge clk) begin
      if (we && wtap == TW'(t)) ram[wset] <= wdata;
    end

    always_ff @(posedge clk) coef[t] <= ram[active_set];
  end

endmodule
