// bbf_pkg: sizes and types shared by the bunch-by-bunch feedback processor.
//
// The numbers follow the processor as built for a 508.58 MHz RF ring with
// harmonic number 2436: 12-bit ADCs and DACs, six ADC channels each taking
// every sixth bunch (406 bunches per channel per turn), a 50-tap FIR filter
// that can be split into two 20-tap filters, and 32 stored coefficient sets.
// The 16-bit coefficient width is that of the earlier 9-tap processor, which
// is reused here. TURN_MAX, the largest turn length a one-turn delay memory
// holds, is this design's choice (it covers four ADC mode for h = 2436).
package bbf_pkg;

  localparam int unsigned ADC_W       = 12;   // ADC sample width
  localparam int unsigned DAC_W       = 12;   // DAC sample width
  localparam int unsigned COEF_W      = 16;   // FIR coefficient width
  localparam int unsigned NCH         = 6;    // ADC channels (six ADC mode)
  localparam int unsigned TAPS        = 50;   // taps of the long FIR filter
  localparam int unsigned SPLIT_TAPS  = 20;   // taps of each filter in dual mode
  localparam int unsigned NSETS       = 32;   // stored coefficient sets
  localparam int unsigned TURN_MAX    = 1024; // deepest one-turn delay
  localparam int unsigned TURN_LEN_DEFAULT = 406; // 2436 bunches / 6 ADCs
  localparam int unsigned NDAC        = 5;    // four FIR DACs + one raw-data DAC
  localparam int unsigned MEM_WORDS   = 32 * 1024 * 1024; // sample history, 16-bit words
  localparam int unsigned MEM_WORD_W  = 16;

  // Derived widths of run-time settings.
  localparam int unsigned TURN_LW     = $clog2(TURN_MAX + 1); // turn length
  localparam int unsigned OUT_DLY_DEPTH = 2048;               // output delay FIFO words
  localparam int unsigned OUT_DLY_AW  = $clog2(OUT_DLY_DEPTH);
  localparam int unsigned RAW_MAXD    = 8;                    // raw-path delay adjust range
  localparam int unsigned RAW_DW      = $clog2(RAW_MAXD);
  localparam int unsigned MEM_AW      = $clog2(MEM_WORDS);
  localparam int unsigned SET_W       = $clog2(NSETS);
  localparam int unsigned TAP_W       = $clog2(TAPS);

  // Channel count: six ADC mode (clock = fRF/6) or four ADC mode (clock = fRF/4).
  typedef enum logic {
    MODE_SIX  = 1'b0,
    MODE_FOUR = 1'b1
  } adc_mode_e;

  // FIR arrangement: one 50-tap filter feeding both outputs, or two 20-tap filters.
  typedef enum logic {
    FIR_SINGLE = 1'b0,
    FIR_DUAL   = 1'b1
  } fir_mode_e;

  // Sample-history capture state.
  typedef enum logic [1:0] {
    CAP_IDLE = 2'd0,
    CAP_RUN  = 2'd1,
    CAP_POST = 2'd2,
    CAP_DONE = 2'd3
  } cap_state_e;

  // Run-time configuration held in the control registers.
  typedef struct packed {
    adc_mode_e                          adc_mode;
    fir_mode_e                          fir_mode;
    logic                               ext_sel_en;   // coefficient set from external pins
    logic                               ext_trig_en;  // capture trigger from external pin
    logic [TURN_LW-1:0]                 turn_len;     // samples per turn per channel
    logic [5:0]                         att_shift;    // FIR output attenuation (right shift)
    logic [SET_W-1:0]                   coef_sel;     // software-selected coefficient set
    logic [2:0][OUT_DLY_AW-1:0]         out_delay;    // delay FIFOs: FIR A, FIR B, raw
    logic [NCH-1:0][RAW_DW-1:0]         raw_dly;      // raw-path delay adjust per channel
    logic [MEM_AW-1:0]                  post_len;     // capture beats after the trigger
  } cfg_t;

endpackage
