// bpm_pkg: widths, constants and the processed-sample record shared by the
// beam position / phase monitor processing chain.
//
// The storage ring RF is 352.2 MHz with harmonic number 992 = 32*31. The ADCs
// are clocked at fs = 2*352.2 MHz/31 = 22.72 MHz, four samples per bunch
// spacing of the 16-bunch filling pattern, i.e. 64 samples per turn. The
// mixer IF (352.2 - 278.35 = 73.85 MHz = 3.25 fs) aliases to exactly fs/4, so
// consecutive samples are 90 degrees apart in IF phase. The ADC resolution
// (12 bits) and the four 2048-sample acquisition blocks follow the document;
// the widths of the intermediate results are this design's own choice.
package bpm_pkg;

  localparam int ADC_W          = 12;  // AD9225 resolution
  localparam int IQ_W           = ADC_W + 2;  // x[n]-x[n-2], and its negation
  localparam int MAG_W          = IQ_W + 2;   // CORDIC magnitude (gain 1.6468)
  localparam int SUM_W          = MAG_W + 2;  // A+B+C+D
  localparam int POS_W          = 16;  // difference/sum, signed Q1.15
  localparam int PHASE_W        = 16;  // 65536 units = 2*pi
  localparam int DATA_W         = 16;  // width of one stored acquisition word
  localparam int BLOCK_LEN      = 2048;  // samples per acquisition block
  localparam int N_BLOCKS       = 4;  // sum, x, y, phase

  // One processed sample, produced once per ADC clock.
  typedef struct packed {
    logic [3:0][MAG_W-1:0]     amp;    // electrode amplitudes, [0]=A .. [3]=D (CORDIC gain included)
    logic [SUM_W-1:0]          sum;    // A+B+C+D amplitudes (CORDIC gain included)
    logic signed [POS_W-1:0]   x;      // ((A+D)-(B+C))/sum, Q1.15
    logic signed [POS_W-1:0]   y;      // ((A+B)-(C+D))/sum, Q1.15
    logic signed [PHASE_W-1:0] phase;  // angle of the summed I/Q vector
  } proc_sample_t;

  // Data blocks of the acquisition memory and DAC source selection.
  typedef enum logic [1:0] {
    SEL_SUM   = 2'd0,
    SEL_X     = 2'd1,
    SEL_Y     = 2'd2,
    SEL_PHASE = 2'd3
  } quantity_e;

  // Sum amplitude as one 16-bit word: the sum stays below 2^(SUM_W-1), so
  // its top bit is dropped with saturation and its lowest bit truncated.
  function automatic logic [DATA_W-1:0] sum_word(input logic [SUM_W-1:0] s);
    if (s[SUM_W-1]) return '1;
    return s[SUM_W-2 -: DATA_W];
  endfunction

endpackage
