// rot_pkg: number formats, filter constants and shared types of the B-spline
// image rotator.
//
// Samples inside the filters are signed 13-bit fixed point with 3 fraction
// bits (range -512 .. +511.875 grey levels); the 13-bit width is the one the
// design is specified with, the split into integer and fraction bits is this
// design's choice.  Coefficients are signed 13-bit with 11 fraction bits
// (Q1.11).  In memory each sample occupies a 16-bit half word, sign extended.
// The recursive prefilter constants are the rounded values 1.6 and -0.26 of
// the cubic B-spline prefilter 1.6 / ((1 + 0.26 z^-1)(1 + 0.26 z)).
package rot_pkg;

  localparam int DW    = 13;   // sample width
  localparam int FRAC  = 3;    // sample fraction bits
  localparam int CW    = 13;   // coefficient width
  localparam int CFRAC = 11;   // coefficient fraction bits
  localparam int AW    = 18;   // SRAM word address width (256k words)
  localparam int LW    = 10;   // width of a line or position index

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;

  localparam coef_t IIR_GAIN_CAUSAL = 13'sd3277;  // 1.6   * 2048
  localparam coef_t IIR_GAIN_UNITY  = 13'sd2048;  // 1.0   * 2048
  localparam coef_t IIR_POLE        = -13'sd532;  // -0.26 * 2048

  // Configurations the processing region can hold.
  typedef enum logic [1:0] {
    CFG_IIR_CAUSAL     = 2'd0,
    CFG_IIR_ANTICAUSAL = 2'd1,
    CFG_FIR            = 2'd2
  } cfg_e;

  // Information carried alongside one SRAM read until its result is written.
  typedef struct packed {
    logic          valid;       // a sample slot enters the filters
    logic          zero;        // feed zero instead of memory data
    logic          sel;         // IIR: lane pair (0: lanes 0,1); FIR: lane
    logic          line_start;  // first sample of a line
    logic          wr_en;       // the result is written back
    logic [1:0]    wr_mask;     // half-word write enables
    logic [AW-1:0] wr_addr;     // destination word address
  } tag_t;

  // Round a product sum with CFRAC extra fraction bits to the nearest sample
  // and saturate it to the sample range.
  function automatic sample_t round_sat(input logic signed [31:0] acc);
    logic signed [31:0] r;
    r = (acc + 32'sd1024) >>> CFRAC;
    if (r > 32'sd4095)       return sample_t'(13'sd4095);
    else if (r < -32'sd4096) return sample_t'(-13'sd4096);
    else                     return sample_t'(r[DW-1:0]);
  endfunction

  // Sign-extend a sample into a 16-bit memory half word.
  function automatic logic [15:0] to_half(input sample_t s);
    return {{(16-DW){s[DW-1]}}, s};
  endfunction

endpackage
