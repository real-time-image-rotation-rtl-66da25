// iir_lane: one first-order recursive section of the cubic B-spline
// prefilter, y(k) = g*x(k) - 0.26*y(k-1).
//
// With anticausal = 0 the input gain g is 1.6 (causal section, first
// configuration); with anticausal = 1 it is 1 (the anticausal section, which
// runs the same recursion over a line fed last sample first).  The output
// register is the recursion state.  The state is taken as zero at the first
// sample of each line (line_start), which is this design's boundary choice.
// Timing: when en is high the result for x appears on y on the next clock.
// clr empties the state, as a reconfiguration does.
module iir_lane
  import rot_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    en,
  input  logic    anticausal,
  input  logic    line_start,
  input  sample_t x,
  output sample_t y
);

  coef_t              gain;
  sample_t            prev;
  logic signed [31:0] acc;

  always_comb begin
    gain = anticausal ? IIR_GAIN_UNITY : IIR_GAIN_CAUSAL;
    prev = line_start ? '0 : y;
    acc  = 32'(gain * x) + 32'(IIR_POLE * prev);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) y <= '0;
    else if (en)       y <= round_sat(acc);
  end

endmodule
