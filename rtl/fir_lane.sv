// fir_lane: one 4-tap B-spline resampling filter in transposed form,
// y(k) = h0*x(k) + h1*x(k-1) + h2*x(k-2) + h3*x(k-3).
//
// The taps hold B3(-1-f), B3(-f), B3(1-f), B3(2-f) for the fractional shift
// f of the current line: the newest sample meets h0 next to the output and h3
// feeds the first delay, as in the specified filter structure.  Partial sums
// are kept at full product precision; only the output is rounded and
// saturated to 13 bits (this design's choice).
// Interface: coef_we writes tap coef_idx (Q1.11).  When en is high, x enters;
// line_start empties the delay line first.  Timing: y holds the result one
// clock after en.  clr empties taps and delays, as a reconfiguration does.
module fir_lane
  import rot_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       coef_we,
  input  logic [1:0] coef_idx,
  input  coef_t      coef,
  input  logic       en,
  input  logic       line_start,
  input  sample_t    x,
  output sample_t    y
);

  coef_t              h [4];
  logic signed [31:0] s [1:3];    // transposed-form delay registers
  logic signed [31:0] p [4];
  logic signed [31:0] s1_in, s2_in, s3_in;

  always_comb begin
    for (int i = 0; i < 4; i++) p[i] = 32'(h[i] * x);
    s1_in = line_start ? '0 : s[1];
    s2_in = line_start ? '0 : s[2];
    s3_in = line_start ? '0 : s[3];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int i = 0; i < 4; i++) h[i] <= '0;
      for (int i = 1; i < 4; i++) s[i] <= '0;
      y <= '0;
    end else begin
      if (coef_we) h[coef_idx] <= coef;
      if (en) begin
        y    <= round_sat(p[0] + s1_in);
        s[1] <= p[1] + s2_in;
        s[2] <= p[2] + s3_in;
        s[3] <= p[3];
      end
    end
  end

endmodule
