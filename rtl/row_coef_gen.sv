// row_coef_gen: shift and cubic B-spline weights of one line.
//
// A shear translation moves line L by delta = shear * (L - (W-1)/2), the
// line's distance from the canvas centre times the shear factor (-tan(theta/2)
// for the row passes, sin(theta) for the column pass).  delta is split into
// its integer part d = floor(delta), which the address generator applies as a
// read offset, and its fraction f in [0,1), from which the four FIR taps
//   B3(-1-f) = (1-f)^3/6              B3(-f)  = 2/3 - f^2 + f^3/2
//   B3(1-f)  = 2/3 - (1-f)^2 + (1-f)^3/2   B3(2-f) = f^3/6
// follow from the piecewise cubic B-spline.  The spline and the decomposition
// follow the specified algorithm; computing the weights in logic rather than
// having the host supply them, the 12-bit fraction and the Q1.11 rounding are
// this design's choices.
// Interface: shear is signed Q2.14.  Purely combinational.
module row_coef_gen
  import rot_pkg::*;
#(
  parameter int W = 362
) (
  input  logic [LW-1:0]       line,
  input  logic signed [15:0]  shear,
  output logic signed [10:0]  d,
  output coef_t               w [4]
);

  logic signed [11:0] off2;        // 2*line - (W-1)
  logic signed [27:0] prod;        // delta with 15 fraction bits
  logic [11:0]        f;           // fraction, Q0.12
  logic [63:0]        fq, gq;      // f and 1-f, Q12
  logic [63:0]        f2, f3, g2, g3, n [4];

  always_comb begin
    off2 = 12'($signed({1'b0, line, 1'b0}) - 12'(W - 1));
    prod = 28'(shear * off2);
    d    = prod[25:15];
    f    = prod[14:3];
    fq   = 64'(f);
    gq   = 64'd4096 - fq;
    f2   = fq * fq;
    f3   = f2 * fq;
    g2   = gq * gq;
    g3   = g2 * gq;
    // six times each weight, Q36
    n[0] = g3;
    n[1] = (64'd4 << 36) - 64'd6 * (f2 << 12) + 64'd3 * f3;
    n[2] = (64'd4 << 36) - 64'd6 * (g2 << 12) + 64'd3 * g3;
    n[3] = f3;
    // w = n / (6 * 2^25) rounded: Q36 -> Q11
    for (int i = 0; i < 4; i++) w[i] = coef_t'(((n[i] >> 24) + 64'd6) / 64'd12);
  end

endmodule
