// Test of row_coef_gen: for many lines and shear factors the integer shift
// must equal floor(shear*(line-(W-1)/2)) and each weight must be within one
// LSB (1/2048) of the cubic B-spline evaluated in floating point at
// -1-f, -f, 1-f, 2-f; the four weights must sum to one within 2 LSB.
module tb_row_coef_gen;
  import rot_pkg::*;

  localparam int W = 362;
  logic [LW-1:0]      line = '0;
  logic signed [15:0] shear = '0;
  logic signed [10:0] d;
  coef_t              w [4];
  int checks = 0, failures = 0;

  row_coef_gen #(.W(W)) dut (.*);

  function automatic real bspl3(input real x);
    real a;
    a = (x < 0.0) ? -x : x;
    if (a < 1.0)      return (4.0 - 6.0*a*a + 3.0*a*a*a) / 6.0;
    else if (a < 2.0) return (2.0 - a)*(2.0 - a)*(2.0 - a) / 6.0;
    else              return 0.0;
  endfunction

  task automatic try(input int l, input int s);
    real delta, f, e;
    int  dexp, sum;
    line  = LW'(l);
    shear = 16'(s);
    #1;
    delta = real'(s) / 16384.0 * (real'(l) - real'(W - 1) / 2.0);
    dexp  = $rtoi($floor(delta));
    f     = delta - real'(dexp);
    checks++;
    if (int'(d) != dexp) begin
      failures++;
      $display("FAIL line %0d shear %0d: d=%0d expected %0d", l, s, d, dexp);
    end
    sum = 0;
    for (int i = 0; i < 4; i++) begin
      e = real'(w[i]) - 2048.0 * bspl3(real'(i - 1) - f);
      sum += int'(w[i]);
      checks++;
      if (e > 1.0 || e < -1.0) begin
        failures++;
        $display("FAIL line %0d shear %0d f %f: w%0d=%0d expected %f", l, s, f, i, w[i],
                 2048.0 * bspl3(real'(i - 1) - f));
      end
    end
    checks++;
    if (sum < 2046 || sum > 2050) begin
      failures++;
      $display("FAIL weight sum %0d", sum);
    end
  endtask

  initial begin
    try(0, 0);
    try(181, 16384);
    try(180, -4390);
    try(361, 8192);
    for (int i = 0; i < 400; i++)
      try(int'($urandom_range(0, W - 1)), int'($urandom_range(0, 32767)) - 16384);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
