// Test of fir_bank: random taps are loaded (one tap of each lane per load,
// four loads), two random lines are fed alternately to the two lanes, and
// every output is compared with a direct-form convolution sum
// y(k) = sum_i h_i x(k-i) (zero before the line start) rounded once.  The
// taps are then reloaded for a second pair of lines.
module tb_fir_bank;
  import rot_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic       coef_we = 1'b0;
  logic [1:0] coef_idx = '0;
  coef_t      coef0 = '0, coef1 = '0;
  logic       in_valid = 1'b0, in_lane = 1'b0, in_line_start = 1'b0;
  sample_t    in_sample = '0;
  logic       out_valid, out_lane;
  sample_t    out_sample;
  int checks = 0, failures = 0;

  fir_bank dut (.*);

  always #5 clk = !clk;

  localparam int N = 30;
  int h [2][4];
  int x [2][N];

  function automatic int rsat(input longint acc);
    longint r;
    r = (acc + 1024) >>> 11;
    if (r > 4095) r = 4095;
    if (r < -4096) r = -4096;
    return int'(r);
  endfunction

  task automatic one_pair(input int amp);
    longint acc;
    for (int l = 0; l < 2; l++) begin
      for (int i = 0; i < 4; i++) h[l][i] = int'($urandom_range(0, 2400)) - 600;
      for (int k = 0; k < N; k++) x[l][k] = int'($urandom_range(0, 2*amp)) - amp;
    end
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      coef_we  = 1'b1;
      coef_idx = 2'(i);
      coef0    = coef_t'(h[0][i]);
      coef1    = coef_t'(h[1][i]);
      @(negedge clk);
      coef_we  = 1'b0;
    end
    for (int k = 0; k < N; k++)
      for (int l = 0; l < 2; l++) begin
        @(negedge clk);
        in_valid      = 1'b1;
        in_lane       = l[0];
        in_line_start = (k == 0);
        in_sample     = sample_t'(x[l][k]);
        acc = 0;
        for (int i = 0; i < 4; i++) if (k - i >= 0) acc += longint'(h[l][i]) * x[l][k-i];
        @(posedge clk);
        #1;
        checks++;
        if (!out_valid || out_lane != l[0] || int'(out_sample) != rsat(acc)) begin
          failures++;
          $display("FAIL lane %0d k %0d got %0d exp %0d", l, k, out_sample, rsat(acc));
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one_pair(2040);
    one_pair(2040);
    one_pair(4095);
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    // after a clear all taps are zero, so any input gives zero
    @(negedge clk);
    in_valid = 1'b1; in_lane = 1'b0; in_line_start = 1'b1; in_sample = 13'sd1000;
    @(posedge clk);
    #1;
    checks++;
    if (out_sample != 0) begin
      failures++;
      $display("FAIL clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
