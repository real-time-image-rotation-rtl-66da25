// Test of iir_bank: four lanes fed with random lines, first as causal
// sections (gain 1.6) then as anticausal sections (gain 1), compared sample
// by sample with an integer model of y(k) = g*x(k) - 0.26*y(k-1), rounded to
// the nearest 1/8 and saturated.  Also checks the one-clock latency, that
// each word reaches only its lane pair, line restarts and clearing.
module tb_iir_bank;
  import rot_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0, anticausal = 1'b0;
  logic        in_valid = 1'b0, in_pair = 1'b0, in_line_start = 1'b0;
  logic [31:0] in_data = '0;
  logic        out_valid;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  iir_bank dut (.*);

  always #5 clk = !clk;

  localparam int N = 40;
  int x [4][N];
  int yref [4];

  function automatic int rsat(input longint acc);
    longint r;
    r = (acc + 1024) >>> 11;
    if (r > 4095) r = 4095;
    if (r < -4096) r = -4096;
    return int'(r);
  endfunction

  function automatic int s13(input logic [15:0] h);
    return int'($signed(h[12:0]));
  endfunction

  task automatic run_lines(input bit ac, input int amp);
    int g;
    g = ac ? 2048 : 3277;
    for (int l = 0; l < 4; l++) begin
      yref[l] = 0;
      for (int k = 0; k < N; k++) x[l][k] = int'($urandom_range(0, 2*amp)) - amp;
    end
    anticausal = ac;
    for (int k = 0; k < N; k++) begin
      for (int pr = 0; pr < 2; pr++) begin
        @(negedge clk);
        in_valid      = 1'b1;
        in_pair       = pr[0];
        in_line_start = (k == 0);
        in_data       = {16'(x[2*pr+1][k]), 16'(x[2*pr][k])};
        for (int l = 2*pr; l < 2*pr+2; l++)
          yref[l] = rsat(longint'(g) * x[l][k] - 532 * ((k == 0) ? 0 : yref[l]));
        @(posedge clk);
        #1;
        checks++;
        if (!out_valid || s13(out_data[15:0]) != yref[2*pr] || s13(out_data[31:16]) != yref[2*pr+1]) begin
          failures++;
          $display("FAIL ac=%0d k=%0d pair=%0d got %0d %0d exp %0d %0d", ac, k, pr,
                   s13(out_data[15:0]), s13(out_data[31:16]), yref[2*pr], yref[2*pr+1]);
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_lines(1'b0, 2040);     // pixels up to 255 in 1/8 units
    run_lines(1'b1, 2600);
    run_lines(1'b0, 4000);     // drives saturation
    // an idle clock leaves the state alone, clr empties it
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    checks++;
    if (dut.y[0] != 0 || dut.y[3] != 0 || out_valid) begin
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
