// Body shared by the reduced-size and the full-size end-to-end testbenches
// of image_rotator.  The including module declares localparams W (canvas),
// IMG (image side), CFG_DELAY (clocks per configuration load) and instantiates
// the rotator as `dut` on the signals declared here.
//
// The test loads a synthetic image centred in a zero canvas, rotates it, and
// compares the result with a floating-point model of the same three shear
// translations (causal and anticausal recursions with the constants 1.6 and
// 0.26, then cubic B-spline resampling evaluated directly from the spline's
// piecewise polynomial).  It also checks the stage sequence, the number of
// configuration loads, the cycle count of each stage and that every mechanism
// (reversed reads, transposed writes, coefficient loads, zero fill, unused
// half groups, ping-pong direction changes) occurred.

  import rot_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               start = 1'b0;
  logic signed [15:0] shear_a = '0, shear_b = '0;
  logic               busy, done, cfg_req, cfg_done = 1'b0;
  cfg_e               cfg_id;
  logic               host_sel = 1'b0, host_we = 1'b0;
  logic [AW-1:0]      host_addr = '0;
  logic [31:0]        host_wdata = '0, host_rdata;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  real img  [W][W];   // canvas given to the design
  real cur  [W][W];   // model: current canvas, [line][position]
  real res  [W][W];   // model: result of one translation
  real tmp  [W];
  real cc   [W];

  // ---------------------------------------------------- reference model
  function automatic real bspl3(input real x);
    real a;
    a = (x < 0.0) ? -x : x;
    if (a < 1.0)      return (4.0 - 6.0*a*a + 3.0*a*a*a) / 6.0;
    else if (a < 2.0) return (2.0 - a)*(2.0 - a)*(2.0 - a) / 6.0;
    else              return 0.0;
  endfunction

  task automatic model_translate(input real s);
    real delta, acc;
    int  d;
    for (int l = 0; l < W; l++) begin
      for (int k = 0; k < W; k++)
        tmp[k] = (real'(IIR_GAIN_CAUSAL)/2048.0)*cur[l][k] - (-real'(IIR_POLE)/2048.0)*((k == 0) ? 0.0 : tmp[k-1]);
      for (int k = W-1; k >= 0; k--)
        cc[k] = tmp[k] - (-real'(IIR_POLE)/2048.0)*((k == W-1) ? 0.0 : cc[k+1]);
      delta = s * (real'(l) - real'(W-1)/2.0);
      d = $rtoi($floor(delta));
      for (int p = 0; p < W; p++) begin
        acc = 0.0;
        for (int j = p-d-2; j <= p-d+1; j++)
          if (j >= 0 && j < W) acc += cc[j] * bspl3(real'(p) - delta - real'(j));
        res[l][p] = acc;
      end
    end
  endtask

  task automatic model_rotate(input logic signed [15:0] sa, input logic signed [15:0] sb);
    for (int i = 0; i < W; i++) for (int j = 0; j < W; j++) cur[i][j] = img[i][j];
    for (int ps = 0; ps < 3; ps++) begin
      model_translate(real'((ps == 1) ? sb : sa) / 16384.0);
      for (int i = 0; i < W; i++) for (int j = 0; j < W; j++)
        cur[i][j] = (ps < 2) ? res[j][i] : res[i][j];
    end
  endtask

  // ---------------------------------------------------------- host side
  function automatic logic [15:0] enc(input real v);
    return to_half(sample_t'($rtoi($floor(v * 8.0 + 0.5))));
  endfunction

  task automatic load_image();
    for (int r = 0; r < W; r += 2)
      for (int p = 0; p < W; p++) begin
        @(negedge clk);
        host_sel   = 1'b0;
        host_we    = 1'b1;
        host_addr  = AW'((r/2)*W + p);
        host_wdata = {enc(img[r+1][p]), enc(img[r][p])};
      end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // rows stored as in the canvas layout, read back from SRAM B
  task automatic compare_result(input string name);
    real v, e, emax, esum;
    logic [31:0] wd;
    int  bad;
    emax = 0.0; esum = 0.0; bad = 0;
    for (int r = 0; r < W; r += 2)
      for (int p = 0; p < W; p++) begin
        @(negedge clk);
        host_sel  = 1'b1;
        host_addr = AW'((r/2)*W + p);
        @(negedge clk);
        wd = host_rdata;
        for (int h = 0; h < 2; h++) begin
          v = real'($signed(wd[16*h +: DW])) / 8.0;
          e = v - cur[r+h][p];
          if (e < 0.0) e = -e;
          esum += e;
          if (e > emax) emax = e;
          if (e > 1.0) bad++;
        end
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d samples differ from the model by more than 1 grey level (max %f)", name, bad, emax);
    end
    checks++;
    if (esum / real'(W*W) > 0.15) begin
      failures++;
      $display("FAIL %s: mean error %f", name, esum / real'(W*W));
    end
    $display("%s: max error %f, mean error %f grey levels", name, emax, esum / real'(W*W));
  endtask

  // host DSP: loads the requested configuration in CFG_DELAY clocks
  int  n_cfg = 0;
  cfg_e cfg_seen [$];
  initial begin
    forever begin
      @(posedge clk);
      if (cfg_req) begin
        cfg_seen.push_back(cfg_id);
        n_cfg++;
        repeat (CFG_DELAY) @(posedge clk);
        cfg_done <= 1'b1;
        @(posedge clk);
        cfg_done <= 1'b0;
        @(posedge clk);
      end
    end
  end

  // ------------------------------------------------- mechanism counters
  int n_rev = 0, n_transp = 0, n_coef = 0, n_zero = 0, n_skip = 0, n_swap = 0;
  longint st_begin;
  longint st_len [$];
  logic   src_b_q = 1'b0;
  always @(posedge clk) begin
    if (dut.u_agu.tag.valid && dut.u_seq.kind == CFG_IIR_ANTICAUSAL && dut.u_agu.tag.line_start) n_rev++;
    if (dut.u_seq.transpose && dut.wr_we != 2'b00) n_transp++;
    if (dut.u_fir.coef_we) n_coef++;
    if (dut.u_agu.tag.valid && dut.u_agu.tag.zero && dut.u_seq.kind == CFG_FIR) n_zero++;
    if (dut.u_agu.tag.valid && dut.u_agu.tag.zero && dut.u_seq.kind != CFG_FIR) n_skip++;
    src_b_q <= dut.u_seq.src_b;
    if (src_b_q != dut.u_seq.src_b) n_swap++;
    if (dut.stage_start) st_begin = cyc;
    if (dut.stage_done)  st_len.push_back(cyc - st_begin);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic make_image(input int seed);
    int s, off;
    real v;
    s = seed;
    off = (W - IMG) / 2;
    for (int i = 0; i < W; i++) for (int j = 0; j < W; j++) img[i][j] = 0.0;
    for (int i = 0; i < IMG; i++)
      for (int j = 0; j < IMG; j++) begin
        v = 60.0 + 120.0 * real'(i + j) / real'(2 * IMG);
        if (i > IMG/4 && i < IMG/2 && j > IMG/3 && j < (3*IMG)/4) v = 240.0;
        v += real'($urandom(s) % 16);
        s = s * 1103515245 + 12345;
        if (v > 255.0) v = 255.0;
        img[off + i][off + j] = real'($rtoi(v));
      end
  endtask

  task automatic rotate_once(input logic signed [15:0] sa, input logic signed [15:0] sb,
                             input string name);
    longint t0;
    int     exp_iir, exp_fir;
    load_image();
    model_rotate(sa, sb);
    n_cfg = 0;
    cfg_seen.delete();
    st_len.delete();
    @(negedge clk);
    shear_a = sa;
    shear_b = sb;
    start   = 1'b1;
    @(negedge clk);
    start   = 1'b0;
    t0 = cyc;
    wait (done);
    @(negedge clk);
    $display("%s: %0d clocks for the rotation", name, cyc - t0);
    check(n_cfg == 9, $sformatf("%s: %0d configuration loads, expected 9", name, n_cfg));
    for (int i = 0; i < 9 && i < n_cfg; i++)
      check(cfg_seen[i] == cfg_e'(i % 3), $sformatf("%s: load %0d is %s", name, i, cfg_seen[i].name()));
    // stage lengths: IIR 2*ceil(W/4)*W, FIR W/2*(8+2*(W+3)) clocks, +3 drain +1 done
    exp_iir = 2 * ((W + 3) / 4) * W + 4;
    exp_fir = (W / 2) * (8 + 2 * (W + 3)) + 4;
    check(st_len.size() == 9, $sformatf("%s: %0d stages", name, st_len.size()));
    for (int i = 0; i < st_len.size(); i++)
      check(st_len[i] == ((i % 3 == 2) ? exp_fir : exp_iir),
            $sformatf("%s: stage %0d took %0d clocks", name, i, st_len[i]));
    if (W == 362) begin
      // published rates: 50 ns x 362*362/4 per IIR stage (at 40 MHz that is
      // W*W/2 clocks), twice that per FIR stage, 24.5 ms per image with nine
      // 0.5 ms loads (980000 clocks)
      for (int i = 0; i < st_len.size(); i++)
        check(real'(st_len[i]) < 1.03 * real'(W*W/2) * ((i % 3 == 2) ? 2.0 : 1.0) &&
              real'(st_len[i]) > 0.97 * real'(W*W/2) * ((i % 3 == 2) ? 2.0 : 1.0),
              $sformatf("%s: stage %0d length %0d far from the published rate", name, i, st_len[i]));
      check((cyc - t0) > 950000 && (cyc - t0) < 1010000,
            $sformatf("%s: %0d clocks per image, published 24.5 ms = 980000", name, cyc - t0));
    end
    compare_result(name);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    make_image(7);
    // 30 degrees: -tan(15 deg) = -0.26795, sin(30 deg) = 0.5
    rotate_once(-16'sd4390, 16'sd8192, "rotate +30");
    make_image(11);
    // -50 degrees: tan(25 deg) = 0.46631, sin(-50 deg) = -0.76604
    rotate_once(16'sd7640, -16'sd12551, "rotate -50");
    // 0 degrees: every shift is zero, so the result (already shown equal to
    // the model within 1 grey level) must be close to the input image itself
    make_image(5);
    rotate_once(16'sd0, 16'sd0, "rotate 0");
    begin
      real e0, emax0, esum0;
      emax0 = 0.0;
      esum0 = 0.0;
      for (int i = 0; i < W; i++) for (int j = 0; j < W; j++) begin
        e0 = cur[i][j] - img[i][j];
        if (e0 < 0.0) e0 = -e0;
        if (e0 > emax0) emax0 = e0;
        esum0 += e0;
      end
      // the rounded constants make the chain slightly non-interpolating
      // (gain 1.008 at DC, 0.974 at the Nyquist frequency), which shows at
      // sharp edges; the 0.8 % DC gain alone gives about 1.2 on mid-grey
      $display("rotate 0: result differs from the image by at most %f, on average %f grey levels",
               emax0, esum0 / real'(W*W));
      check(emax0 < 10.0 && esum0 / real'(W*W) < 2.5,
            $sformatf("rotate 0: result differs from the image by %f", emax0));
    end
    check(n_rev  > 0, "no reversed line read");
    check(n_transp > 0, "no transposed write");
    check(n_coef > 0, "no coefficient load");
    check(n_zero > 0, "no zero-filled FIR read");
    check(n_swap >= 25, $sformatf("ping-pong direction changed %0d times", n_swap));
    if ((W / 2) % 2 == 1) check(n_skip > 0, "unused half group never skipped");
    $display("mechanisms: reversed lines %0d, transposed writes %0d, coefficient loads %0d, zero fills %0d, skipped words %0d, ping-pong swaps %0d",
             n_rev, n_transp, n_coef, n_zero, n_skip, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
