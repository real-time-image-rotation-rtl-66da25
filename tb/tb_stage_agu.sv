// Test of stage_agu on a 10 x 10 canvas.  For each stage kind the expected
// sequence of tags (read address, lane, line start, zero fill, write address
// and mask) is built by plain nested loops over lines and positions and
// compared clock by clock with what the generator issues, together with the
// coefficient loads and the stage length.
module tb_stage_agu;
  import rot_pkg::*;

  localparam int W = 10;
  logic               clk = 1'b0, rst_n = 1'b0, start = 1'b0, transpose = 1'b0;
  cfg_e               kind = CFG_IIR_CAUSAL;
  logic               busy, done, rd_en, coef_we;
  logic [AW-1:0]      rd_addr;
  tag_t               tag;
  logic [LW-1:0]      coef_pair;
  logic signed [10:0] d0, d1;
  logic [1:0]         coef_idx;
  int checks = 0, failures = 0;

  stage_agu #(.W(W)) dut (.*);

  always #5 clk = !clk;

  // integer shifts supplied for a line pair: depend on the pair index
  assign d0 = 11'(int'(coef_pair) - 3);
  assign d1 = 11'(2 - int'(coef_pair));

  typedef struct { bit rd; int addr; bit sel, ls, zero, we; int waddr; int mask; bit cw; int cidx; } exp_t;
  exp_t q [$];

  function automatic exp_t none();
    exp_t e;
    e.rd = 0; e.addr = 0; e.sel = 0; e.ls = 0; e.zero = 0; e.we = 0; e.waddr = 0; e.mask = 0; e.cw = 0; e.cidx = 0;
    return e;
  endfunction

  task automatic build(input cfg_e k, input bit tr);
    exp_t e;
    int src, dd;
    q.delete();
    if (k != CFG_FIR) begin
      for (int g = 0; 4*g < W; g++)
        for (int p = 0; p < W; p++)
          for (int h = 0; h < 2; h++) begin
            e = none();
            e.sel  = h[0];
            e.ls   = (p == 0);
            e.zero = (4*g + 2*h >= W);
            e.rd   = !e.zero;
            e.addr = (2*g + h) * W + ((k == CFG_IIR_ANTICAUSAL) ? W-1-p : p);
            e.we   = !e.zero;
            e.waddr = e.addr;
            e.mask = 3;
            q.push_back(e);
          end
    end else begin
      for (int g = 0; g < W/2; g++) begin
        for (int c = 0; c < 8; c++) begin
          e = none();
          e.cw = (c % 2 == 0);
          e.cidx = c / 2;
          q.push_back(e);
        end
        for (int t = 0; t < W + 3; t++)
          for (int l = 0; l < 2; l++) begin
            e = none();
            dd  = (l == 0) ? g - 3 : 2 - g;
            src = t - dd - 2;
            e.sel  = l[0];
            e.ls   = (t == 0);
            e.zero = (src < 0 || src >= W);
            e.rd   = !e.zero;
            e.addr = e.zero ? -1 : g * W + src;
            e.we   = (t >= 3);
            if (e.we) begin
              if (tr) begin
                e.waddr = ((t - 3) / 2) * W + 2*g + l;
                e.mask  = ((t - 3) % 2 == 1) ? 2 : 1;
              end else begin
                e.waddr = g * W + t - 3;
                e.mask  = l ? 2 : 1;
              end
            end else e.waddr = -1;
            q.push_back(e);
          end
      end
    end
  endtask

  task automatic run(input cfg_e k, input bit tr);
    exp_t e;
    int n, bad, b0;
    build(k, tr);
    @(negedge clk);
    kind = k; transpose = tr; start = 1'b1;
    @(negedge clk);
    start = 1'b0; kind = CFG_IIR_CAUSAL; transpose = 1'b0;
    n = 0; bad = 0;
    while (!done) begin
      b0 = bad;
      if (tag.valid || coef_we) begin
        if (n >= q.size()) bad++;
        else begin
          e = q[n];
          if (coef_we != e.cw || (e.cw && coef_idx != 2'(e.cidx))) bad++;
          if (tag.valid) begin
            if (rd_en != e.rd || (e.rd && int'(rd_addr) != e.addr)) bad++;
            if (tag.sel != e.sel || tag.line_start != e.ls || tag.zero != e.zero || tag.wr_en != e.we) bad++;
            if (e.we && (int'(tag.wr_addr) != e.waddr || int'(tag.wr_mask) != e.mask)) bad++;
          end else if (!e.cw) bad++;
          if (bad != 0 && bad < 4) $display("mismatch %s entry %0d", k.name(), n);
        end
        n++;
      end else if (dut.state == 3'd2) begin
        // odd load clock: no tag and no coefficient write expected
        if (n >= q.size() || q[n].cw) bad++;
        n++;
      end
      if (tag.valid || coef_we || dut.state == 3'd2) begin
        checks++;
        if (bad != b0) failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (bad != 0 || n != q.size()) begin
      failures++;
      $display("FAIL %s transpose=%0d: %0d mismatches, %0d of %0d entries", k.name(), tr, bad, n, q.size());
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after done");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(CFG_IIR_CAUSAL, 1'b0);
    run(CFG_IIR_ANTICAUSAL, 1'b0);
    run(CFG_FIR, 1'b0);
    run(CFG_FIR, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
