// Test of reconfig_seq: a model host answers each configuration request
// after a random delay and a model address generator finishes each stage
// after a random time.  The test checks the nine requests (causal IIR,
// anticausal IIR, FIR, three times), the translation index, the ping-pong
// direction of every stage, the transposed FIR writes of the first two
// translations, that no stage starts during a load, and the done pulse.
module tb_reconfig_seq;
  import rot_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, cfg_done = 1'b0, stage_done = 1'b0;
  logic       busy, done, cfg_req, cfg_loading, stage_start, src_b, transpose;
  cfg_e       cfg_id, kind;
  logic [1:0] pass;
  int checks = 0, failures = 0;

  reconfig_seq dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic rotation();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    for (int s = 0; s < 9; s++) begin
      // configuration load
      while (!cfg_req) begin
        check(!stage_start, "stage started without a configuration");
        @(negedge clk);
      end
      check(cfg_id == cfg_e'(s % 3), $sformatf("stage %0d requests %s", s, cfg_id.name()));
      check(cfg_loading, "loading flag during request");
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        check(cfg_req && !stage_start, "request held until done");
      end
      cfg_done = 1'b1;
      @(negedge clk);
      cfg_done = 1'b0;
      check(stage_start, $sformatf("stage %0d started after the load", s));
      check(!cfg_req, "request dropped");
      check(pass == 2'(s / 3), $sformatf("stage %0d pass %0d", s, pass));
      check(src_b == s[0], $sformatf("stage %0d reads SRAM %s", s, src_b ? "B" : "A"));
      check(transpose == (s == 2 || s == 5), $sformatf("stage %0d transpose %0d", s, transpose));
      repeat ($urandom_range(1, 8)) begin
        @(negedge clk);
        check(!cfg_req && !stage_start, "quiet while a stage runs");
      end
      stage_done = 1'b1;
      @(negedge clk);
      stage_done = 1'b0;
      if (s == 8) check(done && !busy, "done after the ninth stage");
      else        check(!done && busy, "not done before the ninth stage");
    end
    @(negedge clk);
    check(!done && !busy, "done is a single pulse");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !cfg_req, "idle after reset");
    rotation();
    rotation();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
