// Test of sram_256kx32: random full-word and half-word writes over the whole
// address range, checked against a shadow copy; reads must appear exactly
// one clock after the address.
module tb_sram_256kx32;
  localparam int AW = 18;
  logic          clk = 1'b0;
  logic [1:0]    we = '0;
  logic [AW-1:0] addr = '0;
  logic [31:0]   wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [31:0]   shadow [int];
  int            addrs [$];

  sram_256kx32 dut (.*);

  always #5 clk = !clk;

  initial begin
    int a;
    logic [1:0] m;
    logic [31:0] v;
    // every used word first gets a full write
    for (int i = 0; i < 300; i++) begin
      a = (i == 0) ? 0 : (i == 1) ? (2**AW - 1) : int'($urandom_range(0, 2**AW - 1));
      v = $urandom;
      @(negedge clk);
      we = 2'b11; addr = AW'(a); wdata = v;
      shadow[a] = v;
      addrs.push_back(a);
    end
    // then half writes
    for (int i = 0; i < 300; i++) begin
      a = addrs[$urandom_range(0, addrs.size() - 1)];
      m = 2'($urandom_range(1, 3));
      v = $urandom;
      @(negedge clk);
      we = m; addr = AW'(a); wdata = v;
      if (m[0]) shadow[a][15:0]  = v[15:0];
      if (m[1]) shadow[a][31:16] = v[31:16];
    end
    @(negedge clk);
    we = '0;
    foreach (addrs[i]) begin
      addr = AW'(addrs[i]);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== shadow[addrs[i]]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", addrs[i], rdata, shadow[addrs[i]]);
      end
      @(negedge clk);
    end
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
