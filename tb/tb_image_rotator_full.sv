// End-to-end test of image_rotator at its default size: a 256 x 256 image
// centred in the 362 x 362 canvas, configuration loads of 20000 clocks
// (0.5 ms at 40 MHz), rotations by +30, -50 and 0 degrees, compared with a
// floating-point model.  See rot_tb_body.svh.
module tb_image_rotator_full;
  localparam int W         = 362;
  localparam int IMG       = 256;
  localparam int CFG_DELAY = 20000;

  `include "rot_tb_body.svh"

  image_rotator dut (
    .clk(clk), .rst_n(rst_n), .start(start), .shear_a(shear_a), .shear_b(shear_b),
    .busy(busy), .done(done), .cfg_req(cfg_req), .cfg_id(cfg_id), .cfg_done(cfg_done),
    .host_sel(host_sel), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata)
  );

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
