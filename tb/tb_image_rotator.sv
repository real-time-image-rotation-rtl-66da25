// End-to-end test of image_rotator on a reduced 22 x 22 canvas (14 x 14
// image, short configuration loads): rotations by +30, -50 and 0 degrees,
// compared with a floating-point model.  See rot_tb_body.svh.
module tb_image_rotator;
  localparam int W         = 22;
  localparam int IMG       = 14;
  localparam int CFG_DELAY = 20;

  `include "rot_tb_body.svh"

  image_rotator #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .shear_a(shear_a), .shear_b(shear_b),
    .busy(busy), .done(done), .cfg_req(cfg_req), .cfg_id(cfg_id), .cfg_done(cfg_done),
    .host_sel(host_sel), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata)
  );

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
