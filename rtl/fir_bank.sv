// fir_bank: the FIR configuration of the processing region, two 4-tap
// B-spline resampling lanes (data parallelism two, as specified) working on
// two lines at once.
//
// Lane 0 filters even lines, lane 1 odd lines.  Samples arrive one per clock,
// alternating between the lanes, so each lane runs at half the memory clock.
// Between lines the coefficients of both lanes are reloaded through coef_we:
// one tap of each lane per load, four loads for all eight coefficients.
// Timing: out_valid, out_lane and out_sample follow the input by one clock.
// clr empties both lanes.
module fir_bank
  import rot_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       coef_we,
  input  logic [1:0] coef_idx,
  input  coef_t      coef0,
  input  coef_t      coef1,
  input  logic       in_valid,
  input  logic       in_lane,
  input  logic       in_line_start,
  input  sample_t    in_sample,
  output logic       out_valid,
  output logic       out_lane,
  output sample_t    out_sample
);

  sample_t y [2];

  fir_lane u_lane0 (
    .clk(clk), .rst_n(rst_n), .clr(clr),
    .coef_we(coef_we), .coef_idx(coef_idx), .coef(coef0),
    .en(in_valid && !in_lane), .line_start(in_line_start), .x(in_sample),
    .y(y[0])
  );

  fir_lane u_lane1 (
    .clk(clk), .rst_n(rst_n), .clr(clr),
    .coef_we(coef_we), .coef_idx(coef_idx), .coef(coef1),
    .en(in_valid && in_lane), .line_start(in_line_start), .x(in_sample),
    .y(y[1])
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      out_valid <= 1'b0;
      out_lane  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_lane  <= in_lane;
    end
  end

  assign out_sample = y[out_lane];

endmodule
