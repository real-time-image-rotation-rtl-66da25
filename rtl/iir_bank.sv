// iir_bank: the IIR configuration of the processing region, four
// first-order B-spline prefilter lanes working on four lines at once.
//
// Each SRAM word carries two samples (two lines at the same position).  A
// word with in_pair = 0 feeds lanes 0 and 1, the next word (in_pair = 1)
// feeds lanes 2 and 3, so two samples are filtered together and the next two
// half a processing cycle later; each lane runs at half the memory clock.
// This four-way data parallelism follows the specified design; the
// assignment of lanes to memory words is this design's.
// Interface: in_data/out_data hold two 13-bit samples sign-extended into
// 16-bit halves (low half = even line).  Timing: out_valid/out_data follow
// in_valid/in_data by one clock.  anticausal selects the section (see
// iir_lane); clr clears every lane.
module iir_bank
  import rot_pkg::*;
#(
  parameter int LANES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        anticausal,
  input  logic        in_valid,
  input  logic        in_pair,
  input  logic        in_line_start,
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [31:0] out_data
);

  sample_t y [LANES];
  logic    out_pair;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    iir_lane u_lane (
      .clk        (clk),
      .rst_n      (rst_n),
      .clr        (clr),
      .en         (in_valid && (in_pair == 1'((i / 2) % 2))),
      .anticausal (anticausal),
      .line_start (in_line_start),
      .x          (sample_t'(in_data[(i % 2) * 16 +: DW])),
      .y          (y[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      out_valid <= 1'b0;
      out_pair  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_pair  <= in_pair;
    end
  end

  assign out_data = out_pair ? {to_half(y[3]), to_half(y[2])}
                             : {to_half(y[1]), to_half(y[0])};

endmodule
