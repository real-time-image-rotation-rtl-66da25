// image_rotator: real-time image rotation by three B-spline shear
// translations on one time-shared (reconfigured) processing region.
//
// The rotation matrix is split as R(theta) = A B A, A a shear along x by
// -tan(theta/2), B a shear along y by sin(theta).  Each shear moves every
// line by a non-integer distance; that translation is done by cubic B-spline
// interpolation in three filters: a causal recursive prefilter (gain 1.6,
// pole -0.26), an anticausal one over the reversed line, and a 4-tap FIR
// whose taps depend on the line's fractional shift.  Only one filter
// configuration is active at a time, nine stages per image (3 translations x
// 3 configurations), each preceded by a configuration load requested from
// the host.  Data ping-pongs between two 256k x 32 SRAMs: every stage reads
// one and writes the other.
//
// Blocks: reconfig_seq (stage order and configuration requests), stage_agu
// (addresses), iir_bank (4 IIR lanes), fir_bank (2 FIR lanes), two
// row_coef_gen (shift and taps of the two FIR lines), two sram_256kx32.
// Pipeline: the address and a tag are issued in clock n, the SRAM word is
// there in n+1 and enters the active filter bank, the result is written to
// the other SRAM in n+2.
//
// Use: while busy is low the host loads the canvas (W x W samples, 13-bit
// signed with 3 fraction bits, layout in stage_agu) into SRAM A through the
// host port, pulses start with shear_a = -tan(theta/2) and shear_b =
// sin(theta) (signed Q2.14), answers every cfg_req with cfg_done, and after
// done reads the rotated canvas from SRAM B.  host_rdata follows host_addr by
// one clock.  Structure and rates follow the specified design; the canvas
// layout, handshake and host port are this design's.
module image_rotator
  import rot_pkg::*;
#(
  parameter int W = 362
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [15:0] shear_a,
  input  logic signed [15:0] shear_b,
  output logic               busy,
  output logic               done,
  output logic               cfg_req,
  output cfg_e               cfg_id,
  input  logic               cfg_done,
  input  logic               host_sel,
  input  logic               host_we,
  input  logic [AW-1:0]      host_addr,
  input  logic [31:0]        host_wdata,
  output logic [31:0]        host_rdata
);

  // ---------------------------------------------------------------- control
  logic       cfg_loading, stage_start, stage_done, src_b, transpose;
  cfg_e       kind;
  logic [1:0] pass;
  logic       agu_busy;

  reconfig_seq u_seq (
    .clk(clk), .rst_n(rst_n), .start(start && !busy),
    .busy(busy), .done(done),
    .cfg_req(cfg_req), .cfg_id(cfg_id), .cfg_done(cfg_done),
    .cfg_loading(cfg_loading),
    .stage_start(stage_start), .stage_done(stage_done),
    .kind(kind), .pass(pass), .src_b(src_b), .transpose(transpose)
  );

  logic               rd_en;
  logic [AW-1:0]      rd_addr;
  tag_t               tag, tag_q1, tag_q2;
  logic [LW-1:0]      coef_pair;
  logic signed [10:0] d0, d1;
  logic               coef_we;
  logic [1:0]         coef_idx;
  coef_t              w0 [4], w1 [4];
  logic signed [15:0] shear;

  assign shear = (pass == 2'd1) ? shear_b : shear_a;

  stage_agu #(.W(W)) u_agu (
    .clk(clk), .rst_n(rst_n), .start(stage_start), .kind(kind),
    .transpose(transpose), .busy(agu_busy), .done(stage_done),
    .rd_en(rd_en), .rd_addr(rd_addr), .tag(tag),
    .coef_pair(coef_pair), .d0(d0), .d1(d1),
    .coef_we(coef_we), .coef_idx(coef_idx)
  );

  row_coef_gen #(.W(W)) u_coef0 (
    .line(LW'(2 * coef_pair)), .shear(shear), .d(d0), .w(w0)
  );

  row_coef_gen #(.W(W)) u_coef1 (
    .line(LW'(2 * coef_pair + 1)), .shear(shear), .d(d1), .w(w1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_q1 <= '0;
      tag_q2 <= '0;
    end else begin
      tag_q1 <= tag;
      tag_q2 <= tag_q1;
    end
  end

  // ------------------------------------------------- reconfigurable region
  logic [31:0] rd_word, in_word;
  logic        iir_active, fir_active;
  logic        iir_out_valid, fir_out_valid, fir_out_lane;
  logic [31:0] iir_out_data;
  sample_t     fir_in, fir_out;

  assign iir_active = (kind != CFG_FIR);
  assign fir_active = (kind == CFG_FIR);
  assign in_word    = tag_q1.zero ? '0 : rd_word;
  assign fir_in     = tag_q1.sel ? sample_t'(in_word[16 +: DW]) : sample_t'(in_word[0 +: DW]);

  iir_bank u_iir (
    .clk(clk), .rst_n(rst_n), .clr(cfg_loading),
    .anticausal(kind == CFG_IIR_ANTICAUSAL),
    .in_valid(tag_q1.valid && iir_active), .in_pair(tag_q1.sel),
    .in_line_start(tag_q1.line_start), .in_data(in_word),
    .out_valid(iir_out_valid), .out_data(iir_out_data)
  );

  fir_bank u_fir (
    .clk(clk), .rst_n(rst_n), .clr(cfg_loading),
    .coef_we(coef_we && fir_active), .coef_idx(coef_idx),
    .coef0(w0[coef_idx]), .coef1(w1[coef_idx]),
    .in_valid(tag_q1.valid && fir_active), .in_lane(tag_q1.sel),
    .in_line_start(tag_q1.line_start), .in_sample(fir_in),
    .out_valid(fir_out_valid), .out_lane(fir_out_lane), .out_sample(fir_out)
  );

  // write-back
  logic          wr_valid;
  logic [1:0]    wr_we;
  logic [31:0]   wr_data;

  always_comb begin
    if (fir_active) begin
      wr_valid = fir_out_valid;
      wr_data  = {to_half(fir_out), to_half(fir_out)};
    end else begin
      wr_valid = iir_out_valid;
      wr_data  = iir_out_data;
    end
    wr_we = (wr_valid && tag_q2.wr_en) ? tag_q2.wr_mask : 2'b00;
  end

  // ---------------------------------------------------------- frame memories
  logic [1:0]    a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_wdata, b_wdata, a_rdata, b_rdata;
  logic          host_sel_q;

  always_comb begin
    if (busy) begin
      a_addr  = src_b ? tag_q2.wr_addr : rd_addr;
      b_addr  = src_b ? rd_addr : tag_q2.wr_addr;
      a_we    = src_b ? wr_we : 2'b00;
      b_we    = src_b ? 2'b00 : wr_we;
      a_wdata = wr_data;
      b_wdata = wr_data;
    end else begin
      a_addr  = host_addr;
      b_addr  = host_addr;
      a_we    = (host_we && !host_sel) ? 2'b11 : 2'b00;
      b_we    = (host_we &&  host_sel) ? 2'b11 : 2'b00;
      a_wdata = host_wdata;
      b_wdata = host_wdata;
    end
  end

  sram_256kx32 #(.AW(AW)) u_sram_a (
    .clk(clk), .we(a_we), .addr(a_addr), .wdata(a_wdata), .rdata(a_rdata)
  );

  sram_256kx32 #(.AW(AW)) u_sram_b (
    .clk(clk), .we(b_we), .addr(b_addr), .wdata(b_wdata), .rdata(b_rdata)
  );

  // the stage's source SRAM is fixed while data is in flight
  assign rd_word = src_b ? b_rdata : a_rdata;

  always_ff @(posedge clk) host_sel_q <= host_sel;
  assign host_rdata = host_sel_q ? b_rdata : a_rdata;

  // ---------------------------------------------------------------- checks
  // A read is never requested outside a stage, and a stage never overlaps a
  // configuration load.
  property p_read_in_stage;
    @(posedge clk) disable iff (!rst_n) rd_en |-> agu_busy;
  endproperty
  assert property (p_read_in_stage);

  property p_no_stage_while_loading;
    @(posedge clk) disable iff (!rst_n) cfg_loading |-> !agu_busy;
  endproperty
  assert property (p_no_stage_while_loading);

endmodule
