// reconfig_seq: temporal partitioning of one image rotation.
//
// A rotation is three shear translations (along rows, along columns, along
// rows).  Each translation runs three configurations of the single
// processing region in turn: causal IIR, anticausal IIR, FIR.  Before each
// of these nine stages the sequencer asks the host to load the configuration
// (cfg_req with cfg_id, held until cfg_done); cfg_loading stays high during
// the load so the region's registers are lost, as a global reconfiguration
// loses them.  Then it starts the address generator (stage_start pulse) and
// waits for stage_done.  Stages alternate between reading SRAM A and SRAM B
// (src_b), so the data ping-pongs between the two memories and the result
// of the ninth stage ends in SRAM B.  The stage order is the specified one;
// the request/acknowledge handshake is this design's.
// Outputs pass (0..2) and kind describe the current stage; transpose is set
// for the FIR stage of the first two translations; done pulses at the end.
module reconfig_seq
  import rot_pkg::*;
#(
  parameter int N_PASS = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       cfg_req,
  output cfg_e       cfg_id,
  input  logic       cfg_done,
  output logic       cfg_loading,
  output logic       stage_start,
  input  logic       stage_done,
  output cfg_e       kind,
  output logic [1:0] pass,
  output logic       src_b,
  output logic       transpose
);

  typedef enum logic [1:0] {Q_IDLE, Q_CFG, Q_RUN} state_e;
  state_e state;

  assign busy        = (state != Q_IDLE);
  assign cfg_req     = (state == Q_CFG);
  assign cfg_loading = (state == Q_CFG);
  assign cfg_id      = kind;
  assign transpose   = (kind == CFG_FIR) && (pass != 2'(N_PASS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= Q_IDLE;
      kind        <= CFG_IIR_CAUSAL;
      pass        <= '0;
      src_b       <= 1'b0;
      stage_start <= 1'b0;
      done        <= 1'b0;
    end else begin
      stage_start <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        Q_IDLE: if (start) begin
          kind  <= CFG_IIR_CAUSAL;
          pass  <= '0;
          src_b <= 1'b0;
          state <= Q_CFG;
        end
        Q_CFG: if (cfg_done) begin
          stage_start <= 1'b1;
          state       <= Q_RUN;
        end
        Q_RUN: if (stage_done) begin
          src_b <= !src_b;
          if (kind == CFG_FIR) begin
            kind <= CFG_IIR_CAUSAL;
            if (pass == 2'(N_PASS - 1)) begin
              state <= Q_IDLE;
              done  <= 1'b1;
            end else begin
              pass  <= pass + 1'b1;
              state <= Q_CFG;
            end
          end else begin
            kind  <= (kind == CFG_IIR_CAUSAL) ? CFG_IIR_ANTICAUSAL : CFG_FIR;
            state <= Q_CFG;
          end
        end
        default: state <= Q_IDLE;
      endcase
    end
  end

endmodule
