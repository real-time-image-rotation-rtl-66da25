// stage_agu: address generator that runs one filter configuration over the
// whole W x W canvas.
//
// Memory layout: word (L>>1)*W + p holds sample p of line L in its low half
// (L even) or high half (L odd).  Every configuration reads one SRAM and
// writes the other; each processing cycle is two memory clocks (phase 0 and
// 1), matching a memory clock of twice the processing rate.
//   causal IIR     - groups of four lines; phase 0 reads the word of lines
//                    4g,4g+1, phase 1 that of 4g+2,4g+3; positions 0..W-1;
//                    results written to the same addresses in the other SRAM.
//   anticausal IIR - the same, positions W-1..0: reading the stored causal
//                    result backwards replaces the line-reversing stack.
//   FIR            - pairs of lines 2g,2g+1 (one word row).  Before each pair
//                    four processing cycles load the eight taps (coef_we on
//                    phase 0) and latch the integer shifts d0,d1.  Then for
//                    t = 0..W+2 phase l reads sample t-d_l-2 of line 2g+l
//                    (zero outside the line); the result of step t is sample
//                    p = t-3 of the shifted line.  With transpose set it is
//                    stored as sample 2g+l of line p, so the next translation
//                    again runs along stored lines.
// The layout, the order and the transposed write are this design's choices.
// Interface: start (with kind, transpose held stable) begins a stage; done
// pulses after the last result has been written (three clocks of drain).
// Every cycle of a stage issues one tag (tag.valid); rd_en asks for a read.
// coef_pair is the index g of the line pair whose taps are being loaded.
module stage_agu
  import rot_pkg::*;
#(
  parameter int W = 362
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  cfg_e               kind,
  input  logic               transpose,
  output logic               busy,
  output logic               done,
  output logic               rd_en,
  output logic [AW-1:0]      rd_addr,
  output tag_t               tag,
  output logic [LW-1:0]      coef_pair,
  input  logic signed [10:0] d0,
  input  logic signed [10:0] d1,
  output logic               coef_we,
  output logic [1:0]         coef_idx
);

  localparam int G4 = (W + 3) / 4;   // IIR line groups
  localparam int G2 = W / 2;         // FIR line pairs (W even)

  typedef enum logic [2:0] {S_IDLE, S_IIR, S_LOAD, S_FIR, S_DRAIN} state_e;

  state_e             state;
  cfg_e               kind_q;
  logic               transpose_q;
  logic               ph;
  logic [LW-1:0]      grp, pos;
  logic [2:0]         lcnt;
  logic [1:0]         dcnt;
  logic signed [10:0] d0_q, d1_q;

  // combinational address computation
  logic [LW:0]        word_row;
  logic [LW-1:0]      kk;
  logic signed [12:0] sp;            // FIR source position
  logic [LW-1:0]      p_out;         // FIR destination position
  logic [LW:0]        line_out;

  always_comb begin
    rd_en     = 1'b0;
    rd_addr   = '0;
    tag       = '0;
    coef_we   = 1'b0;
    coef_idx  = lcnt[2:1];
    coef_pair = grp;
    word_row  = '0;
    kk        = '0;
    sp        = '0;
    p_out     = '0;
    line_out  = '0;
    unique case (state)
      S_IIR: begin
        word_row       = (LW+1)'(2 * grp) + (LW+1)'(ph);
        kk             = (kind_q == CFG_IIR_ANTICAUSAL) ? LW'(W - 1) - pos : pos;
        tag.valid      = 1'b1;
        tag.sel        = ph;
        tag.line_start = (pos == '0);
        tag.zero       = (word_row >= (LW+1)'(G2));
        tag.wr_en      = !tag.zero;
        tag.wr_mask    = 2'b11;
        rd_en          = !tag.zero;
        rd_addr        = AW'(word_row * W) + AW'(kk);
        tag.wr_addr    = rd_addr;
      end
      S_LOAD: begin
        coef_we = !lcnt[0];
      end
      S_FIR: begin
        sp             = 13'(pos) - 13'(ph ? d1_q : d0_q) - 13'sd2;
        tag.valid      = 1'b1;
        tag.sel        = ph;
        tag.line_start = (pos == '0);
        tag.zero       = (sp < 0) || (sp >= 13'(W));
        rd_en          = !tag.zero;
        rd_addr        = AW'(grp * W) + AW'(sp[LW-1:0]);
        tag.wr_en      = (pos >= LW'(3));
        p_out          = pos - LW'(3);
        line_out       = (LW+1)'(2 * grp) + (LW+1)'(ph);
        if (transpose_q) begin
          tag.wr_addr = AW'(p_out[LW-1:1] * W) + AW'(line_out);
          tag.wr_mask = p_out[0] ? 2'b10 : 2'b01;
        end else begin
          tag.wr_addr = AW'(grp * W) + AW'(p_out);
          tag.wr_mask = ph ? 2'b10 : 2'b01;
        end
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      kind_q      <= CFG_IIR_CAUSAL;
      transpose_q <= 1'b0;
      ph          <= 1'b0;
      grp         <= '0;
      pos         <= '0;
      lcnt        <= '0;
      dcnt        <= '0;
      d0_q        <= '0;
      d1_q        <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          kind_q      <= kind;
          transpose_q <= transpose;
          ph          <= 1'b0;
          grp         <= '0;
          pos         <= '0;
          lcnt        <= '0;
          state       <= (kind == CFG_FIR) ? S_LOAD : S_IIR;
        end
        S_IIR: begin
          ph <= !ph;
          if (ph) begin
            if (pos == LW'(W - 1)) begin
              pos <= '0;
              if (grp == LW'(G4 - 1)) begin
                state <= S_DRAIN;
                dcnt  <= '0;
              end else grp <= grp + 1'b1;
            end else pos <= pos + 1'b1;
          end
        end
        S_LOAD: begin
          lcnt <= lcnt + 1'b1;
          if (lcnt == 3'd0) begin
            d0_q <= d0;
            d1_q <= d1;
          end
          if (lcnt == 3'd7) begin
            state <= S_FIR;
            ph    <= 1'b0;
            pos   <= '0;
          end
        end
        S_FIR: begin
          ph <= !ph;
          if (ph) begin
            if (pos == LW'(W + 2)) begin
              pos  <= '0;
              lcnt <= '0;
              if (grp == LW'(G2 - 1)) begin
                state <= S_DRAIN;
                dcnt  <= '0;
              end else begin
                grp   <= grp + 1'b1;
                state <= S_LOAD;
              end
            end else pos <= pos + 1'b1;
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 2'd2) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
