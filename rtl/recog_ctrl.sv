// recog_ctrl: sequencer and adaptive-mode controller of the recognizer.
//
// Sequencing: the host streams an utterance as frames of N_DIM feature
// dimensions, one dimension per clock while feat_valid and feat_ready are
// high, and flags the frames of the last one with feat_last (sampled with
// the last dimension of a frame). The controller counts dimensions (dim,
// first) and issues acc_en for each accepted one. In the cycle after a
// frame's last dimension it pulses delta_en so every Viterbi cell updates;
// init marks the first frame of an utterance (t = 0). One cycle after the
// last frame's delta_en it pulses result_en: the likelihoods and the
// comparator tree have settled and the top captures the result. feat_ready
// is low from the last dimension of the utterance until result_en, so a new
// utterance cannot start while the previous one finishes. A new frame may
// start in the delta_en cycle (no gap between frames). An utterance of T
// frames thus takes 39*T cycles of input plus 2 cycles to the captured
// result.
//
// Adaptive mode: with adaptive_en high the datapath runs in Technique-2
// (approximate adders) by default. If at result_en the best and second-best
// HMM are too close, redo is raised with the result and the mode moves to
// Technique-1 (exact adders); the host replays the same utterance, and after
// that pass the mode returns to Technique-2. mode also tells the clock
// source which frequency to use (Technique-1 runs at the lower clock). With
// adaptive_en low, mode follows mode_sel and redo stays low.
//
// The loop over dimensions, frames and termination mirrors the source design's
// flowchart, and the default mode, trigger and fall-back follow its adaptive
// system. Streaming handshake, the replay by the host and the cycle plan are
// this design's choices.
module recog_ctrl
  import hmm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // feature stream handshake
  input  logic              feat_valid,
  input  logic              feat_last,
  output logic              feat_ready,
  // mode control
  input  logic              adaptive_en,
  input  mode_e             mode_sel,
  input  logic              too_close,
  output mode_e             mode,
  // datapath sequencing
  output logic [DIM_AW-1:0] dim,
  output logic              acc_en,
  output logic              first,
  output logic              delta_en,
  output logic              init,
  output logic              result_en,
  output logic              redo
);
  logic [DIM_AW-1:0] dim_q;
  logic              delta_pend_q, last_pend_q, term_pend_q, closing_q, init_q;
  mode_e             mode_q;
  logic              last_dim;

  assign feat_ready = !closing_q;
  assign acc_en     = feat_valid && feat_ready;
  assign dim        = dim_q;
  assign first      = (dim_q == '0);
  assign last_dim   = (dim_q == DIM_AW'(N_DIM - 1));
  assign delta_en   = delta_pend_q;
  assign init       = init_q;
  assign result_en  = term_pend_q;
  assign mode       = adaptive_en ? mode_q : mode_sel;
  assign redo       = result_en && adaptive_en && (mode_q == MODE_T2) && too_close;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dim_q        <= '0;
      delta_pend_q <= 1'b0;
      last_pend_q  <= 1'b0;
      term_pend_q  <= 1'b0;
      closing_q    <= 1'b0;
      init_q       <= 1'b1;
      mode_q       <= MODE_T2;
    end else begin
      // dimension counter
      if (acc_en) begin
        dim_q <= last_dim ? '0 : dim_q + 1'b1;
        if (last_dim) begin
          delta_pend_q <= 1'b1;
          last_pend_q  <= feat_last;
          if (feat_last) closing_q <= 1'b1;
        end
      end
      // frame update
      if (delta_en) begin
        delta_pend_q <= 1'b0;
        init_q       <= last_pend_q;
        term_pend_q  <= last_pend_q;
      end
      // termination and mode decision
      if (result_en) begin
        term_pend_q <= 1'b0;
        closing_q   <= 1'b0;
        mode_q      <= redo ? MODE_T1 : MODE_T2;
      end
    end
  end

  // A frame's delta update never collides with the next frame's end.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(delta_en && acc_en && last_dim));
endmodule
