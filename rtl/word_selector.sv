// Word selector: finds the recognised word.
//
// During a frame it watches the metrics produced for the last state of each
// word, S_t(N), and keeps the largest together with its word index (on a
// tie the earlier word stays). When the frame is done that winner becomes
// the frame's result. When the host reports the end of speech (end_req),
// the winner of the last frame scored is published as the recognised word,
// P = S_T(N) being the score of each word. result_valid is 0 when no word
// reached its final state (every final metric minus infinity).
// Choosing the word with the largest final metric is the design's; keeping
// the running maximum per frame is this implementation's. Results change
// one clock after the input that causes them.
module word_selector
  import vs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_start,
  input  logic               in_valid,   // metric of the last state of in_word
  input  logic [WORD_AW-1:0] in_word,
  input  smetric_t           in_metric,
  input  logic               frame_done,
  input  logic               end_req,
  output logic               result_valid,
  output logic [WORD_AW-1:0] result_word,
  output smetric_t           result_metric
);

  logic               seen;
  logic [WORD_AW-1:0] best_word, frame_word;
  smetric_t           best_metric, frame_metric;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen          <= 1'b0;
      best_word     <= '0;
      best_metric   <= '0;
      frame_word    <= '0;
      frame_metric  <= '0;
      result_valid  <= 1'b0;
      result_word   <= '0;
      result_metric <= '0;
    end else begin
      if (frame_start) begin
        seen        <= 1'b0;
        best_metric <= SM_NEG_INF;
        best_word   <= '0;
      end else if (in_valid && (!seen || in_metric > best_metric)) begin
        seen        <= 1'b1;
        best_metric <= in_metric;
        best_word   <= in_word;
      end
      if (frame_done) begin
        frame_word   <= best_word;
        frame_metric <= best_metric;
      end
      if (end_req) begin
        result_word   <= frame_word;
        result_metric <= frame_metric;
        result_valid  <= frame_metric != SM_NEG_INF;
      end
    end
  end

endmodule
