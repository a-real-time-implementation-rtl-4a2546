// Normalisation circuit: keeps the 16-bit state metrics from overflowing.
//
// While a frame is scored, every state metric written back (obs_valid) is
// compared with a running maximum. At the start of the next frame
// (frame_start) the decision is taken for that whole frame: if the previous
// frame's maximum reached 2^15, every metric read in this frame is reduced
// by 2^14 (norm_active). Because the same amount is removed from every word
// in the same frame, the ranking of words is unchanged. Minus infinity (0)
// passes unchanged, and a real metric never drops below 1 so it cannot turn
// into minus infinity. With at most 2 x 255 added per frame, metrics stay
// below 2^15 + 510. The need for the circuit is the design's; this scheme
// (frame-wide subtraction of a fixed constant) is this implementation's.
// s_in -> s_out is combinational; norm_active changes one clock after
// frame_start.
module normalizer
  import vs_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     frame_start,
  input  logic     obs_valid,
  input  smetric_t obs_metric,
  input  smetric_t s_in,
  output smetric_t s_out,
  output logic     norm_active
);

  smetric_t frame_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_max   <= '0;
      norm_active <= 1'b0;
    end else if (frame_start) begin
      norm_active <= frame_max >= NORM_TRIG;
      frame_max   <= '0;
    end else if (obs_valid && obs_metric > frame_max) begin
      frame_max <= obs_metric;
    end
  end

  always_comb begin
    if (s_in == SM_NEG_INF || !norm_active)
      s_out = s_in;
    else if (s_in > NORM_SUB)
      s_out = s_in - NORM_SUB;
    else
      s_out = smetric_t'(1);
  end

endmodule
