// Processing element of the Viterbi scorer: one state metric per clock.
//
// The previous frame's metric of state j enters (in_valid) together with the
// topology controls for state j, its four transition metrics and its output
// metrics. It passes the normaliser and is pushed into the elastic storage
// (passing list) under the shift controls. One clock later the ACS adds the
// transition and output metrics to the four passing-list slots and selects
// the largest; the result is registered and leaves, with the tag that came
// in with it, two clocks after in_valid. The output is the new metric of
// state j for this frame and is also fed back to the normaliser's
// frame maximum.
// In the first frame of an utterance (init) the recursion is replaced by the
// initialisation S(1) = b_1(O_1), all other states minus infinity; the +1
// keeps a zero output metric distinct from minus infinity and is the same
// for every word.
// Elastic storage + ACS and the normaliser follow the design; the pipeline
// split, tag and init handling are this implementation's.
module processing_element
  import vs_pkg::*;
#(
  parameter int TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_start,
  input  logic                 in_valid,
  input  logic                 init,        // first frame of an utterance
  input  logic                 first_state, // state 1 of its word
  input  logic [TAG_W-1:0]     in_tag,
  input  smetric_t             s_prev,      // S_{t-1}(j) from S_Memory
  input  topo_entry_t          topo,
  input  tmetric_t [NSLOT-1:0] a,
  input  ometric_t [NSLOT-1:0] b,
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output smetric_t             out_metric,
  output logic                 norm_active
);

  // Stage 1: normalise and push into the passing list.
  smetric_t s_norm;
  smetric_t [NSLOT-1:0] slots;

  normalizer u_norm (
    .clk, .rst_n, .frame_start,
    .obs_valid  (out_valid),
    .obs_metric (out_metric),
    .s_in       (s_prev),
    .s_out      (s_norm),
    .norm_active
  );

  elastic_storage #(.NS(NSLOT)) u_es (
    .clk, .rst_n,
    .en    (in_valid),
    .shift (topo.shift),
    .din   (s_norm),
    .q     (slots)
  );

  // Pipeline registers aligning the metrics with the passing list.
  logic                 v2, init2, first2;
  logic [TAG_W-1:0]     tag2;
  tmetric_t [NSLOT-1:0] a2;
  ometric_t [NSLOT-1:0] b2;
  logic     [NSLOT-1:0] valid2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; init2 <= 1'b0; first2 <= 1'b0;
      tag2 <= '0; a2 <= '0; b2 <= '0; valid2 <= '0;
    end else begin
      v2 <= in_valid;
      if (in_valid) begin
        init2  <= init;
        first2 <= first_state;
        tag2   <= in_tag;
        a2     <= a;
        b2     <= b;
        valid2 <= topo.valid;
      end
    end
  end

  // Stage 2: add-compare-select.
  smetric_t acs_max;

  acs_unit u_acs (
    .s     (slots),
    .a     (a2),
    .b     (b2),
    .valid (valid2),
    .smax  (acs_max)
  );

  smetric_t result;
  always_comb begin
    if (init2) result = first2 ? smetric_t'(b2[0]) + smetric_t'(1) : SM_NEG_INF;
    else       result = acs_max;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_tag    <= '0;
      out_metric <= '0;
    end else begin
      out_valid <= v2;
      if (v2) begin
        out_tag    <= tag2;
        out_metric <= result;
      end
    end
  end

endmodule
