// Add-compare-select circuit of the processing element.
//
// For each of the four passing-list slots an interim metric is formed with
// two adders, S + a + b (eight adders in all), and three maximizers in a
// two-level tree pick the largest. A slot whose valid bit is 0, or whose
// state metric is minus infinity (0), contributes minus infinity. The sums
// are kept in 16 bits; the normaliser keeps every state metric below
// 2^15 + 510 so they cannot wrap. Purely combinational; the processing
// element registers the result. The add/max structure follows the design;
// the minus-infinity handling is this implementation's choice.
module acs_unit
  import vs_pkg::*;
(
  input  smetric_t [NSLOT-1:0] s,
  input  tmetric_t [NSLOT-1:0] a,
  input  ometric_t [NSLOT-1:0] b,
  input  logic     [NSLOT-1:0] valid,
  output smetric_t             smax
);

  smetric_t [NSLOT-1:0] interim;

  always_comb begin
    for (int k = 0; k < NSLOT; k++) begin
      if (valid[k] && s[k] != SM_NEG_INF)
        interim[k] = s[k] + smetric_t'(a[k]) + smetric_t'(b[k]);
      else
        interim[k] = SM_NEG_INF;
    end
  end

  // Maximizer tree: (0,1) and (2,3), then the two winners.
  smetric_t m01, m23;
  logic     s01, s23;

  always_comb begin
    s01  = interim[1] > interim[0];
    m01  = s01 ? interim[1] : interim[0];
    s23  = interim[3] > interim[2];
    m23  = s23 ? interim[3] : interim[2];
    smax = (m23 > m01) ? m23 : m01;
  end

endmodule
