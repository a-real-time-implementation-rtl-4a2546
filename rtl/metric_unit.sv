// Metric unit: address generation and output-metric generation for the PE.
//
// For every state issued by the scoring controller it forms the A_Memory
// address (the state's global address; one 32-bit word holds the four
// transition metrics of slots 0..3) and, for each of the NCB codebooks, a
// B_Memory address {state, VQ index of that codebook}, and looks up the
// topology ROM with {topology, state index}. One clock later, when the
// memories answer, it hands the PE the topology entry, the four transition
// metrics and the output metric copied to all four ACS inputs.
// With several codebooks the output probability is the product of the
// codebooks' probabilities. Each metric is C*log10(p) + D with D = 255, so
// the metric of the product is the sum of the codebook metrics minus
// (NCB-1)*255, clipped at 0; that is what is formed here.
// Roles follow the design (A/B addresses, the topology ROM, output-metric
// generation for multiple codebooks and distribution); the memory layout
// and NCB = 1 as default are this implementation's.
module metric_unit
  import vs_pkg::*;
#(
  parameter int NCB = 1   // codebooks (VQ indices per frame)
) (
  input  logic                  clk,
  // issue side
  input  logic                  issue_valid,
  input  logic [STATE_AW-1:0]   issue_state,
  input  logic [LOC_W-1:0]      issue_j,
  input  logic [TOPO_W-1:0]     issue_topo,
  input  logic [NCB-1:0][VQ_W-1:0] vq,
  // memory read ports
  output logic                  a_re,
  output logic [STATE_AW-1:0]   a_raddr,
  input  logic [NSLOT*TM_W-1:0] a_rdata,
  output logic                  b_re,
  output logic [NCB-1:0][STATE_AW+VQ_W-1:0] b_raddr,
  input  ometric_t [NCB-1:0]    b_rdata,
  // to the processing element (one clock after issue)
  output topo_entry_t           topo,
  output tmetric_t [NSLOT-1:0]  a,
  output ometric_t [NSLOT-1:0]  b
);

  localparam int OFFS = (NCB - 1) * ((1 << OM_W) - 1);

  assign a_re    = issue_valid;
  assign a_raddr = issue_state;
  assign b_re    = issue_valid;

  always_comb begin
    for (int c = 0; c < NCB; c++) b_raddr[c] = {issue_state, vq[c]};
  end

  topology_rom u_rom (
    .clk,
    .topo  (issue_topo),
    .j     (issue_j),
    .entry (topo)
  );

  // Combined output metric of all codebooks.
  ometric_t bsum;
  always_comb begin
    int acc;
    acc = 0;
    for (int c = 0; c < NCB; c++) acc += int'(b_rdata[c]);
    acc -= OFFS;
    bsum = (acc < 0) ? '0 : ometric_t'(acc);
  end

  always_comb begin
    for (int k = 0; k < NSLOT; k++) begin
      a[k] = a_rdata[k*TM_W +: TM_W];
      b[k] = bsum;
    end
  end

endmodule
