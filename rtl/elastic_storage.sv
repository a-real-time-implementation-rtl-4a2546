// Elastic storage of the processing element: the passing list.
//
// A chain of NSLOT D registers, each behind a 2:1 multiplexer. State metrics
// enter at slot 0 in state order. On an enabled clock each register either
// loads the value of its upstream neighbour (slot 0 loads din) when its
// shift bit is 1, or recirculates its own value when the bit is 0. A value
// that is shifted out of a register whose downstream neighbour recirculates
// is dropped: that is how a state leaves the passing list once no later
// state needs it, and how a long-lived state (for example an entry state)
// is kept while newer states stream past it.
// Structure (four MUX/register pairs, one control bit each) follows the
// design; the reset to minus infinity and the enable input are this
// implementation's choices. Timing: the new contents appear one clock after
// en is high.
module elastic_storage
  import vs_pkg::*;
#(
  parameter int NS = NSLOT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [NS-1:0]     shift,
  input  smetric_t          din,
  output smetric_t [NS-1:0] q
);

  smetric_t [NS-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (en) begin
      for (int k = 0; k < NS; k++) begin
        if (shift[k]) r[k] <= (k == 0) ? din : r[(k == 0) ? 0 : k - 1];
      end
    end
  end

  assign q = r;

endmodule
