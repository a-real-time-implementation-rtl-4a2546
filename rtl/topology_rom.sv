// Topology ROM: elastic storage controls for every state of a word model.
//
// Indexed by {topology, state index inside the word}; each entry holds the
// four shift/recirculate bits of the elastic storage and the mask of slots
// that hold a predecessor of the state being computed. With these bits
// slot k holds state j-k, except in topology 3 where slot 3 keeps the
// word's first state. The four topologies are this implementation's:
//   0  left-to-right, self loop + next state        (predecessors j, j-1)
//   1  Bakis, self loop + next + skip one             (j, j-1, j-2)
//   2  Bakis with skips of one and two states        (j .. j-3)
//   3  Bakis plus a jump from the first state to every state
//      (j, j-1, j-2 and state 1; state 1 stays in slot 3 by recirculation
//      while later states stream past and are dropped)
// Contents are computed at elaboration from these rules; the read is
// registered (data one clock after the address), like the board memories.
module topology_rom
  import vs_pkg::*;
(
  input  logic              clk,
  input  logic [TOPO_W-1:0] topo,
  input  logic [LOC_W-1:0]  j,
  output topo_entry_t       entry
);

  localparam int DEPTH = 1 << (TOPO_W + LOC_W);

  function automatic topo_entry_t rule(int t, int s);
    topo_entry_t e;
    int np;        // predecessors held in slots 0 .. np-1
    np = (t == 0) ? 2 : (t == 1 || t == 3) ? 3 : 4;
    e.shift = '0;
    e.valid = '0;
    for (int k = 0; k < NSLOT; k++) begin
      if (k < np) e.shift[k] = 1'b1;
      if (k < np && k <= s) e.valid[k] = 1'b1;
    end
    if (t == 3) begin
      // Slot 3 loads while state 1 travels down (states 2..4) and then
      // recirculates to keep it.
      e.shift[3] = (s == 3);
      e.valid[3] = (s >= 3);
    end
    return e;
  endfunction

  function automatic topo_entry_t [DEPTH-1:0] build();
    topo_entry_t [DEPTH-1:0] m;
    for (int i = 0; i < DEPTH; i++) m[i] = rule(i >> LOC_W, i % (1 << LOC_W));
    return m;
  endfunction

  localparam topo_entry_t [DEPTH-1:0] ROM = build();

  always_ff @(posedge clk) entry <= ROM[{topo, j}];

endmodule
