// Testbench for topology_rom: for every topology and word length the ROM's
// shift bits are run over a model of the passing list that records which
// state sits in each slot. The states in the slots marked valid must be
// exactly the predecessor set of the state being computed, as defined in
// the testbench for each topology.
module tb_topology_rom;
  import vs_pkg::*;

  logic clk = 0;
  logic [TOPO_W-1:0] topo = '0;
  logic [LOC_W-1:0] j = '0;
  topo_entry_t entry;
  int checks = 0, failures = 0, recirc = 0;

  topology_rom dut (.clk, .topo, .j, .entry);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_pred(int t, int i, int s);
    case (t)
      0: return i == s || i == s - 1;
      1: return i <= s && i >= s - 2;
      2: return i <= s && i >= s - 3;
      default: return (i <= s && i >= s - 2) || i == 0;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 4; t++) begin
      int slot [NSLOT];
      for (int k = 0; k < NSLOT; k++) slot[k] = -1;
      for (int s = 0; s < 64; s++) begin
        @(negedge clk);
        topo = TOPO_W'(t);
        j    = LOC_W'(s);
        @(posedge clk);
        #1;
        for (int k = NSLOT - 1; k >= 0; k--) begin
          if (entry.shift[k]) slot[k] = (k == 0) ? s : slot[k-1];
          else if (entry.valid[k]) recirc++;
        end
        for (int i = 0; i <= s; i++) begin
          bit found;
          found = 0;
          for (int k = 0; k < NSLOT; k++) if (entry.valid[k] && slot[k] == i) found = 1;
          checks++;
          if (found != is_pred(t, i, s)) begin
            failures++;
            if (failures < 10) $display("topo %0d state %0d pred %0d: found %0d", t, s, i, found);
          end
        end
        for (int k = 0; k < NSLOT; k++) begin
          if (entry.valid[k]) begin
            checks++;
            if (slot[k] < 0 || !is_pred(t, slot[k], s)) failures++;
          end
        end
      end
    end
    if (recirc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
