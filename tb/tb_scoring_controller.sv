// Testbench for scoring_controller: a LUT memory model holds words of
// random length, address and topology. Each frame the issued stream must
// be every state of every word in order, one per clock without gaps, with
// correct first/last flags, and done must come total-states + 7 clocks
// after go; the S_Memory bank must swap every frame.
module tb_scoring_controller;
  import vs_pkg::*;

  localparam int NW = 12;
  logic clk = 0, rst_n = 0, go = 0;
  logic [WORD_AW:0] nwords = '0;
  logic lut_re;
  logic [WORD_AW-1:0] lut_raddr;
  lut_entry_t lut_rdata;
  logic issue_valid, issue_first, issue_last;
  logic [STATE_AW-1:0] issue_state;
  logic [LOC_W-1:0] issue_j;
  logic [TOPO_W-1:0] issue_topo;
  logic [WORD_AW-1:0] issue_word;
  logic frame_start, busy, done, s_bank;
  lut_entry_t lut [NW];
  int checks = 0, failures = 0, cycle = 0;

  scoring_controller dut (.clk, .rst_n, .go, .nwords, .lut_re, .lut_raddr, .lut_rdata,
    .issue_valid, .issue_state, .issue_j, .issue_topo, .issue_first, .issue_last, .issue_word,
    .frame_start, .busy, .done, .s_bank);

  always @(posedge clk) if (lut_re) lut_rdata <= lut[lut_raddr % NW];
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      int nw, total, start, w, s, bank0;
      nw = 1 + $urandom % NW;
      total = 0;
      for (int i = 0; i < NW; i++) begin
        lut[i].base    = STATE_AW'($urandom);
        lut[i].nstates = 7'(2 + $urandom % 63);
        lut[i].topo    = TOPO_W'($urandom);
        if (i < nw) total += lut[i].nstates;
      end
      nwords = (WORD_AW + 1)'(nw);
      @(negedge clk);
      bank0 = s_bank;
      go = 1;
      start = cycle;
      #1;
      checks++;
      if (!frame_start) failures++;
      @(negedge clk);
      go = 0;
      w = 0; s = 0;
      while (!done) begin
        if (issue_valid) begin
          checks++;
          if (w >= nw || issue_word != WORD_AW'(w) || issue_state != lut[w].base + STATE_AW'(s) ||
              issue_j != LOC_W'(s) || issue_topo != lut[w].topo || issue_first != (s == 0) ||
              issue_last != (s == lut[w].nstates - 1)) begin
            failures++;
            if (failures < 10) $display("frame %0d word %0d state %0d mismatch", f, w, s);
          end
          if (s == lut[w].nstates - 1) begin w++; s = 0; end
          else s++;
        end
        @(negedge clk);
      end
      checks++;
      if (w != nw || cycle - start != total + 7) begin
        failures++;
        $display("frame %0d: %0d words, %0d cycles, expected %0d", f, w, cycle - start, total + 7);
      end
      @(negedge clk);
      checks++;
      if (busy || s_bank == bank0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
