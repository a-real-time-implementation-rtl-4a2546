// Testbench for metric_unit: random states are issued against small memory
// models answering one clock later; checks the A and B addresses, the
// splitting of the transition-metric word into four slots, the copying of
// the output metric to all four slots and the topology entry (compared with
// the rule for topology 1: slots 0..2 shift, valid up to the state index).
module tb_metric_unit;
  import vs_pkg::*;

  logic clk = 0, issue_valid = 0;
  logic [STATE_AW-1:0] issue_state = '0;
  logic [LOC_W-1:0] issue_j = '0;
  logic [TOPO_W-1:0] issue_topo = '0;
  logic [1:0][VQ_W-1:0] vq = '0;
  logic a_re, b_re;
  logic [STATE_AW-1:0] a_raddr;
  logic [1:0][STATE_AW+VQ_W-1:0] b_raddr;
  logic [NSLOT*TM_W-1:0] a_rdata;
  ometric_t [1:0] b_rdata;
  topo_entry_t topo;
  tmetric_t [NSLOT-1:0] a;
  ometric_t [NSLOT-1:0] b;
  int checks = 0, failures = 0, nclip = 0;

  metric_unit #(.NCB(2)) dut (.clk, .issue_valid, .issue_state, .issue_j, .issue_topo, .vq,
    .a_re, .a_raddr, .a_rdata, .b_re, .b_raddr, .b_rdata, .topo, .a, .b);

  // Memory models: contents are a hash of the address.
  function automatic logic [31:0] ahash(logic [STATE_AW-1:0] x);
    return {x[7:0] ^ 8'h5a, x[15:8], x[16:9] + 8'd3, ~x[7:0]};
  endfunction
  function automatic logic [7:0] bhash(logic [24:0] x, int c);
    return (c == 0) ? x[7:0] + x[15:8] + 8'(x[24:16]) : x[7:0] ^ x[23:16] ^ 8'h3c;
  endfunction
  always @(posedge clk) begin
    if (a_re) a_rdata <= ahash(a_raddr);
    for (int c = 0; c < 2; c++)
      if (b_re) b_rdata[c] <= bhash(b_raddr[c], c);
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [STATE_AW-1:0] st;
      logic [1:0][VQ_W-1:0] v;
      int bsum;
      logic [LOC_W-1:0] jj;
      logic [31:0] aw;
      logic [7:0] bexp;
      @(negedge clk);
      st = STATE_AW'($urandom); v = 16'($urandom); jj = LOC_W'($urandom);
      issue_valid = 1; issue_state = st; vq = v; issue_j = jj; issue_topo = 2'd1;
      #1;
      checks++;
      if (!a_re || !b_re || a_raddr != st || b_raddr[0] != {st, v[0]} || b_raddr[1] != {st, v[1]}) failures++;
      @(posedge clk);
      #1;
      aw = ahash(st);
      bsum = int'(bhash({st, v[0]}, 0)) + int'(bhash({st, v[1]}, 1)) - 255;
      bexp = (bsum < 0) ? 8'd0 : 8'(bsum);
      if (bsum < 0) nclip++;
      for (int k = 0; k < NSLOT; k++) begin
        checks++;
        if (a[k] != aw[k*8 +: 8] || b[k] != bexp) failures++;
      end
      checks++;
      if (topo.shift != 4'b0111 || topo.valid != ((jj >= 2) ? 4'b0111 : (jj == 1) ? 4'b0011 : 4'b0001)) begin
        failures++;
        if (failures < 10) $display("topo %b/%b for j=%0d", topo.shift, topo.valid, jj);
      end
    end
    if (nclip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
