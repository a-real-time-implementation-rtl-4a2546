// Testbench for word_selector: frames of random final-state metrics are
// presented; the published word must be the one with the largest metric in
// the last completed frame (earliest word on a tie), and result_valid must
// be 0 when every final metric was minus infinity.
module tb_word_selector;
  import vs_pkg::*;

  logic clk = 0, rst_n = 0, frame_start = 0, in_valid = 0, frame_done = 0, end_req = 0;
  logic [WORD_AW-1:0] in_word = '0, result_word;
  smetric_t in_metric = '0, result_metric;
  logic result_valid;
  int checks = 0, failures = 0;

  word_selector dut (.clk, .rst_n, .frame_start, .in_valid, .in_word, .in_metric,
    .frame_done, .end_req, .result_valid, .result_word, .result_metric);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bw, bm, nw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      @(negedge clk);
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      nw = 1 + $urandom % 30;
      bw = 0; bm = -1;
      for (int w = 0; w < nw; w++) begin
        int m;
        @(negedge clk);
        m = (f % 7 == 3) ? 0 : (w % 5 == 4) ? bm : int'($urandom % 300);
        if (m < 0) m = 0;
        in_valid = 1; in_word = WORD_AW'(w); in_metric = smetric_t'(m);
        if (m > bm) begin bm = m; bw = w; end
        @(negedge clk);
        in_valid = 0;
        in_metric = 16'hFFFF; // ignored while not valid
      end
      @(negedge clk);
      frame_done = 1;
      @(negedge clk);
      frame_done = 0;
      if (f % 2 == 0) begin
        end_req = 1;
        @(negedge clk);
        end_req = 0;
        #1;
        checks++;
        if (result_word != WORD_AW'(bw) || int'(result_metric) != bm || result_valid != (bm != 0)) begin
          failures++;
          if (failures < 10) $display("frame %0d: got %0d/%0d/%0d expected %0d/%0d", f, result_word, result_metric, result_valid, bw, bm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
