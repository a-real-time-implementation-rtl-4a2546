// Testbench for normalizer: frames with chosen maxima are observed; in the
// following frame metrics must be reduced by 2^14 exactly when the previous
// maximum reached 2^15, minus infinity must pass, and small metrics must
// saturate at 1.
module tb_normalizer;
  import vs_pkg::*;

  logic clk = 0, rst_n = 0, frame_start = 0, obs_valid = 0;
  smetric_t obs_metric = '0, s_in = '0, s_out;
  logic norm_active;
  int checks = 0, failures = 0, norm_frames = 0;

  normalizer dut (.clk, .rst_n, .frame_start, .obs_valid, .obs_metric, .s_in, .s_out, .norm_active);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int fmax, expect_norm;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_norm = 0;
    for (int f = 0; f < 60; f++) begin
      @(negedge clk);
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      check(int'(norm_active), expect_norm, "norm_active");
      if (norm_active) norm_frames++;
      // read side
      for (int n = 0; n < 20; n++) begin
        int v, e;
        v = (n == 0) ? 0 : (n == 1) ? 100 : (n == 2) ? 16384 : (n == 3) ? 16385 : int'($urandom % 33000);
        s_in = smetric_t'(v);
        #1;
        if (v == 0) e = 0;
        else if (!expect_norm) e = v;
        else e = (v > 16384) ? v - 16384 : 1;
        check(int'(s_out), e, "s_out");
      end
      // write side: choose this frame's maximum
      fmax = (f % 3 == 0) ? 32768 + int'($urandom % 700) : (f % 3 == 1) ? 32767 : int'($urandom % 30000);
      for (int n = 0; n < 10; n++) begin
        @(negedge clk);
        obs_valid  = 1;
        obs_metric = smetric_t'((n == 5) ? fmax : int'($urandom % (fmax + 1)));
      end
      @(negedge clk);
      obs_valid  = 0;
      obs_metric = 16'hFFFF; // not valid: must be ignored
      @(negedge clk);
      expect_norm = fmax >= 32768;
    end
    if (norm_frames == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
