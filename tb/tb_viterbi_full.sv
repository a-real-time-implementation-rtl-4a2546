// Full-size testbench of viterbi_board: 2,000 words of 50 states, i.e. the
// 100,000 states that one 10 ms frame is meant to hold at 10 MHz, are
// downloaded and one utterance of 90 frames (long enough to need
// normalisation) is recognised. Every state
// metric is checked against the reference model in viterbi_env, and each
// frame must take 100,000 + 7 clocks.
module tb_viterbi_full;
  logic done;
  int checks, failures;

  viterbi_env #(.NW(2000), .NS_MIN(50), .NS_MAX(50), .NFRAMES(90), .NUTT(1),
                .NCODES(2)) env (.done, .checks, .failures);

  initial begin
    #5s;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
