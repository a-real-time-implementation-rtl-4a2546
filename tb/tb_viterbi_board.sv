// End-to-end testbench of viterbi_board with two codebooks (two VQ indices
// per frame, output metrics combined): a small vocabulary (6 words of 3..12
// states, all four topologies) scored over two utterances of 150 frames,
// long enough for the metrics to need normalisation. The single-codebook
// default is run by tb_viterbi_full. All checking is done in viterbi_env.
module tb_viterbi_board;
  logic done;
  int checks, failures;

  viterbi_env #(.NW(6), .NS_MIN(3), .NS_MAX(12), .NFRAMES(150), .NUTT(2), .NCB(2)) env (.done, .checks, .failures);

  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
