// Testbench for processing_element: streams of states with random metrics,
// random elastic-storage controls and valid masks, initialisation frames
// and frame boundaries are applied. A reference model in the testbench
// keeps its own passing list, normalisation flag and frame maximum and
// predicts each result; results must appear exactly two clocks after their
// input, with their tag.
module tb_processing_element;
  import vs_pkg::*;

  logic clk = 0, rst_n = 0, frame_start = 0, in_valid = 0, init = 0, first_state = 0;
  logic [7:0] in_tag = '0, out_tag;
  smetric_t s_prev = '0, out_metric;
  topo_entry_t topo = '0;
  tmetric_t [NSLOT-1:0] a = '0;
  ometric_t [NSLOT-1:0] b = '0;
  logic out_valid, norm_active;

  processing_element #(.TAG_W(8)) dut (
    .clk, .rst_n, .frame_start, .in_valid, .init, .first_state, .in_tag,
    .s_prev, .topo, .a, .b, .out_valid, .out_tag, .out_metric, .norm_active);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, norm_frames = 0, init_outs = 0;
  int ref_slots [NSLOT];
  int ref_fmax = 0, ref_norm = 0;
  int exp_q [$], tag_q [$], due_q [$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        int e, t, d;
        e = exp_q.pop_front(); t = tag_q.pop_front(); d = due_q.pop_front();
        if (int'(out_metric) != e || int'(out_tag) != t || cycle != d) begin
          failures++;
          if (failures < 10)
            $display("out %0d tag %0d at %0d, expected %0d tag %0d at %0d", out_metric, out_tag, cycle, e, t, d);
        end
        if (e > ref_fmax) ref_fmax = e;
      end
    end
  end

  function automatic int norm(int v);
    if (v == 0 || !ref_norm) return v;
    return (v > 16384) ? v - 16384 : 1;
  endfunction

  initial begin
    for (int k = 0; k < NSLOT; k++) ref_slots[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      // frame boundary with an empty pipeline
      repeat (4) @(negedge clk);
      frame_start = 1;
      ref_norm = ref_fmax >= 32768;
      ref_fmax = 0;
      @(negedge clk);
      frame_start = 0;
      checks++;
      if (int'(norm_active) != ref_norm) failures++;
      if (ref_norm) norm_frames++;
      init = (f % 10 == 0);
      for (int n = 0; n < 60; n++) begin
        int best, sn;
        @(negedge clk);
        in_valid = ($urandom % 5) != 0;
        first_state = (n % 7 == 0);
        in_tag = 8'($urandom);
        case ($urandom % 5)
          0: s_prev = '0;
          1: s_prev = smetric_t'(32000 + $urandom % 1200);
          default: s_prev = smetric_t'($urandom % 33000);
        endcase
        topo.shift = NSLOT'($urandom);
        topo.valid = NSLOT'($urandom);
        for (int k = 0; k < NSLOT; k++) begin
          a[k] = tmetric_t'($urandom);
          b[k] = ometric_t'($urandom);
        end
        if (in_valid) begin
          sn = norm(int'(s_prev));
          for (int k = NSLOT - 1; k >= 0; k--)
            if (topo.shift[k]) ref_slots[k] = (k == 0) ? sn : ref_slots[k-1];
          best = 0;
          for (int k = 0; k < NSLOT; k++)
            if (topo.valid[k] && ref_slots[k] != 0 && ref_slots[k] + a[k] + b[k] > best)
              best = ref_slots[k] + a[k] + b[k];
          if (init) begin
            best = first_state ? int'(b[0]) + 1 : 0;
            init_outs++;
          end
          exp_q.push_back(best);
          tag_q.push_back(int'(in_tag));
          due_q.push_back(cycle + 2);
        end
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (5) @(negedge clk);
    if (exp_q.size() != 0) failures++;
    if (norm_frames == 0 || init_outs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
