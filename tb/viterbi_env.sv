// End-to-end test environment for viterbi_board (used by tb_viterbi_board
// and tb_viterbi_full). It plays the host: downloads random word models
// over ISA I/O cycles (transition metrics, output metrics for the VQ indices it will use, one
// LUT entry per word, topologies mixed), then runs NUTT utterances of
// NFRAMES frames each through CTLPORT exactly as a host would: Start,
// VQ index, FrameSync, wait for FrameSync to clear, ..., End, read result.
// A reference Viterbi model, written from the predecessor sets of each
// topology rather than from the passing-list mechanics, predicts every
// state metric of every frame (same metric encoding: 0 = minus infinity,
// +1 on the initial metric, frame-wide normalisation by 2^14 after a frame
// whose maximum reached 2^15). Every metric written back to S_Memory, the
// frame length in clocks (total states + 7) and the recognised word are
// checked. The mechanisms of the design are counted and each must occur.
module viterbi_env
  import vs_pkg::*;
#(
  parameter int NW      = 6,    // vocabulary words
  parameter int NS_MIN  = 3,    // states per word, minimum
  parameter int NS_MAX  = 12,   // states per word, maximum
  parameter int NFRAMES = 90,   // frames per utterance
  parameter int NUTT    = 2,    // utterances
  parameter int NCODES  = 4,    // distinct VQ indices used
  parameter int BASE0   = 37,   // address of the first word's first state
  parameter bit NEED_NORM = 1,  // the run is long enough to need normalisation
  parameter int NCB     = 1     // codebooks of the board
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam logic [9:0] BASE = 10'h300;
  logic clk = 0, rst_n = 0, aen = 0, iow_n = 1, ior_n = 1;
  logic [9:0] sa = '0;
  logic [15:0] sd_in = '0, sd_out, result_metric;
  logic sd_oe, busy, frame_done, norm_active;

  viterbi_board #(.NCB(NCB)) dut (.clk, .rst_n, .sa, .aen, .iow_n, .ior_n, .sd_in, .sd_out, .sd_oe,
    .busy, .frame_done, .norm_active, .result_metric);

  always #50 clk = ~clk; // 10 MHz

  // ---------------- model data ----------------
  int total;
  int base [NW], ns [NW], topo [NW];
  int codes [NCODES];
  byte unsigned amem [];   // [state*4 + slot]
  byte unsigned bmem [];   // [(codebook*total + state)*NCODES + code number]
  int sm_old [], sm_new [];
  int ref_max_prev = 0;
  int cycle = 0;

  // mechanism counters
  int n_init = 0, n_norm = 0, n_recirc = 0, n_drop = 0, n_word_switch = 0;
  int n_clip = 0, n_end = 0, n_download = 0, n_neg_inf = 0, n_frames = 0, n_wait = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- host bus (ISA I/O cycles) ----------------
  // A write cycle holds IOW# low for three board clocks, then high for
  // three; a DMA cycle (AEN high) to the same port is inserted now and then
  // and must be ignored.
  int n_dma = 0;
  task automatic wr(input reg_t a, input logic [15:0] d);
    @(negedge clk);
    sa = BASE + 10'(2 * int'(a)); sd_in = d; aen = 0; iow_n = 0;
    repeat (3) @(negedge clk);
    iow_n = 1;
    repeat (2) @(negedge clk);
    if ($urandom % 16 == 0) begin
      sd_in = ~d; aen = 1; iow_n = 0; n_dma++;
      repeat (3) @(negedge clk);
      iow_n = 1;
      repeat (2) @(negedge clk);
      aen = 0;
    end
  endtask

  logic [15:0] r;
  task automatic rd(input reg_t a);
    @(negedge clk);
    sa = BASE + 10'(2 * int'(a)); ior_n = 0;
    @(negedge clk);
    checks++;
    if (!sd_oe) failures++;
    r = sd_out;
    ior_n = 1;
  endtask

  // streams bytes to consecutive download addresses, one per clock
  task automatic set_addr(input mem_sel_t m, input int addr);
    wr(REG_ADDR_LO, 16'(addr));
    wr(REG_ADDR_HI, {2'(m), 2'b0, 12'(addr >> 16)});
  endtask

  task automatic stream(input logic [15:0] d);
    wr(REG_DATA, d);
    n_download++;
  endtask

  // ---------------- reference model ----------------
  function automatic int npred(int t);
    return (t == 0) ? 2 : (t == 2) ? 4 : 3;
  endfunction

  // local index of the state in slot k of state s, or -1
  function automatic int pred(int t, int s, int k);
    if (t == 3 && k == 3) return (s >= 3) ? 0 : -1;
    if (k >= npred(t) || s - k < 0) return -1;
    return s - k;
  endfunction

  function automatic int norm(int v, bit on);
    if (v == 0 || !on) return v;
    return (v > 16384) ? v - 16384 : 1;
  endfunction

  task automatic ref_frame(input int cn [NCB], input bit init);
    bit on;
    int fmax;
    on = ref_max_prev >= 32768;
    if (on) n_norm++;
    fmax = 0;
    for (int w = 0; w < NW; w++) begin
      for (int s = 0; s < ns[w]; s++) begin
        int g, best, bv;
        g = base[w] + s;
        bv = -255 * (NCB - 1);
        for (int c = 0; c < NCB; c++) bv += bmem[(c * total + g) * NCODES + cn[c]];
        if (bv < 0) begin bv = 0; n_clip++; end
        if (init) begin
          best = (s == 0) ? bv + 1 : 0;
        end else begin
          best = 0;
          for (int k = 0; k < NSLOT; k++) begin
            int p, sv;
            p = pred(topo[w], s, k);
            if (p >= 0) begin
              sv = norm(sm_old[base[w] + p], on);
              if (sv != 0 && sv + amem[g * 4 + k] + bv > best) best = sv + amem[g * 4 + k] + bv;
            end
          end
        end
        sm_new[g] = best;
        if (best == 0) n_neg_inf++;
        if (best > fmax) fmax = best;
      end
    end
    ref_max_prev = fmax;
  endtask

  // Every metric written to S_Memory is compared with the model.
  int wr_count;
  always @(posedge clk) begin
    if (rst_n && dut.u_s_mem.we) begin
      int g;
      g = int'(dut.u_s_mem.waddr[STATE_AW-1:0]);
      wr_count++;
      checks++;
      if (g >= total || int'(dut.u_s_mem.wdata) != sm_new[g]) begin
        failures++;
        if (failures < 10) $display("state %0d: metric %0d, expected %0d", g, dut.u_s_mem.wdata, (g < total) ? sm_new[g] : -1);
      end
    end
    if (rst_n && dut.valid1) begin
      for (int k = 1; k < NSLOT; k++) begin
        if (dut.topo1.valid[k] && !dut.topo1.shift[k]) n_recirc++;
        if (dut.topo1.shift[k-1] && !dut.topo1.shift[k]) n_drop++;
      end
      if (dut.first1) n_word_switch++;
    end
  end

  // ---------------- test sequence ----------------
  initial begin
    done = 0; checks = 0; failures = 0; wr_count = 0;
    // models
    total = 0;
    for (int w = 0; w < NW; w++) begin
      ns[w]   = NS_MIN + int'($urandom % (NS_MAX - NS_MIN + 1));
      topo[w] = w % 4;
      base[w] = BASE0 + total;
      total  += ns[w];
    end
    for (int c = 0; c < NCODES; c++) codes[c] = (c * 67 + 5) % 256;
    amem = new[(BASE0 + total) * 4];
    bmem = new[NCB * (BASE0 + total) * NCODES];
    sm_old = new[BASE0 + total];
    sm_new = new[BASE0 + total];
    total = BASE0 + total;
    for (int i = 0; i < total * 4; i++) amem[i] = byte'($urandom);
    for (int i = 0; i < NCB * total * NCODES; i++)
      bmem[i] = (NCB == 1) ? byte'($urandom) : byte'(64 + $urandom % 192);
    for (int i = 0; i < total; i++) begin sm_old[i] = 0; sm_new[i] = 0; end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // download
    wr(REG_CTL, 16'h0001);
    set_addr(MEM_A, BASE0 * 4);
    for (int i = BASE0 * 4; i < total * 4; i++) stream(16'(amem[i]));
    // B_Memory: only the entries of the VQ indices used, one address each
    for (int cb = 0; cb < NCB; cb++) begin
      for (int c = 0; c < NCODES; c++) begin
        for (int g = BASE0; g < total; g++) begin
          set_addr(MEM_B, (cb << 25) + g * 256 + codes[c]);
          stream(16'(bmem[(cb * total + g) * NCODES + c]));
        end
      end
    end
    set_addr(MEM_LUT, 0);
    for (int w = 0; w < NW; w++) begin
      lut_entry_t e;
      logic [31:0] e32;
      e.base = STATE_AW'(base[w]); e.nstates = 7'(ns[w]); e.topo = TOPO_W'(topo[w]);
      e32 = 32'(e);
      stream(e32[15:0]);
      stream(e32[31:16]);
    end
    wr(REG_CTL, 16'h0000);
    wr(REG_NWORDS, 16'(NW));

    for (int u = 0; u < NUTT; u++) begin
      int best_w, best_m;
      wr(REG_CTL, 16'h0002);                      // Start
      for (int f = 0; f < NFRAMES; f++) begin
        int cn [NCB];
        int t1;
        for (int c = 0; c < NCB; c++) begin
          cn[c] = int'($urandom % NCODES);
          wr(REG_VQ, {8'(c), 8'(codes[cn[c]])});
        end
        for (int i = 0; i < total; i++) sm_old[i] = sm_new[i];
        ref_frame(cn, f == 0);
        if (f == 0) n_init++;
        wr(REG_CTL, 16'h0006);                    // Start + FrameSync
        // the host polls FrameSync until the board clears it
        do begin
          rd(REG_CTL);
          n_wait++;
        end while (r[CTL_FRAMESYNC]);
        n_frames++;
        // the frame length is measured on the board's own strobes
        t1 = frame_cycles;
        checks++;
        if (t1 != total - BASE0 + 7) begin
          failures++;
          $display("frame took %0d clocks, expected %0d", t1, total - BASE0 + 7);
        end
      end
      // End: the recognised word
      wr(REG_CTL, 16'h000A);
      do rd(REG_CTL); while (r[CTL_END]);
      rd(REG_RESULT);
      n_end++;
      best_w = 0; best_m = -1;
      for (int w = 0; w < NW; w++) begin
        int m;
        m = sm_new[base[w] + ns[w] - 1];
        if (m > best_m) begin best_m = m; best_w = w; end
      end
      checks++;
      if (int'(r[WORD_AW-1:0]) != best_w || r[15] != (best_m != 0) || int'(result_metric) != best_m) begin
        failures++;
        $display("utterance %0d: word %0d valid %0d metric %0d, expected %0d %0d", u, r[WORD_AW-1:0], r[15], result_metric, best_w, best_m);
      end
      wr(REG_CTL, 16'h0000);
    end
    checks++;
    if (wr_count != (total - BASE0) * NFRAMES * NUTT) failures++;
    $display("mechanisms: init %0d, normalised frames %0d, recirculations %0d, drops %0d, word switches %0d, end %0d, downloads %0d, minus-inf metrics %0d, frames %0d, ignored DMA cycles %0d, clipped combined output metrics %0d",
      n_init, n_norm, n_recirc, n_drop, n_word_switch, n_end, n_download, n_neg_inf, n_frames, n_dma, n_clip);
    if (n_init == 0 || (NEED_NORM && n_norm == 0) || n_recirc == 0 || n_drop == 0 || n_word_switch == 0 ||
        n_end == 0 || n_download == 0 || n_neg_inf == 0 || n_dma == 0 || (NCB > 1 && n_clip == 0)) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    done = 1;
  end

  // frame length: clocks from the frame_start strobe to frame_done
  int frame_cycles = 0, fs_cycle = 0;
  always @(posedge clk) begin
    if (rst_n && dut.frame_start) fs_cycle <= cycle;
    if (rst_n && frame_done) frame_cycles <= cycle - fs_cycle;
  end

endmodule
