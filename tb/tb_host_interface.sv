// Testbench for host_interface: register writes and reads through the bus
// strobes. Checks CTLPORT reset value, gated download with address
// auto-increment and memory select, the FrameSync -> frame_go handshake
// (one pulse, first-frame flag after Start rises, cleared on frame_done),
// End -> end_req only when idle, and the status/result read-back.
module tb_host_interface;
  import vs_pkg::*;

  logic clk = 0, rst_n = 0, io_wr = 0;
  logic [2:0] io_addr = '0;
  logic [15:0] io_wdata = '0, io_rdata;
  logic dl_we;
  mem_sel_t dl_mem;
  logic [27:0] dl_addr;
  logic [15:0] dl_data;
  logic [VQ_W-1:0] vq;
  logic [WORD_AW:0] nwords;
  logic frame_go, frame_init, end_req;
  logic busy = 0, frame_done = 0, result_valid = 0;
  logic [WORD_AW-1:0] result_word = '0;
  int checks = 0, failures = 0, go_count = 0, dl_count = 0, end_count = 0;

  host_interface dut (.clk, .rst_n, .io_addr, .io_wr, .io_wdata, .io_rdata,
    .dl_we, .dl_mem, .dl_addr, .dl_data, .vq, .nwords, .frame_go, .frame_init, .end_req,
    .busy, .frame_done, .result_valid, .result_word);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input reg_t a, input logic [15:0] d);
    @(negedge clk);
    io_addr = a; io_wdata = d; io_wr = 1;
    @(negedge clk);
    io_wr = 0;
  endtask

  logic [15:0] r;
  task automatic rd(input reg_t a);
    io_addr = a;
    #1;
    r = io_rdata;
  endtask

  always @(posedge clk) begin
    if (rst_n && frame_go) go_count++;
    if (rst_n && end_req) end_count++;
  end

  initial begin
    int inits;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rd(REG_CTL);
    check(r == 0, "CTLPORT resets to 0");
    // download disabled: no writes
    wr(REG_ADDR_LO, 16'h1234);
    wr(REG_ADDR_HI, {2'(MEM_B), 2'b0, 12'h005});
    fork
      begin
        wr(REG_DATA, 16'h00AA);
      end
      begin
        @(posedge clk); #1;
        check(!dl_we, "no download while Download is 0");
      end
    join
    // enable download and send a block
    wr(REG_CTL, 16'h0001);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      io_addr = REG_DATA; io_wdata = 16'(i * 3 + 1); io_wr = 1;
      #1;
      check(dl_we && dl_mem == MEM_B && dl_addr == 28'h0051234 + 28'(i) && dl_data == 16'(i * 3 + 1), "download write");
      if (dl_we) dl_count++;
      @(negedge clk);
      io_wr = 0;
    end
    wr(REG_CTL, 16'h0000);
    wr(REG_VQ, 16'h0037);
    wr(REG_NWORDS, 16'd100);
    check(vq == 8'h37 && nwords == 12'd100, "VQ and word count registers");
    // FrameSync without Start is dropped
    wr(REG_CTL, 16'h0004);
    repeat (2) @(negedge clk);
    rd(REG_CTL);
    check(go_count == 0 && r == 0, $sformatf("FrameSync ignored without Start %0d %h", go_count, r));
    // Start + FrameSync: first frame
    inits = 0;
    for (int f = 0; f < 3; f++) begin
      int n0;
      n0 = go_count;
      wr(REG_CTL, 16'h0006);
      @(negedge clk);
      check(go_count == n0 + 1, "one frame_go per FrameSync");
      busy = 1;
      repeat (5) @(negedge clk);
      check(go_count == n0 + 1, "no repeated frame_go while running");
      rd(REG_CTL);
      check(r == 16'h0006, "FrameSync held while frame runs");
      rd(REG_STATUS);
      check(r[0], "status busy");
      // End while busy must wait
      if (f == 2) begin
        wr(REG_CTL, 16'h000E);
        repeat (3) @(negedge clk);
        check(end_count == 0, "End waits for the frame");
      end
      busy = 0;
      @(negedge clk);
      frame_done = 1;
      @(negedge clk);
      frame_done = 0;
      repeat (2) @(negedge clk);
      rd(REG_CTL);
      check((r & 16'h4) == 0, "FrameSync cleared at frame end");
    end
    check(end_count == 1, "End pulses once after FrameSync cleared");
    rd(REG_CTL);
    check((r & 16'h8) == 0, "End cleared");
    rd(REG_STATUS);
    check((r & 16'h4) != 0, "new utterance pending after End");
    result_valid = 1; result_word = 11'd77;
    rd(REG_RESULT);
    check(r == 16'h804D, "result register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame_init accompanies the first frame_go after Start rises
  int first_seen = 0;
  always @(posedge clk) if (rst_n && frame_go) begin
    checks++;
    if (frame_init != (first_seen == 0)) begin failures++; $display("frame_init %0d at go %0d", frame_init, first_seen); end
    first_seen++;
  end
endmodule
