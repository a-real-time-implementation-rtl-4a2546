// Testbench for board_ram: random lane writes and reads on a small
// instance, compared with a reference array; checks the one-clock read
// latency and that a read in the same clock as a write returns old data.
module tb_board_ram;
  logic clk = 0;
  logic [1:0] we = '0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic re = 0;
  logic [15:0] ref_mem [64];
  int checks = 0, failures = 0;

  board_ram #(.AW(6), .DW(16), .NLANE(2)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 2'b11; waddr = 6'(i); wdata = 16'($urandom);
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] exp;
      @(negedge clk);
      we    = 2'($urandom);
      waddr = 6'($urandom);
      wdata = 16'($urandom);
      re    = 1;
      raddr = ($urandom % 4 == 0) ? waddr : 6'($urandom);
      exp   = ref_mem[raddr];
      if (we[0]) ref_mem[waddr][7:0]  = wdata[7:0];
      if (we[1]) ref_mem[waddr][15:8] = wdata[15:8];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h expected %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
