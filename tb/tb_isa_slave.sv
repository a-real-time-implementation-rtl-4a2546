// Testbench for isa_slave: random I/O write cycles to the board's ports,
// to other ports and during DMA (AEN) are applied with random strobe
// lengths; exactly the board's writes must produce one io_wr strobe each
// with the right offset and data. Read cycles must enable the data driver
// only for the board's ports and return the register data of the live
// address.
module tb_isa_slave;
  logic clk = 0, rst_n = 0, aen = 0, iow_n = 1, ior_n = 1;
  logic [9:0] sa = '0;
  logic [15:0] sd_in = '0, sd_out, io_wdata, io_rdata;
  logic sd_oe, io_wr;
  logic [2:0] io_addr;
  int checks = 0, failures = 0, hits = 0, misses = 0;
  int exp_addr [$], exp_data [$];

  isa_slave #(.BASE_ADDR(10'h300)) dut (.clk, .rst_n, .sa, .aen, .iow_n, .ior_n, .sd_in,
    .sd_out, .sd_oe, .io_addr, .io_wr, .io_wdata, .io_rdata);

  // register file model behind the slave
  assign io_rdata = {13'h1A5, io_addr};

  always #50 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && io_wr) begin
      checks++;
      if (exp_addr.size() == 0) begin
        failures++;
        $display("unexpected write");
      end else begin
        int a, d;
        a = exp_addr.pop_front(); d = exp_data.pop_front();
        if (int'(io_addr) != a || int'(io_wdata) != d) begin
          failures++;
          $display("write %0d/%h expected %0d/%h", io_addr, io_wdata, a, d);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      bit mine, dma;
      int len;
      @(negedge clk);
      mine = ($urandom % 4) != 0;
      dma  = ($urandom % 8) == 0;
      sa   = mine ? 10'h300 + 10'($urandom % 16) : 10'($urandom);
      if (sa[9:4] == 6'h30) mine = 1;
      aen  = dma;
      len  = 3 + $urandom % 5;
      if ($urandom % 2) begin
        sd_in = 16'($urandom);
        if (mine && !dma) begin
          exp_addr.push_back(int'(sa[3:1]));
          exp_data.push_back(int'(sd_in));
          hits++;
        end else misses++;
        iow_n = 0;
        repeat (len) @(negedge clk);
        iow_n = 1;
      end else begin
        ior_n = 0;
        repeat (len) @(negedge clk);
        checks++;
        if (sd_oe != (mine && !dma) || (sd_oe && sd_out != {13'h1A5, sa[3:1]})) begin
          failures++;
          $display("read at %h aen %0d: oe %0d data %h", sa, aen, sd_oe, sd_out);
        end
        ior_n = 1;
      end
      repeat (2 + $urandom % 3) @(negedge clk);
      aen = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_addr.size() != 0 || hits == 0 || misses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
