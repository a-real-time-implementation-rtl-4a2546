// Testbench for elastic_storage: random shift controls and inputs are
// applied and the four registers are compared every clock with a reference
// passing list kept in the testbench (load from upstream or keep).
module tb_elastic_storage;
  import vs_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [NSLOT-1:0] shift = '0;
  smetric_t din = '0;
  smetric_t [NSLOT-1:0] q;
  smetric_t ref_q [NSLOT];
  int checks = 0, failures = 0, holds = 0, drops = 0;

  elastic_storage dut (.clk, .rst_n, .en, .shift, .din, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NSLOT; k++) ref_q[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en    = ($urandom % 8) != 0;
      shift = NSLOT'($urandom);
      din   = smetric_t'($urandom);
      @(posedge clk);
      if (en) begin
        for (int k = NSLOT - 1; k >= 0; k--) begin
          if (shift[k]) ref_q[k] = (k == 0) ? din : ref_q[k-1];
          else holds++;
          if (k > 0 && shift[k-1] && !shift[k]) drops++;
        end
      end
      #1;
      for (int k = 0; k < NSLOT; k++) begin
        checks++;
        if (q[k] !== ref_q[k]) begin
          failures++;
          if (failures < 10) $display("slot %0d: got %h expected %h", k, q[k], ref_q[k]);
        end
      end
    end
    if (holds == 0 || drops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
