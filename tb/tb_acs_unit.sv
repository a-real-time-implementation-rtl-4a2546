// Testbench for acs_unit: random slot metrics (including minus infinity and
// large values), transition and output metrics and valid masks; the result
// is compared with the maximum worked out in the testbench.
module tb_acs_unit;
  import vs_pkg::*;

  smetric_t [NSLOT-1:0] s;
  tmetric_t [NSLOT-1:0] a;
  ometric_t [NSLOT-1:0] b;
  logic [NSLOT-1:0] valid;
  smetric_t smax;
  int checks = 0, failures = 0;

  acs_unit dut (.s, .a, .b, .valid, .smax);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int best;
      for (int k = 0; k < NSLOT; k++) begin
        case ($urandom % 4)
          0: s[k] = '0;
          1: s[k] = smetric_t'(32768 + $urandom % 500);
          default: s[k] = smetric_t'($urandom % 32768);
        endcase
        a[k] = tmetric_t'($urandom);
        b[k] = ometric_t'($urandom);
      end
      valid = NSLOT'($urandom);
      best = 0;
      for (int k = 0; k < NSLOT; k++)
        if (valid[k] && s[k] != 0 && int'(s[k]) + int'(a[k]) + int'(b[k]) > best)
          best = int'(s[k]) + int'(a[k]) + int'(b[k]);
      #1;
      checks++;
      if (int'(smax) != best) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d", smax, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
