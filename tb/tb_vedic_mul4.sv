// Self-checking testbench for vedic_mul4. It first applies the worked example
// 0001 x 0010 = 0000010, then every one of the 256 operand pairs, comparing
// the product with integer multiplication.
module tb_vedic_mul4;
  import fir_pkg::*;
  sample_t u;
  coef_t   v;
  prod_t   t;
  int checks = 0, failures = 0;

  vedic_mul4 dut (.u(u), .v(v), .t(t));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u = 4'b0001;
    v = 4'b0010;
    #1;
    checks++;
    if (t != 8'b0000_0010) begin
      failures++;
      $display("FAIL example 0001 x 0010 gave %08b", t);
    end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        u = 4'(i);
        v = 4'(j);
        #1;
        checks++;
        if (int'(t) != i * j) begin
          failures++;
          $display("FAIL %0d x %0d gave %0d", i, j, t);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
