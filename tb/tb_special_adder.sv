// Self-checking testbench for special_adder: applies all sixteen input
// combinations and compares {c1, c0, sum} with the number of inputs that are 1,
// and sum with the four-input XOR.
module tb_special_adder;
  logic a, b, c, d, sum, c0, c1;
  int checks = 0, failures = 0;

  special_adder dut (.a(a), .b(b), .c(c), .d(d), .sum(sum), .c0(c0), .c1(c1));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if ({c1, c0, sum} != 3'($countones(4'(i)))) begin
        failures++;
        $display("FAIL abcd=%04b -> c1=%0b c0=%0b sum=%0b", 4'(i), c1, c0, sum);
      end
      checks++;
      if (sum != (a ^ b ^ c ^ d)) begin
        failures++;
        $display("FAIL sum is not the XOR of abcd=%04b", 4'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
