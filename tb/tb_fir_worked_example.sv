// Worked-example testbench for fir_vedic at its default parameters.
//
// Coefficients h0..h4 = 101, 100, 011, 010, 001 and a constant input 0001.
// Once the delay line is full (four clock edges after reset) every tap holds
// the sample 1, so the tap products must be m1..m5 = 5, 4, 3, 2, 1, the
// adder chain must hold the partial sums d1 = 9, d2 = 12, d3 = 14, and the
// output must be y = 15 (0000000000001111). The internal products and sums
// are read through hierarchical references to the multiplier outputs and
// the adder chain. The testbench also checks that the output is not yet 15
// before the fourth edge.
module tb_fir_worked_example;
  import fir_pkg::*;
  localparam int TAPS = 5;

  logic              clk;
  logic              rst;
  sample_t           x;
  coef_t [TAPS-1:0]  h;
  logic  [15:0]      y;

  int checks = 0, failures = 0;

  fir_vedic dut (.clk(clk), .rst(rst), .x(x), .h(h), .y(y));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    static int m_want [TAPS]   = '{5, 4, 3, 2, 1};
    static int d_want [TAPS-1] = '{9, 12, 14, 15};
    rst = 1'b1;
    x   = '0;
    h   = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    h = {4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101};   // h4..h0
    x = 4'b0001;
    for (int e = 0; e < 4; e++) begin
      #3;
      checks++;
      if (y == 16'd15) begin
        failures++;
        $display("FAIL output already 15 after %0d edges", e);
      end
      @(posedge clk);
      #1;
    end
    #3;
    expect_eq("m1", int'(dut.g_tap[0].u_mul.t), m_want[0]);
    expect_eq("m2", int'(dut.g_tap[1].u_mul.t), m_want[1]);
    expect_eq("m3", int'(dut.g_tap[2].u_mul.t), m_want[2]);
    expect_eq("m4", int'(dut.g_tap[3].u_mul.t), m_want[3]);
    expect_eq("m5", int'(dut.g_tap[4].u_mul.t), m_want[4]);
    for (int k = 1; k < TAPS; k++)
      expect_eq($sformatf("d%0d", k), int'(dut.acc[k]), d_want[k-1]);
    checks++;
    if (y != 16'b0000_0000_0000_1111) begin
      failures++;
      $display("FAIL y = %016b, expected 0000000000001111", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
