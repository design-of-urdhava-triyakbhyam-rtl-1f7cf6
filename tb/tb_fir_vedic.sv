// End-to-end self-checking testbench for fir_vedic at its default parameters
// (five taps, 16-bit output).
//
// 1. Worked example: coefficients 5, 4, 3, 2, 1 and a constant input 0001
//    after reset. The output must step through the running sums 5, 9, 12, 14
//    and settle at 15 exactly four clock edges after reset, then stay there.
// 2. Full scale: every sample and coefficient 15; the output must reach
//    5 x 225 = 1125 without wrapping.
// 3. A random stream with random coefficients (changed now and then), checked
//    every cycle against a reference model that keeps its own sample history
//    and multiplies with integer arithmetic. Resets are applied at random
//    points and must clear the history.
// Inputs change 1 ns after a rising edge; outputs are checked 4 ns later,
// well before the next rising edge. Counts of resets, coefficient changes, full-scale outputs and
// delay-line fills are printed, and a mechanism that never happened counts as
// a failure.
module tb_fir_vedic;
  import fir_pkg::*;
  localparam int TAPS = 5;

  logic              clk;
  logic              rst;
  sample_t           x;
  coef_t [TAPS-1:0]  h;
  logic  [15:0]      y;

  int checks = 0, failures = 0;
  int n_reset = 0, n_coef_change = 0, n_full_scale = 0, n_fill = 0;

  // reference history: hist[k] = x(n-k) for k >= 1
  int hist [TAPS];
  int since_reset;

  fir_vedic dut (.clk(clk), .rst(rst), .x(x), .h(h), .y(y));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_y();
    int acc = int'(h[0]) * int'(x);
    for (int k = 1; k < TAPS; k++) acc += int'(h[k]) * hist[k];
    return acc;
  endfunction

  // Check y against the model, then clock once and update the model.
  task automatic step();
    int exp_y;
    #4;
    exp_y = model_y();
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      $display("FAIL t=%0t rst=%0b x=%0d y=%0d expected %0d", $time, rst, x, y, exp_y);
    end
    if (exp_y == TAPS * 225) n_full_scale++;
    @(posedge clk);
    if (rst) begin
      for (int k = 1; k < TAPS; k++) hist[k] = 0;
      since_reset = 0;
      n_reset++;
    end else begin
      for (int k = TAPS - 1; k >= 2; k--) hist[k] = hist[k-1];
      hist[1] = int'(x);
      since_reset++;
      if (since_reset == TAPS - 1) n_fill++;
    end
    #1;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    step();
    rst = 1'b0;
  endtask

  initial begin
    static int expect_seq [5] = '{5, 9, 12, 14, 15};
    int exp_y;
    rst = 1'b1;
    x   = '0;
    h   = '0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    since_reset = 0;
    @(posedge clk);
    #1;
    do_reset();

    // 1. worked example
    h = {4'd1, 4'd2, 4'd3, 4'd4, 4'd5};   // h4..h0
    x = 4'b0001;
    for (int i = 0; i < 8; i++) begin
      exp_y = expect_seq[i < 4 ? i : 4];
      #3;
      checks++;
      if (int'(y) != exp_y) begin
        failures++;
        $display("FAIL example: %0d edges after reset y=%0d, expected %0d", i, y, exp_y);
      end
      step();
    end

    // 2. full scale
    h = {TAPS{4'hF}};
    x = 4'hF;
    n_coef_change++;
    for (int i = 0; i < 6; i++) step();
    checks++;
    if (y != 16'd1125) begin
      failures++;
      $display("FAIL full scale gave %0d", y);
    end

    // 3. random stream
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(99) == 0) begin
        h = (TAPS * COEF_W)'($urandom);
        n_coef_change++;
      end
      x = sample_t'($urandom);
      if ($urandom_range(499) == 0) do_reset();
      else step();
    end

    $display("mechanisms: resets=%0d coefficient_changes=%0d full_scale=%0d delay_line_fills=%0d",
             n_reset, n_coef_change, n_full_scale, n_fill);
    if (n_reset < 2)       begin failures++; $display("FAIL no reset during the stream"); end
    if (n_coef_change < 2) begin failures++; $display("FAIL coefficients never changed"); end
    if (n_full_scale == 0) begin failures++; $display("FAIL full scale never reached"); end
    if (n_fill < 2)        begin failures++; $display("FAIL delay line never refilled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
