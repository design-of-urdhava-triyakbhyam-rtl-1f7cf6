// Five-tap direct-form FIR filter whose tap multipliers are 4x4-bit Vedic
// (Urdhva Tiryakbhyam) multipliers.
//
//   y(n) = h0*x(n) + h1*x(n-1) + h2*x(n-2) + h3*x(n-3) + h4*x(n-4)
//
// Structure: a shift register of TAPS-1 delay elements (d11..d14) holds the
// past samples; tap k multiplies its sample by h[k] in a vedic_mul4 (products
// m1..m5); a chain of adders accumulates the products (d1..d4), and the last
// sum is y. Samples and coefficients are 4-bit unsigned; products are 8 bits;
// y is Y_W bits wide, 16 by default, which cannot overflow for five taps
// (5 x 225 = 1125 < 2^11); its top bits are therefore always zero and a
// synthesis tool will report them as constant.
//
// Timing: the delay line shifts on every rising clock edge; multipliers and
// adders are combinational, so y reflects the present x and the stored
// samples without a clock of latency. After reset the delay line holds zeros,
// so a constant input reaches its steady-state sum after TAPS-1 clock edges.
//
// Interface: clk, synchronous active-high rst (clears the delay line), x,
// coefficient array h[0..TAPS-1], output y. The direct form, the delay-line
// and adder names and the five taps follow the published filter; the reset,
// the combinational output and the output width of 16 bits are choices of
// this design.
module fir_vedic
  import fir_pkg::*;
#(
  parameter int unsigned TAPS = 5,
  parameter int unsigned Y_W  = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  sample_t            x,
  input  coef_t [TAPS-1:0]   h,
  output logic  [Y_W-1:0]    y
);
  if (TAPS < 2) begin : g_bad_taps
    $error("fir_vedic needs TAPS >= 2");
  end

  // tap[0] = x(n); tap[k] = x(n-k) for k >= 1 (the registers d11..d14)
  sample_t [TAPS-1:0] tap;
  sample_t [TAPS-1:1] dly;

  always_ff @(posedge clk) begin
    if (rst) dly <= '0;
    else begin
      dly[1] <= x;
      for (int k = 2; k < TAPS; k++) dly[k] <= dly[k-1];
    end
  end

  always_comb begin
    tap[0] = x;
    for (int k = 1; k < TAPS; k++) tap[k] = dly[k];
  end

  // Tap products m1..m5
  prod_t [TAPS-1:0] m;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    vedic_mul4 u_mul (.u(tap[k]), .v(h[k]), .t(m[k]));
  end

  // Adder chain d1..d4: acc[k] = m[0] + ... + m[k]
  logic [Y_W-1:0] acc [TAPS];

  always_comb begin
    acc[0] = Y_W'(m[0]);
    for (int k = 1; k < TAPS; k++) acc[k] = acc[k-1] + Y_W'(m[k]);
  end

  assign y = acc[TAPS-1];
endmodule
