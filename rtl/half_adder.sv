// Half adder: adds two bits, giving sum s = a XOR b and carry c = a AND b.
// Purely combinational. Two of these sit in each 4x4 Vedic multiplier; the
// gate form is the textbook one, since the half adder is only named, not drawn.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
