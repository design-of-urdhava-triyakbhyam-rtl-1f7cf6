// Full adder: adds three bits, giving sum s = a XOR b XOR ci and carry
// co = majority(a, b, ci). Purely combinational. Seven of these sit in each
// 4x4 Vedic multiplier; the gate form is the textbook one, since the full
// adder is only named, not drawn.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
