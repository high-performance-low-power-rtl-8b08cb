// Half adder: sum = a XOR b, carry = a AND b.
// Used as the first stage of the 12:6 Astute compressor (on C0 and C1) and
// as the least significant stage of the carry-forward adder, both as the
// document describes. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
