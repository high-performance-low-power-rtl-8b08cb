// Modified full adder (MFA) of the 12:6 Astute compressor.
// Sum is the 3-input XOR of a, b and c. Carry is b AND (a OR c): one XOR,
// one 2-input OR and one 2-input AND instead of a majority gate. This carry
// equals the majority of the inputs for every combination except
// a,b,c = 1,0,1, where it gives 0 instead of 1 - the one failing input the
// document states for this cell. Which input enters the AND gate directly
// (b) is chosen so that exactly that combination fails.
// Purely combinational.
module mfa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic a_or_c;
  assign sum    = a ^ b ^ c;
  assign a_or_c = a | c;
  assign carry  = b & a_or_c;
endmodule
