// Exact full adder: sum = a ^ b ^ cin, carry = majority(a, b, cin).
// The document builds the adder network of the processing element, the
// division array and the carry-forward adder of the FIR filter from full
// adders without drawing them; this is the standard exact cell (the
// approximate "modified" cell is used only inside the compressor, see mfa).
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ cin;
  assign carry = (a & b) | (a & cin) | (b & cin);
endmodule
