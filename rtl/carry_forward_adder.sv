// Carry-forward adder of the FIR filter: a 6-bit ripple-carry adder made of
// a half adder on bit 0 and full adders above it, each carry passed on to
// the next stage. It adds a multiplier output and a delay-register output
// and returns a 6-bit sum; the carry out of bit 5 is dropped, so the sum is
// modulo 64, as the document's 6-bit adder output implies. `ovf` reports that
// dropped carry for observation. Purely combinational.
module carry_forward_adder #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             ovf
);
  logic [WIDTH:1] carry;

  half_adder u_ha (.a(a[0]), .b(b[0]), .sum(sum[0]), .carry(carry[1]));
  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .carry(carry[i+1]));
  end
  assign ovf = carry[WIDTH];
endmodule
