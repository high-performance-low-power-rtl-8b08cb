// One row of full adders used as a 3:2 carry-save adder on W-bit vectors:
// s[i] = sum and k[i+1] = carry of the full adder at bit i, k[0] = 0, so
// x + y + z = s + k. The carry out of the top bit is dropped; every use in
// this design keeps the total below 2^W, so nothing is lost.
// Helper of the processing element and the division cell, combinational.
module csa_row #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] k
);
  logic [W:0] carry;
  assign carry[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .sum(s[i]), .carry(carry[i+1]));
  end
  assign k = carry[W-1:0];
endmodule
