// 12:6 Astute compressor: turns the division cell's carry bits into the
// 6-bit product of the Montgomery multiplier.
// A half adder adds C0 and C1 and gives O1 (the LSB); then a chain of
// modified full adders adds C(k+1), Cc(k) and the carry of the previous
// stage to give O(k+1) for k = 1..4; the last stage (C6, Cc5, carry) keeps
// only its 3-input XOR, its carry being dropped, giving O6 (the MSB). Cc6
// is not an input. The structure, input names and pairing follow the
// document's drawing of the compressor. Because the MFA carry is wrong for
// one input combination, the result equals the sum of its inputs modulo 64
// only when that combination does not reach a stage's carry.
// In each MFA, Ck+1 is input a, Cck input b (the direct AND input) and the
// incoming carry input c; that assignment is this design's reading.
// Purely combinational.
module astute_compressor
  import mont_pkg::*;
(
  input  logic [6:0] c,     // C6..C0
  input  logic [5:1] cc,    // Cc5..Cc1
  output logic [6:1] o      // O6..O1, O1 is the LSB
);
  logic [5:1] carry;        // carry leaving stage k

  half_adder u_ha (.a(c[0]), .b(c[1]), .sum(o[1]), .carry(carry[1]));
  for (genvar k = 1; k <= 4; k++) begin : g_mfa
    mfa u_mfa (.a(c[k+1]), .b(cc[k]), .c(carry[k]), .sum(o[k+1]), .carry(carry[k+1]));
  end
  // Final stage: sum part only.
  assign o[6] = c[6] ^ cc[5] ^ carry[5];
endmodule
