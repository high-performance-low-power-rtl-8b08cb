// Division cell (DVC) of the digit-serial Montgomery multiplier.
// Computes (T + t*N) / 2^D, where t < 2^D is the unique digit that makes
// T + t*N divisible by 2^D (N odd). It is an array of D rows of full adders
// with the bits of N as one input: in each row the least significant bit of
// the carry-save value, s[0]^k[0], decides whether N is added (one
// carry-save row), after which both vectors have a zero LSB and are shifted
// right by one. After D rows the value (below 2^7) is handed out as the
// thirteen carry bits C0..C6, Cc1..Cc6: the sum vector's six low bits become
// C1..C6, the carry vector's bit 0 becomes C0 and its bits 1..5 Cc1..Cc5,
// and the weight-64 column becomes Cc6 (the OR of the two vectors' bit 6,
// which cannot both be set because the value is below 128).
// The document gives the cell's function, its full-adder array, the use of
// N's bits and the names of its outputs; the row structure, the quotient
// rule and the bit weights are this design's own. Purely combinational.
module mont_dvc
  import mont_pkg::*;
(
  input  logic [CSW-1:0] s,      // sum vector of T from the PE
  input  logic [CSW-1:0] k,      // carry vector of T from the PE
  input  logic [M-1:0]   n,      // modulus, must be odd
  output mont_carry_t    cout,   // (T + t*N) / 2^D as carry bits
  output logic [D-1:0]   t       // quotient digit, for observation
);
  logic [CSW-1:0] rs [D+1];
  logic [CSW-1:0] rk [D+1];
  logic [CSW-1:0] ns [D];
  logic [CSW-1:0] nk [D];

  assign rs[0] = s;
  assign rk[0] = k;
  for (genvar r = 0; r < D; r++) begin : g_row
    assign t[r] = rs[r][0] ^ rk[r][0];
    csa_row #(.W(CSW)) u_row (
      .x(rs[r]), .y(rk[r]), .z(CSW'(n & {M{t[r]}})), .s(ns[r]), .k(nk[r]));
    assign rs[r+1] = ns[r] >> 1;
    assign rk[r+1] = nk[r] >> 1;
  end

  assign cout.c[0]   = rk[D][0];
  assign cout.c[6:1] = rs[D][5:0];
  assign cout.cc[5:1] = rk[D][5:1];
  assign cout.cc[6]  = rs[D][6] | rk[D][6];
endmodule
