// Processing element (PE) of the digit-serial Montgomery multiplier.
// Adds the D partial products p_j*q_i of one multiplier digit to the running
// value carried over from the previous cycle: T = V + P*Qd. An AND network
// forms the three partial-product rows P&q0, (P&q1)<<1, (P&q2)<<2 and an
// adder network of full adders (three carry-save rows) reduces them,
// together with the two vectors of the incoming carry record, to a sum
// vector and a carry vector with s + k = T exactly.
// The document gives the PE's function (AND network plus adder network,
// carries zero in the first cycle) but not its wiring; the carry-save tree
// and its width CSW are this design's choices. The caller zeroes cin in the
// first cycle. Purely combinational.
module mont_pe
  import mont_pkg::*;
(
  input  logic [M-1:0]   p,     // multiplicand
  input  logic [D-1:0]   qd,    // current multiplier digit
  input  mont_carry_t    cin,   // running value from the carry flip-flops
  output logic [CSW-1:0] s,     // sum vector of T
  output logic [CSW-1:0] k      // carry vector of T
);
  logic [CSW-1:0] va, vb;                 // the carry record as two vectors
  logic [CSW-1:0] pp [D];                 // AND network rows
  logic [CSW-1:0] rs [D+1];
  logic [CSW-1:0] rk [D+1];

  assign va = CSW'(cin.c[6:1]);
  assign vb = CSW'({cin.cc, cin.c[0]});

  for (genvar i = 0; i < D; i++) begin : g_and
    assign pp[i] = CSW'(p & {M{qd[i]}}) << i;
  end

  // Adder network: start from the carry record, add one row per digit bit.
  assign rs[0] = va;
  assign rk[0] = vb;
  for (genvar i = 0; i < D; i++) begin : g_add
    csa_row #(.W(CSW)) u_row (.x(rs[i]), .y(rk[i]), .z(pp[i]), .s(rs[i+1]), .k(rk[i+1]));
  end

  assign s = rs[D];
  assign k = rk[D];
endmodule
