// Modified Montgomery multiplier, 6 x 6 bits, digit-serial with 3-bit digits.
// Computes a 6-bit result congruent to P*Q*2^-6 mod N (N odd) in two clock
// cycles. Processing element -> division cell -> Astute compressor, with the
// division cell's thirteen carry bits held in D flip-flops (two 6-bit and one
// single) and fed back to the processing element.
//
// Timing, driven by the caller through sel:
//   cycle 1 (sel = 1): digit q2..q0 is used and the PE's carry inputs are
//                      zero; the carry flip-flops load the cell's output.
//   cycle 2 (sel = 0): digit q5..q3 and the stored carries are used; the
//                      compressor output `res` is the product during this
//                      cycle (combinational from the flip-flops and inputs).
// P, Q and N must be held for both cycles. `carry` and `t` expose the carry
// record and the quotient digit of the current cycle for observation.
//
// The exact Montgomery value (P*Q + u*N)/64 is at most 124 and is carried
// exactly in `carry`; `res` is that value modulo 64 as produced by the
// approximate compressor. No final subtraction is made, as in the document,
// so res is not reduced below N. The document states the multiplier for odd
// N (results given for N = 3 and 7); an assertion checks that N is odd.
// Block structure, cycle scheme, multiplexer select polarity and flip-flop
// split follow the document; the PE and division-cell insides are this
// design's own.
module mont_mult
  import mont_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,     // 1: first cycle of a product, 0: second
  input  logic [M-1:0] p,       // multiplicand
  input  logic [M-1:0] q,       // multiplier
  input  logic [M-1:0] n,       // modulus (odd)
  output logic [M-1:0] res,     // product, valid while sel = 0
  output mont_carry_t  carry,   // division cell output of this cycle
  output logic [D-1:0] t        // quotient digit of this cycle
);
  logic [D-1:0]   qd;
  mont_carry_t    fb_q;         // carry flip-flop outputs
  mont_carry_t    pe_cin;
  logic [CSW-1:0] pe_s, pe_k;

  digit_mux u_mux (.sel(sel), .q(q), .qd(qd));

  // First cycle: all carry inputs of the PE are zero.
  assign pe_cin = sel ? '0 : fb_q;

  mont_pe  u_pe  (.p(p), .qd(qd), .cin(pe_cin), .s(pe_s), .k(pe_k));
  mont_dvc u_dvc (.s(pe_s), .k(pe_k), .n(n), .cout(carry), .t(t));

  // Carry flip-flops: C6..C1, Cc6..Cc1 and C0.
  dreg #(.WIDTH(6)) u_ff_c  (.clk(clk), .rst_n(rst_n), .en(1'b1), .d(carry.c[6:1]), .q(fb_q.c[6:1]));
  dreg #(.WIDTH(6)) u_ff_cc (.clk(clk), .rst_n(rst_n), .en(1'b1), .d(carry.cc),     .q(fb_q.cc));
  dreg #(.WIDTH(1)) u_ff_c0 (.clk(clk), .rst_n(rst_n), .en(1'b1), .d(carry.c[0]),   .q(fb_q.c[0]));

  astute_compressor u_cmp (.c(carry.c), .cc(carry.cc[5:1]), .o(res));

  a_n_odd: assert property (@(posedge clk) disable iff (!rst_n) n[0])
    else $error("mont_mult: modulus N must be odd");
endmodule
