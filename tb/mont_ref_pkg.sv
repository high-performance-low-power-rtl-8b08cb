// Reference models for the Montgomery multiplier testbenches.
// Written from the arithmetic, not from the RTL modules:
//   mfa_carry_ref  - carry of the modified full adder from its stated truth
//                    table: majority of a, b, c except that 1,0,1 gives 0.
//   compress_ref   - 12:6 compressor: half adder on C0, C1, then stages on
//                    (C(k+1), Cck, carry), last stage sum only.
//   mont_exact     - digit-serial Montgomery value on integers: for each
//                    3-bit digit, V = (V + P*digit + u*N) / 8 with the unique
//                    u in 0..7 that makes the division exact.
//   mont_split     - the same computation in carry-save form, giving the
//                    thirteen carry bits C0..C6, Cc1..Cc6 the multiplier
//                    hands to its compressor.
package mont_ref_pkg;

  function automatic bit mfa_carry_ref(bit a, bit b, bit c);
    int ones = int'(a) + int'(b) + int'(c);
    if ({a, b, c} == 3'b101) return 1'b0;
    return ones >= 2;
  endfunction

  function automatic bit [5:0] compress_ref(bit [6:0] c, bit [5:1] cc);
    bit [5:0] o;
    bit cy;
    o[0] = c[0] ^ c[1];
    cy   = c[0] & c[1];
    for (int k = 1; k <= 4; k++) begin
      o[k] = c[k+1] ^ cc[k] ^ cy;
      cy   = mfa_carry_ref(c[k+1], cc[k], cy);
    end
    o[5] = c[6] ^ cc[5] ^ cy;
    return o;
  endfunction

  // Value of thirteen carry bits: C0 + C[6:1] + 2*Cc[6:1].
  function automatic int carry_val(bit [6:0] c, bit [6:1] cc);
    return int'(c[0]) + int'(c[6:1]) + 2 * int'(cc);
  endfunction

  // Returns V after `digits` digits (1 or 2); also the last quotient digit.
  function automatic int mont_exact(int p, int q, int n, int digits, output int u_last);
    int v = 0;
    u_last = 0;
    for (int i = 0; i < digits; i++) begin
      int tt = v + p * ((q >> (3 * i)) & 7);
      for (int u = 0; u < 8; u++)
        if (((tt + u * n) % 8) == 0) begin
          u_last = u;
          break;
        end
      v = (tt + u_last * n) / 8;
    end
    return v;
  endfunction

  function automatic void csa3(inout bit [9:0] s, inout bit [9:0] k, input bit [9:0] z);
    bit [9:0] ns = s ^ k ^ z;
    bit [9:0] nk = ((s & k) | (s & z) | (k & z)) << 1;
    s = ns;
    k = nk;
  endfunction

  function automatic void mont_split(int p, int q, int n, int digits,
                                     output bit [6:0] c, output bit [6:1] cc);
    bit [9:0] s, k;
    c  = '0;
    cc = '0;
    for (int i = 0; i < digits; i++) begin
      bit [2:0] dg = 3'((q >> (3 * i)) & 7);
      s = 10'(c[6:1]);
      k = 10'({cc, c[0]});
      for (int j = 0; j < 3; j++)
        csa3(s, k, dg[j] ? 10'(p) << j : 10'd0);
      for (int r = 0; r < 3; r++) begin
        bit tb = s[0] ^ k[0];
        csa3(s, k, tb ? 10'(n) : 10'd0);
        s = s >> 1;
        k = k >> 1;
      end
      c[0]    = k[0];
      c[6:1]  = s[5:0];
      cc[5:1] = k[5:1];
      cc[6]   = s[6] | k[6];
    end
  endfunction

  // Product the multiplier returns for P, Q, N.
  function automatic bit [5:0] mont_prod_ref(int p, int q, int n);
    bit [6:0] c;
    bit [6:1] cc;
    mont_split(p, q, n, 2, c, cc);
    return compress_ref(c, cc[5:1]);
  endfunction

endpackage
