// Check of the 6x6 Montgomery multiplier, two cycles per product.
// All P and Q for N = 3 and N = 7 (the moduli the design is stated for),
// random P and Q for every other odd N from 5 to 63. Per product:
//   cycle 1: the carry record equals the exact one-digit Montgomery value;
//   cycle 2: it equals the exact two-digit value V = (P*Q + u*N)/64, the
//            quotient digit is right, V is congruent to P*Q*64^-1 mod N,
//            and res equals the compressor model applied to the record.
// It reports how often res is the exact V mod 64 and how often
// res mod N is the true Montgomery residue.
module tb_mont_mult;
  import mont_pkg::*;
  import mont_ref_pkg::*;
  logic        clk = 0, rst_n = 0, sel = 1;
  logic [5:0]  p, q, n, res;
  mont_carry_t carry;
  logic [2:0]  t;
  int checks = 0, failures = 0;
  int cycles = 0, products = 0;
  int v1, v2, u1, u2, inv64;
  int res_exact = 0, res_inexact = 0, modn_ok = 0, modn_bad = 0;
  int modn_ok_37 = 0, modn_all_37 = 0;

  mont_mult dut (.clk(clk), .rst_n(rst_n), .sel(sel), .p(p), .q(q), .n(n),
                 .res(res), .carry(carry), .t(t));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: P=%0d Q=%0d N=%0d carry=%0d res=%0d", what, p, q, n,
                 carry_val(carry.c, carry.cc), res);
    end
  endtask

  task automatic one_product(input int pi, input int qi, input int ni);
    // cycle 1
    @(negedge clk);
    sel = 1; p = 6'(pi); q = 6'(qi); n = 6'(ni);
    #1;
    v1 = mont_exact(pi, qi, ni, 1, u1);
    check("first-cycle value", carry_val(carry.c, carry.cc) == v1);
    check("first-cycle digit", int'(t) == u1);
    // cycle 2
    @(negedge clk);
    sel = 0;
    #1;
    v2 = mont_exact(pi, qi, ni, 2, u2);
    check("value", carry_val(carry.c, carry.cc) == v2);
    check("digit", int'(t) == u2);
    check("range", v2 < 128);
    inv64 = 0;
    for (int i = 1; i < ni; i++) if ((64 * i) % ni == 0 || (64 * i) % ni == 1) begin
      if ((64 * i) % ni == 1) begin inv64 = i; break; end
    end
    check("congruence", (v2 % ni) == (pi * qi * inv64) % ni);
    check("result", res == compress_ref(carry.c, carry.cc[5:1]));
    check("result model", res == mont_prod_ref(pi, qi, ni));
    if (int'(res) == v2 % 64) res_exact++; else res_inexact++;
    if (int'(res) % ni == (pi * qi * inv64) % ni) modn_ok++; else modn_bad++;
    if (ni == 3 || ni == 7) begin
      modn_all_37++;
      if (int'(res) % ni == (pi * qi * inv64) % ni) modn_ok_37++;
    end
    products++;
  endtask

  initial begin
    int c0;
    p = 0; q = 0; n = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c0 = cycles;
    for (int pi = 0; pi < 64; pi++)
      for (int qi = 0; qi < 64; qi++) begin
        one_product(pi, qi, 3);
        one_product(pi, qi, 7);
      end
    // two cycles per product
    check("rate", cycles - c0 == 2 * products);
    for (int ni = 5; ni < 64; ni += 2)
      for (int r = 0; r < 200; r++)
        one_product(int'($urandom_range(0, 63)), int'($urandom_range(0, 63)), ni);
    $display("products=%0d res==V mod 64: %0d, approximate: %0d", products, res_exact, res_inexact);
    $display("res congruent mod N: %0d of %0d (N=3,7: %0d of %0d)", modn_ok,
             modn_ok + modn_bad, modn_ok_37, modn_all_37);
    check("approximate compressor case seen", res_inexact > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
