// Check of the division cell: for random carry-save inputs T = s + k in the
// range the PE produces (0..567) and every odd modulus N, the quotient digit
// must be the unique t in 0..7 with T + t*N divisible by 8, and the thirteen
// output carry bits must hold exactly (T + t*N) / 8.
module tb_mont_dvc;
  import mont_pkg::*;
  import mont_ref_pkg::*;
  logic [9:0]  s, k;
  logic [5:0]  n;
  mont_carry_t cout;
  logic [2:0]  t;
  int checks = 0, failures = 0;
  int tt, u, expv;

  mont_dvc dut (.s(s), .k(k), .n(n), .cout(cout), .t(t));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ni = 1; ni < 64; ni += 2)
      for (int r = 0; r < 400; r++) begin
        tt = (r < 8) ? r * 70 + 7 : int'($urandom_range(0, 567));
        s  = 10'($urandom_range(0, tt));
        k  = 10'(tt - int'(s));
        n  = 6'(ni);
        #1;
        u = -1;
        for (int c = 0; c < 8; c++) if (((tt + c * ni) % 8) == 0 && u < 0) u = c;
        expv = (tt + u * ni) / 8;
        checks += 2;
        if (int'(t) != u) begin
          failures++;
          if (failures < 10) $display("FAIL T=%0d N=%0d t=%0d expected %0d", tt, ni, t, u);
        end
        if (carry_val(cout.c, cout.cc) != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL T=%0d N=%0d value=%0d expected %0d", tt, ni,
                     carry_val(cout.c, cout.cc), expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
