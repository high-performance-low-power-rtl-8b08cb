// Check of the processing element: for every multiplicand and digit and
// random carry records, the sum and carry vectors must add up exactly (as
// integers) to the record's value plus P times the digit.
module tb_mont_pe;
  import mont_pkg::*;
  import mont_ref_pkg::*;
  logic [5:0]  p;
  logic [2:0]  qd;
  mont_carry_t cin;
  logic [9:0]  s, k;
  int checks = 0, failures = 0;
  int expv;

  mont_pe dut (.p(p), .qd(qd), .cin(cin), .s(s), .k(k));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pi = 0; pi < 64; pi++)
      for (int di = 0; di < 8; di++)
        for (int r = 0; r < 40; r++) begin
          p   = 6'(pi);
          qd  = 3'(di);
          cin = (r == 0) ? '0 : mont_carry_t'($urandom);
          #1;
          expv = carry_val(cin.c, cin.cc) + pi * di;
          checks++;
          if (int'(s) + int'(k) != expv) begin
            failures++;
            if (failures < 10)
              $display("FAIL p=%0d qd=%0d cin=%0d: s+k=%0d expected %0d",
                       pi, di, carry_val(cin.c, cin.cc), int'(s) + int'(k), expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
