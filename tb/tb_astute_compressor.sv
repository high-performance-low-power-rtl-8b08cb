// Exhaustive check of the 12:6 Astute compressor over all 4096 inputs
// against a stage-by-stage model built from the modified full adder's truth
// table. Also counts how often the result differs from the exact sum
// C[6:1] + {Cc[5:1], C0} modulo 64, and requires both kinds of case.
module tb_astute_compressor;
  import mont_ref_pkg::*;
  logic [6:0] c;
  logic [5:1] cc;
  logic [6:1] o;
  int checks = 0, failures = 0;
  int exact = 0, inexact = 0;
  bit [5:0] expv;

  astute_compressor dut (.c(c), .cc(cc), .o(o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {cc, c} = 12'(i);
      #1;
      expv = compress_ref(c, cc);
      checks++;
      if (o != expv) begin
        failures++;
        if (failures < 10) $display("FAIL c=%b cc=%b o=%0d expected %0d", c, cc, o, expv);
      end
      if (int'(expv) == (int'(c[6:1]) + int'({cc, c[0]})) % 64) exact++;
      else inexact++;
    end
    $display("exact sums: %0d, approximate sums: %0d", exact, inexact);
    checks++;
    if (exact == 0 || inexact == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
