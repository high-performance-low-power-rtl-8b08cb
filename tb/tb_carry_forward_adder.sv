// Exhaustive check of the 6-bit carry-forward adder against (a + b) mod 64
// and of its dropped-carry flag against a + b >= 64.
module tb_carry_forward_adder;
  logic [5:0] a, b, sum;
  logic       ovf;
  int checks = 0, failures = 0;
  int ovf_seen = 0;

  carry_forward_adder dut (.a(a), .b(b), .sum(sum), .ovf(ovf));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {a, b} = 12'(i);
      #1;
      checks += 2;
      if (int'(sum) != (int'(a) + int'(b)) % 64) begin
        failures++;
        $display("FAIL %0d + %0d = %0d", a, b, sum);
      end
      if (ovf != (int'(a) + int'(b) >= 64)) begin
        failures++;
        $display("FAIL ovf %0d + %0d: %0b", a, b, ovf);
      end
      if (ovf) ovf_seen++;
    end
    $display("sums with dropped carry: %0d", ovf_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
