// Exhaustive check of the modified full adder: the sum is the parity of the
// inputs, the carry is the majority except for input a,b,c = 1,0,1, which
// must give carry 0.
module tb_mfa;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;
  int ones;
  bit exp_carry;

  mfa dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      exp_carry = (i == 5) ? 1'b0 : (ones >= 2);
      checks += 2;
      if (sum != ones[0]) begin
        failures++;
        $display("FAIL sum for %03b: %0b", 3'(i), sum);
      end
      if (carry != exp_carry) begin
        failures++;
        $display("FAIL carry for %03b: %0b expected %0b", 3'(i), carry, exp_carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
