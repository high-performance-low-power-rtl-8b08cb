// Exhaustive check of the multiplier-digit selector: sel = 1 gives q[2:0],
// sel = 0 gives q[5:3].
module tb_digit_mux;
  logic       sel;
  logic [5:0] q;
  logic [2:0] qd;
  int checks = 0, failures = 0;

  digit_mux dut (.sel(sel), .q(q), .qd(qd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      {sel, q} = 7'(i);
      #1;
      checks++;
      if (qd != (sel ? 3'(q % 8) : 3'(q / 8))) begin
        failures++;
        $display("FAIL sel=%0b q=%0d qd=%0d", sel, q, qd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
