// Random check of the D flip-flop register: reset clears it, with en high
// it takes d one clock later, with en low it holds.
module tb_dreg;
  logic       clk = 0, rst_n, en;
  logic [5:0] d, q;
  logic [5:0] model;
  int checks = 0, failures = 0;
  int cycles = 0;

  dreg dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; d = 6'h2a;
    @(negedge clk);
    model = 0;
    checks++;
    if (q != 0) begin failures++; $display("FAIL reset q=%0d", q); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      en = 1'($urandom_range(0, 1));
      d  = 6'($urandom);
      if ($urandom_range(0, 50) == 0) rst_n = 0; else rst_n = 1;
      @(posedge clk);
      if (!rst_n) model = 0;
      else if (en) model = d;
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL step %0d: q=%0d expected %0d", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
