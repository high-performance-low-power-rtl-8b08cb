// End-to-end check of the 6-tap FIR filter at its default size.
// Several runs, each with its own coefficients I1..I6 and modulus N (3, 7
// and other odd values) and a reset in between. Samples are offered in the
// first cycle (x_ready) and held for two cycles; in the second cycle
// (y_valid) y is compared with the direct-form sum
//   y(n) = sum over j = 0..5 of prod(I(6-j), x(n-j))   (mod 64)
// where prod is the multiplier's product from the reference model and
// samples before the reset count as absent.
// Counted mechanisms, each required at least once: first and second cycle
// of the two-cycle product, delay-line advance with full history, dropped
// carry in a carry-forward adder, approximate compressor result, change of
// modulus N, reset clearing the delay line.
module tb_fir5_top;
  import mont_ref_pkg::*;
  localparam int TAPS = 6;
  localparam int RUNS = 6;
  localparam int SAMPLES = 300;

  logic       clk = 0, rst_n = 0;
  logic [5:0] x, n, y;
  logic [5:0] coef [TAPS];
  logic       x_ready, y_valid;

  int checks = 0, failures = 0, cycles = 0;
  int cnt_first = 0, cnt_second = 0, cnt_full_hist = 0, cnt_add_ovf = 0;
  int cnt_approx = 0, cnt_n_change = 0, cnt_reset = 0;
  int xs   [SAMPLES];
  int cf   [TAPS];
  int part [TAPS];      // transposed partial sums of the previous sample
  int prev_n = -1;

  fir5_top dut (.clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .n(n),
                .x_ready(x_ready), .y_valid(y_valid), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_y(int idx);
    int acc = 0;
    for (int j = 0; j < TAPS; j++)
      if (idx - j >= 0) acc += int'(mont_prod_ref(xs[idx - j], cf[TAPS - 1 - j], int'(n)));
    return acc % 64;
  endfunction

  initial begin
    int nv, pr, ex, u, nxt[TAPS];
    x = 0; n = 3;
    for (int i = 0; i < TAPS; i++) coef[i] = 0;
    for (int run = 0; run < RUNS; run++) begin
      // reset and new configuration
      @(negedge clk);
      rst_n = 0;
      case (run)
        0: nv = 3;
        1: nv = 7;
        2: nv = 3;
        3: nv = 7;
        default: nv = 2 * int'($urandom_range(2, 31)) + 1;
      endcase
      n = 6'(nv);
      if (prev_n >= 0 && prev_n != nv) cnt_n_change++;
      prev_n = nv;
      for (int i = 0; i < TAPS; i++) begin
        cf[i] = int'($urandom_range(0, 63));
        coef[i] = 6'(cf[i]);
        part[i] = 0;
      end
      @(negedge clk);
      rst_n = 1;
      if (run > 0) cnt_reset++;
      for (int s = 0; s < SAMPLES; s++) begin
        // first cycle of the sample
        count(x_ready && !y_valid, "phase: expected first cycle");
        if (x_ready) cnt_first++;
        xs[s] = int'($urandom_range(0, 63));
        x = 6'(xs[s]);
        @(negedge clk);
        // second cycle: output valid
        count(y_valid && !x_ready, "phase: expected second cycle");
        if (y_valid) cnt_second++;
        checks++;
        if (int'(y) != ref_y(s)) begin
          failures++;
          if (failures < 10)
            $display("FAIL run %0d sample %0d: y=%0d expected %0d", run, s, y, ref_y(s));
        end
        if (s >= TAPS - 1) cnt_full_hist++;
        // mechanisms seen in this sample, from the reference arithmetic
        for (int k = 0; k < TAPS; k++) begin
          pr = int'(mont_prod_ref(xs[s], cf[k], nv));
          ex = mont_exact(xs[s], cf[k], nv, 2, u) % 64;
          if (pr != ex) cnt_approx++;
          if (k == 0) nxt[k] = pr;
          else begin
            if (part[k-1] + pr >= 64) cnt_add_ovf++;
            nxt[k] = (part[k-1] + pr) % 64;
          end
        end
        for (int k = 0; k < TAPS; k++) part[k] = nxt[k];
        @(negedge clk);
      end
    end
    $display("first cycles %0d, second cycles %0d, full-history outputs %0d",
             cnt_first, cnt_second, cnt_full_hist);
    $display("adder dropped carries %0d, approximate products %0d, N changes %0d, resets %0d",
             cnt_add_ovf, cnt_approx, cnt_n_change, cnt_reset);
    count(cnt_first > 0,     "first cycle never seen");
    count(cnt_second > 0,    "second cycle never seen");
    count(cnt_full_hist > 0, "delay line never full");
    count(cnt_add_ovf > 0,   "adder carry never dropped");
    count(cnt_approx > 0,    "approximate product never seen");
    count(cnt_n_change > 0,  "modulus never changed");
    count(cnt_reset > 0,     "reset never cleared the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
