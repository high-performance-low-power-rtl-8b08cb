// 5th-order (6-tap) low-pass FIR filter built from modified Montgomery
// multipliers, in transposed form:
//
//   x(n) --+--------+--------+--------+--------+--------+
//          M(I1)    M(I2)    M(I3)    M(I4)    M(I5)    M(I6)
//          |        |        |        |        |        |
//          +-> D -> A -> D -> A -> D -> A -> D -> A -> D -> A --> y(n)
//
// Every sample x(n) is broadcast to the six multipliers; the first product
// goes into a D register, and each following adder A adds the next product
// to the previous register, so that
//   y(n) = I6*x(n) + I5*x(n-1) + I4*x(n-2) + I3*x(n-3) + I2*x(n-4) + I1*x(n-5)
// where "*" is the 6-bit Montgomery product (congruent to a*b*2^-6 mod N)
// and "+" is 6-bit addition modulo 64. This wiring follows the filter
// drawing; the document's written equation indexes the coefficients the
// other way round (I1 with x(n)), which is the same filter with I1..I6
// loaded in reverse order.
//
// Timing: a multiplication takes two clock cycles, so the filter takes one
// sample every two cycles. A phase flip-flop, set by reset, alternates
// between the first cycle (x_ready = 1) and the second (y_valid = 1). x, the
// coefficients and N must be held for both cycles of a sample. During the
// second cycle y is the filter output for that sample (combinational from
// the last adder), and at its end the D registers advance. All registers
// reset to zero, so the first five outputs include zero history.
// The phase flip-flop, the register enable and the shared modulus port are
// this design's choices; the document does not say how the two-cycle
// multiplier is sequenced inside the filter. An assertion checks that x and
// N do not change between the two cycles of a sample.
module fir5_top
  import mont_pkg::*;
#(
  parameter int unsigned TAPS = 6          // document: 5th order, I1..I6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] x,                  // input sample x(n)
  input  logic [M-1:0] coef [TAPS],        // coef[0] = I1 ... coef[5] = I6
  input  logic [M-1:0] n,                  // Montgomery modulus, odd
  output logic         x_ready,            // first cycle of a sample
  output logic         y_valid,            // second cycle: y is valid
  output logic [M-1:0] y                   // filter output y(n)
);
  logic         first;
  logic [M-1:0] prod [TAPS];
  logic [M-1:0] dq   [TAPS-1];             // D register outputs
  logic [M-1:0] acc  [TAPS];               // acc[0] = product 1, acc[k] = adder k outputs
  logic         ovf  [TAPS];

  // Phase flip-flop: 1 in the first cycle of a product, 0 in the second.
  always_ff @(posedge clk) begin
    if (!rst_n) first <= 1'b1;
    else        first <= ~first;
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_mult
    mont_mult u_m (
      .clk(clk), .rst_n(rst_n), .sel(first),
      .p(x), .q(coef[i]), .n(n),
      .res(prod[i]), .carry(), .t());
  end

  assign acc[0] = prod[0];
  assign ovf[0] = 1'b0;
  for (genvar i = 0; i < TAPS-1; i++) begin : g_line
    dreg #(.WIDTH(M)) u_d (.clk(clk), .rst_n(rst_n), .en(~first), .d(acc[i]), .q(dq[i]));
    carry_forward_adder #(.WIDTH(M)) u_a (.a(prod[i+1]), .b(dq[i]), .sum(acc[i+1]), .ovf(ovf[i+1]));
  end

  // Interface rule: the sample and the modulus are held for both cycles.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n) first |=> ($stable(x) && $stable(n)))
    else $error("fir5_top: x and n must be held for both cycles of a sample");

  assign y       = acc[TAPS-1];
  assign x_ready = first;
  assign y_valid = ~first;
endmodule
