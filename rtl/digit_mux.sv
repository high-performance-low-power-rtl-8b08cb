// Multiplier-digit selector: three 2:1 multiplexers, one per bit of the
// 3-bit digit fed to the processing element. With sel high the digit is
// q2 q1 q0 (first cycle of a product), with sel low it is q5 q4 q3 (second
// cycle), as the document describes. Purely combinational.
module digit_mux
  import mont_pkg::*;
(
  input  logic         sel,
  input  logic [M-1:0] q,
  output logic [D-1:0] qd
);
  for (genvar i = 0; i < D; i++) begin : g_mux
    assign qd[i] = sel ? q[i] : q[i+D];
  end
endmodule
