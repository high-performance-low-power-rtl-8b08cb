// D flip-flop register with load enable and synchronous active-low reset.
// The document uses D flip-flops twice: to hold the division cell's carry
// bits between the two cycles of a Montgomery product (two 6-bit registers
// and one single flip-flop) and as the delay elements of the FIR filter.
// q takes d on the rising clock edge when en is high; reset clears it.
// The enable and the reset are this design's additions so that the FIR
// delay line advances once per two-cycle sample and starts from zero.
module dreg #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
