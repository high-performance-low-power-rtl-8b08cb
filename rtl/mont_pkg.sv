// Shared sizes and types of the digit-serial Montgomery multiplier and the
// FIR filter built from it.
//
// The multiplier works on M-bit operands, D multiplier bits per cycle, so a
// product takes M/D = 2 cycles; the Montgomery radix is r = 2^M. Between the
// two cycles the division cell leaves the running value in redundant form as
// thirteen "carry bits" C0..C6 and Cc1..Cc6, held in two 6-bit flip-flops and
// one single flip-flop. Their weights are this design's reading of how the
// 12:6 compressor pairs them: C0 has weight 1, Cj (j>=1) weight 2^(j-1) and
// Cck weight 2^k, so the value is C0 + C[6:1] + 2*Cc[6:1].
package mont_pkg;

  localparam int unsigned M    = 6;          // operand width (document: m = 6)
  localparam int unsigned D    = 3;          // multiplier bits per cycle (document: d = 3)
  // Width of the carry-save vectors inside the PE and the division cell.
  // The largest value there is V + P*Qd + t*N <= 126 + 441 + 441 < 2^10.
  localparam int unsigned CSW  = 10;

  // The redundant running value passed from the division cell to the
  // compressor and, through the carry flip-flops, back to the PE.
  typedef struct packed {
    logic [6:1] cc;   // Cc6..Cc1, Cck has weight 2^k
    logic [6:0] c;    // C6..C0, C0 weight 1, Cj weight 2^(j-1)
  } mont_carry_t;

  // Integer value of a carry record (at most 190, always below 128 in use).
  function automatic logic [7:0] carry_value(mont_carry_t r);
    return 8'(r.c[0]) + 8'(r.c[6:1]) + {1'b0, r.cc, 1'b0};
  endfunction

endpackage
