// arm_multiplier: 32 x 32 -> 32 multiplier with optional accumulate (MUL, MLA).
//
// res = a * b + (acc ? c : 0), low 32 bits, as ARM's MUL and MLA define it.
// Interface: a (Rm), b (Rs), c (Rn, accumulator), acc -> res.
// Purely combinational, one pass; the ARM9TDMI's own multiplier iterates
// over several cycles, but the original low-power design says nothing of its insides, so the
// simplest circuit with the same result is used here.
module arm_multiplier
  import lp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  word_t c,
  input  logic  acc,
  output word_t res
);
  word_t prod;
  assign prod = a * b;
  assign res  = acc ? prod + c : prod;
endmodule
