// osu: Operand-Selection Unit.
//
// Sits in front of one function-unit input.  It is a data latch plus a 2:1
// multiplexer that share one control signal, as in the original OSU design:
// with sel = 1 the new operand goes straight to the function unit (mux input
// 1) and is captured by the latch at the clock edge; with sel = 0 the latch
// holds and the function unit keeps seeing the operand it saw last time it
// worked (mux input 0), so its internal nodes do not switch.
//
// Interface: clk, rst_n (asynchronous, active low, clears the latch),
// sel (mux control and latch enable), new_val, out.
// Timing: out follows new_val combinationally when sel = 1; the held value is
// updated at the rising clock edge of every cycle with sel = 1.
// The latch is written as an edge-triggered register with enable, and the
// reset value of zero, are this design's choices.
module osu #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,
  input  logic [W-1:0] new_val,
  output logic [W-1:0] out
);
  logic [W-1:0] held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   held <= '0;
    else if (sel) held <= new_val;
  end

  assign out = sel ? new_val : held;
endmodule
