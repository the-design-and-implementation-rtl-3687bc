// arm_alu: ARM data-processing ALU, all sixteen opcodes, with NZCV flags.
//
// a is the first operand (Rn), b the second (the shifter output).  Arithmetic
// opcodes (SUB, RSB, ADD, ADC, SBC, RSC, CMP, CMN) use one 33-bit adder with
// operand inversion and give C and V from it; logical opcodes give C from the
// shifter (sh_carry) and leave V at v_in.  MOV is computed here as well, though
// in the low-power datapath a MOV is a dummy operation that is routed around
// the ALU.
//
// Interface: a, b, op, c_in (CPSR C, for ADC/SBC/RSC), v_in (CPSR V),
// sh_carry -> res, flags.  Purely combinational.  The opcode semantics are
// ARM's; the original low-power design only names the ALU as a function unit.
module arm_alu
  import lp_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  input  logic    c_in,
  input  logic    v_in,
  input  logic    sh_carry,
  output word_t   res,
  output flags_t  flags
);
  word_t       x, y;
  logic        cin, arith;
  logic [32:0] sum;

  always_comb begin
    x = a; y = b; cin = 1'b0; arith = 1'b1;
    unique case (op)
      OP_SUB, OP_CMP: begin x = a;  y = ~b; cin = 1'b1; end
      OP_RSB:         begin x = b;  y = ~a; cin = 1'b1; end
      OP_ADD, OP_CMN: begin x = a;  y = b;  cin = 1'b0; end
      OP_ADC:         begin x = a;  y = b;  cin = c_in; end
      OP_SBC:         begin x = a;  y = ~b; cin = c_in; end
      OP_RSC:         begin x = b;  y = ~a; cin = c_in; end
      default:        arith = 1'b0;
    endcase
    sum = {1'b0, x} + {1'b0, y} + 33'(cin);

    unique case (op)
      OP_AND, OP_TST: res = a & b;
      OP_EOR, OP_TEQ: res = a ^ b;
      OP_ORR:         res = a | b;
      OP_MOV:         res = b;
      OP_BIC:         res = a & ~b;
      OP_MVN:         res = ~b;
      default:        res = sum[31:0];
    endcase

    flags.n = res[31];
    flags.z = (res == '0);
    if (arith) begin
      flags.c = sum[32];
      flags.v = (x[31] == y[31]) && (sum[31] != x[31]);
    end else begin
      flags.c = sh_carry;
      flags.v = v_in;
    end
  end
endmodule
