// arm_shifter: ARM barrel shifter (LSL, LSR, ASR, ROR and RRX) with carry out.
//
// Implements the ARM operand-2 shift rules.  With imm_form = 1 the amount is
// an immediate-shift field, where an encoded 0 means LSL #0 (no shift),
// LSR #32, ASR #32 or RRX.  With imm_form = 0 the amount is a register value
// (bits [7:0] of Rs) or an immediate rotate; amount 0 leaves the value and the
// carry unchanged, amounts of 32 and more follow the ARM rules.
//
// Interface: val, amt[7:0], stype, imm_form, c_in (CPSR C) -> res, c_out.
// Purely combinational.  The shift rules are ARM's; the original low-power design only names
// the shifter as one of the three function units.
module arm_shifter
  import lp_pkg::*;
(
  input  word_t      val,
  input  logic [7:0] amt,
  input  shift_e     stype,
  input  logic       imm_form,
  input  logic       c_in,
  output word_t      res,
  output logic       c_out
);
  logic [63:0] dbl;
  logic [4:0]  a5;

  always_comb begin
    res   = val;
    c_out = c_in;
    a5    = amt[4:0];
    dbl   = {val, val};
    if (imm_form && amt[4:0] == 5'd0) begin
      unique case (stype)
        SH_LSL: begin res = val; c_out = c_in; end
        SH_LSR: begin res = '0; c_out = val[31]; end
        SH_ASR: begin res = {32{val[31]}}; c_out = val[31]; end
        SH_ROR: begin res = {c_in, val[31:1]}; c_out = val[0]; end  // RRX
      endcase
    end else if (amt != 8'd0) begin
      unique case (stype)
        SH_LSL: begin
          if (amt < 8'd32) begin
            res   = val << a5;
            c_out = val[5'd0 - a5];      // bit 32-amt
          end else if (amt == 8'd32) begin
            res = '0; c_out = val[0];
          end else begin
            res = '0; c_out = 1'b0;
          end
        end
        SH_LSR: begin
          if (amt < 8'd32) begin
            res   = val >> a5;
            c_out = val[a5 - 5'd1];
          end else if (amt == 8'd32) begin
            res = '0; c_out = val[31];
          end else begin
            res = '0; c_out = 1'b0;
          end
        end
        SH_ASR: begin
          if (amt < 8'd32) begin
            res   = word_t'($signed(val) >>> a5);
            c_out = val[a5 - 5'd1];
          end else begin
            res = {32{val[31]}}; c_out = val[31];
          end
        end
        SH_ROR: begin
          if (a5 == 5'd0) begin
            res = val; c_out = val[31];        // multiple of 32
          end else begin
            res   = dbl[{1'b0, a5} +: 32];
            c_out = val[a5 - 5'd1];
          end
        end
      endcase
    end
  end
endmodule
