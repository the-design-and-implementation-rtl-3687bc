// arm_ref_pkg: reference model of the ARM operations used by the testbenches.
//
// Written independently of the RTL: the shifter model shifts one bit per step
// and takes the carry from the last bit shifted out; the ALU model works on
// 64-bit integers and derives C and V from the wide result.
package arm_ref_pkg;

  typedef struct {
    logic [31:0] res;
    bit n, z, c, v;
  } ref_out_t;

  // type: 0 LSL, 1 LSR, 2 ASR, 3 ROR.  immf: immediate-shift encoding.
  function automatic void ref_shift(input logic [31:0] v, input int unsigned amt,
                                    input int unsigned typ, input bit immf, input bit cin,
                                    output logic [31:0] r, output bit c);
    int unsigned n;
    r = v; c = cin; n = amt;
    if (immf && amt == 0) begin
      if (typ == 0) return;
      if (typ == 3) begin c = v[0]; r = {cin, v[31:1]}; return; end
      n = 32;
    end
    for (int unsigned i = 0; i < n; i++) begin
      case (typ)
        0: begin c = r[31]; r = {r[30:0], 1'b0}; end
        1: begin c = r[0];  r = {1'b0, r[31:1]}; end
        2: begin c = r[0];  r = {r[31], r[31:1]}; end
        default: begin c = r[0]; r = {r[0], r[31:1]}; end
      endcase
    end
  endfunction

  function automatic ref_out_t ref_alu(input int unsigned op, input logic [31:0] a,
                                       input logic [31:0] b, input bit cin, input bit vin,
                                       input bit shc);
    ref_out_t o;
    longint unsigned ua, ub, us;
    longint sa, sb, ss;
    bit arith;
    ua = a; ub = b; sa = $signed(a); sb = $signed(b);
    arith = 1;
    case (op)
      2, 10: begin us = ua - ub;        ss = sa - sb;        o.c = (ua >= ub); end
      3:     begin us = ub - ua;        ss = sb - sa;        o.c = (ub >= ua); end
      4, 11: begin us = ua + ub;        ss = sa + sb;        o.c = us[32]; end
      5:     begin us = ua + ub + cin;  ss = sa + sb + cin;  o.c = us[32]; end
      6:     begin us = ua - ub - !cin; ss = sa - sb - !cin; o.c = (ua >= ub + !cin); end
      7:     begin us = ub - ua - !cin; ss = sb - sa - !cin; o.c = (ub >= ua + !cin); end
      default: arith = 0;
    endcase
    case (op)
      0, 8:  o.res = a & b;
      1, 9:  o.res = a ^ b;
      12:    o.res = a | b;
      13:    o.res = b;
      14:    o.res = a & ~b;
      15:    o.res = ~b;
      default: o.res = us[31:0];
    endcase
    o.n = o.res[31];
    o.z = (o.res == 0);
    if (arith) o.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
    else begin o.c = shc; o.v = vin; end
    return o;
  endfunction

endpackage
