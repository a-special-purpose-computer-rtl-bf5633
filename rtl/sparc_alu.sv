// sparc_alu: 16-bit arithmetic and logic unit with condition codes.
//
// The add/subtract/logic path is four sparc_alu181 slices joined by one
// sparc_cla182 lookahead unit, the structure of the original machine. Each
// operation selects the slices' function code (s, m), the carry in and the
// slice operands; shifts, rotates and the byte swap bypass the slices.
// a is the destination operand, b the source operand, cin the current C flag.
// Flags follow the PDP-11 conventions the machine is based on: C after a
// subtraction or compare is the borrow, CMP computes b - a (source minus
// destination), INC and DEC and the logic operations leave C unchanged
// (cflag = cin), shifts set V = N xor C. Which flags an instruction writes
// is decided by the controller. Purely combinational.
module sparc_alu
  import sparc_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  logic    cin,
  output word_t   y,
  output flags_t  flags
);
  word_t      sa, sb, f;
  logic [3:0] s;
  logic       m, c0;
  logic [3:0] sp, sg, scout, saeqb;
  logic [4:0] cc;
  logic       cx, cy, cz, pg, gg, cout;
  logic       beff15;     // sign of the operand actually added to sa
  logic       arith, borrow;

  always_comb begin
    sa = a; sb = b; s = 4'b1010; m = 1'b1; c0 = 1'b0;
    arith = 1'b0; borrow = 1'b0;
    unique case (op)
      ALU_PASSB: begin s = 4'b1010; m = 1'b1; end
      ALU_CMP:   begin sa = b; sb = a; s = 4'b0110; m = 1'b0; c0 = 1'b1; arith = 1'b1; borrow = 1'b1; end
      ALU_AND:   begin s = 4'b1011; m = 1'b1; end
      ALU_BIC:   begin s = 4'b0111; m = 1'b1; end
      ALU_OR:    begin s = 4'b1110; m = 1'b1; end
      ALU_ADD:   begin s = 4'b1001; m = 1'b0; c0 = 1'b0; arith = 1'b1; end
      ALU_SUB:   begin s = 4'b0110; m = 1'b0; c0 = 1'b1; arith = 1'b1; borrow = 1'b1; end
      ALU_XOR:   begin s = 4'b0110; m = 1'b1; end
      ALU_ADDC:  begin s = 4'b1001; m = 1'b0; c0 = cin;  arith = 1'b1; end
      ALU_SUBC:  begin s = 4'b0110; m = 1'b0; c0 = !cin; arith = 1'b1; borrow = 1'b1; end
      ALU_CLR:   begin s = 4'b0011; m = 1'b1; end
      ALU_COM:   begin s = 4'b0000; m = 1'b1; end
      ALU_INC:   begin s = 4'b0000; m = 1'b0; c0 = 1'b1; arith = 1'b1; end
      ALU_DEC:   begin s = 4'b1111; m = 1'b0; c0 = 1'b0; arith = 1'b1; end
      ALU_NEG:   begin sa = '0; sb = a; s = 4'b0110; m = 1'b0; c0 = 1'b1; arith = 1'b1; borrow = 1'b1; end
      ALU_TST:   begin s = 4'b1111; m = 1'b1; end
      ALU_ADC:   begin sb = '0; s = 4'b1001; m = 1'b0; c0 = cin;  arith = 1'b1; end
      ALU_SBC:   begin sb = '0; s = 4'b0110; m = 1'b0; c0 = !cin; arith = 1'b1; borrow = 1'b1; end
      default:   begin s = 4'b1111; m = 1'b1; end   // shifts: slices pass a
    endcase
    // Operand the slices add in arithmetic mode: b (1001), ~b (0110),
    // zero (0000) or all ones (1111).
    unique case (s)
      4'b1001: beff15 = sb[15];
      4'b0110: beff15 = !sb[15];
      4'b1111: beff15 = 1'b1;
      default: beff15 = 1'b0;
    endcase
  end

  for (genvar i = 0; i < 4; i++) begin : g_slice
    sparc_alu181 u_slice (
      .a(sa[4*i +: 4]), .b(sb[4*i +: 4]), .s(s), .m(m), .cin(cc[i]),
      .f(f[4*i +: 4]), .p(sp[i]), .g(sg[i]), .cout(scout[i]), .aeqb(saeqb[i])
    );
  end

  sparc_cla182 u_cla (
    .p(sp), .g(sg), .cn(c0), .cx(cx), .cy(cy), .cz(cz), .pg(pg), .gg(gg)
  );

  always_comb begin
    cc   = {1'b0, cz, cy, cx, c0};
    cout = gg | (pg & c0);
    y    = f;
    flags.n = f[15];
    flags.z = (f == '0);
    flags.v = 1'b0;
    flags.c = cin;
    if (arith) flags.v = (sa[15] == beff15) && (f[15] != sa[15]);
    unique case (op)
      ALU_CMP, ALU_SUB, ALU_SUBC, ALU_NEG, ALU_SBC: flags.c = borrow ^ cout;
      ALU_ADD, ALU_ADDC, ALU_ADC:                     flags.c = cout;
      ALU_CLR, ALU_TST:                               flags.c = 1'b0;
      ALU_COM:                                        flags.c = 1'b1;
      default: ;
    endcase
    unique case (op)
      ALU_LSR:  begin y = {1'b0, a[15:1]};  flags.c = a[0];  end
      ALU_ASR:  begin y = {a[15], a[15:1]}; flags.c = a[0];  end
      ALU_ASL:  begin y = {a[14:0], 1'b0};  flags.c = a[15]; end
      ALU_ROR:  begin y = {cin, a[15:1]};   flags.c = a[0];  end
      ALU_ROL:  begin y = {a[14:0], cin};   flags.c = a[15]; end
      ALU_SWAB: begin y = {a[7:0], a[15:8]}; flags.c = 1'b0; end
      default: ;
    endcase
    unique case (op)
      ALU_LSR, ALU_ASR, ALU_ASL, ALU_ROR, ALU_ROL: begin
        flags.n = y[15];
        flags.z = (y == '0);
        flags.v = y[15] ^ flags.c;
      end
      ALU_SWAB: begin
        flags.n = y[7];
        flags.z = (y[7:0] == '0);
        flags.v = 1'b0;
      end
      default: ;
    endcase
  end
endmodule
