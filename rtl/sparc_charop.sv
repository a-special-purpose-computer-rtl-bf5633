// sparc_charop: field unit for the Arabic character instructions.
//
// A character word holds the 14-bit Arabic code: character code in bits
// 13..7, shape code (SHC) in bits 6..5, vowel code in bits 4..0. This unit
// implements the instructions that work directly on those fields:
//   MOVS  dst[6:5] <- src[6:5]              (move shape)
//   MOVV  dst[4:0] <- src[4:0]              (move vowel)
//   CMPS  compare src[6:5] with dst[6:5]    (compare shape)
//   CMPV  compare src[4:0] with dst[4:0]    (compare vowel)
//   PUTS  dst[6:5] <- imm[4:3]              (put shape, immediate)
//   PUTV  dst[4:0] <- imm[4:0]              (put vowel, immediate)
// All other bits of dst are kept. Moves and puts set N and Z from the whole
// result word, clear V and keep C. Compares form src field minus dst field
// like CMP: Z when the fields are equal, C when the source field is the
// smaller (borrow), N from the top bit of the field difference, V = 0.
// The choice of imm[4:3] as the shape bits of PUTS is this design's own.
// Purely combinational.
module sparc_charop
  import sparc_pkg::*;
(
  input  chr_op_e    op,
  input  word_t      src,
  input  word_t      dst,
  input  logic [4:0] imm,
  input  logic       cin,
  output word_t      y,
  output flags_t     flags
);
  logic [2:0] sdiff;   // 2-bit shape difference with borrow
  logic [5:0] vdiff;   // 5-bit vowel difference with borrow

  always_comb begin
    sdiff = {1'b0, src[SHC_HI:SHC_LO]} - {1'b0, dst[SHC_HI:SHC_LO]};
    vdiff = {1'b0, src[VOW_HI:VOW_LO]} - {1'b0, dst[VOW_HI:VOW_LO]};
    y = dst;
    unique case (op)
      CH_MOVS: y[SHC_HI:SHC_LO] = src[SHC_HI:SHC_LO];
      CH_MOVV: y[VOW_HI:VOW_LO] = src[VOW_HI:VOW_LO];
      CH_PUTS: y[SHC_HI:SHC_LO] = imm[4:3];
      CH_PUTV: y[VOW_HI:VOW_LO] = imm;
      default: ;
    endcase
    flags.n = y[15];
    flags.z = (y == '0);
    flags.v = 1'b0;
    flags.c = cin;
    unique case (op)
      CH_CMPS: begin flags.n = sdiff[1]; flags.z = (sdiff[1:0] == '0); flags.c = sdiff[2]; end
      CH_CMPV: begin flags.n = vdiff[4]; flags.z = (vdiff[4:0] == '0); flags.c = vdiff[5]; end
      default: ;
    endcase
  end
endmodule
