// sparc_asm_pkg: instruction encoders used by the testbenches to build
// machine programs (see sparc_pkg for the formats).
package sparc_asm_pkg;
  import sparc_pkg::*;

  function automatic word_t two(input op_e op, input amode_e sm, input int sr, input amode_e dm, input int dr);
    return {op, sm, 4'(sr), dm, 4'(dr)};
  endfunction
  function automatic word_t onea(input onea_e f, input amode_e m, input int r);
    return {OP_GRP0, G_ONEA, f, m, 4'(r)};
  endfunction
  function automatic word_t oneb(input oneb_e f, input amode_e m, input int r);
    return {OP_GRP0, G_ONEB, f, m, 4'(r)};
  endfunction
  function automatic word_t io(input io_e f, input amode_e m, input int r);
    return {OP_GRP0, G_IO, f, m, 4'(r)};
  endfunction
  function automatic word_t misc(input misc_e f, input int r);
    return {OP_GRP0, G_MISC, f, 4'(r)};
  endfunction
  function automatic word_t puts(input logic [4:0] imm, input int r);
    return {OP_GRP0, G_PUTS, imm, 4'(r)};
  endfunction
  function automatic word_t putv(input logic [4:0] imm, input int r);
    return {OP_GRP0, G_PUTV, imm, 4'(r)};
  endfunction
  // branch at byte address 'at' to byte address 'to'
  function automatic word_t br(input bcond_e c, input int at, input int to);
    return {OP_BR, c, 8'((to - (at + 2)) / 2)};
  endfunction
  // a 14-bit Arabic character word
  function automatic word_t chr(input logic [6:0] code, input logic [1:0] shape, input logic [4:0] vowel);
    return {2'b00, code, shape, vowel};
  endfunction
endpackage
