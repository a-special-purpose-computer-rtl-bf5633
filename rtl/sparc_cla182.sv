// sparc_cla182: carry-lookahead unit with the function of the 74182.
//
// Takes the group propagate (p) and generate (g) signals of four 4-bit ALU
// slices and the carry into the lowest slice, and forms the carries into
// slices 1, 2 and 3 (cx, cy, cz) and the propagate/generate of the whole
// 16-bit group (pg, gg). Active-high signals throughout (the part itself
// uses active-low p and g). Purely combinational.
module sparc_cla182 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       cn,
  output logic       cx,
  output logic       cy,
  output logic       cz,
  output logic       pg,
  output logic       gg
);
  always_comb begin
    cx = g[0] | (p[0] & cn);
    cy = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cn);
    cz = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cn);
    gg = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg = &p;
  end
endmodule
