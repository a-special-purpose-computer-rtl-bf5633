// sparc_alu181: one 4-bit ALU slice with the function set of the 74181.
//
// The 16-bit ALU of the machine is built from four of these slices and one
// carry-lookahead unit (sparc_cla182), as the original hardware was built
// from four 74181 parts and a 74182. The slice forms, per bit,
//   x = a | (b & s[0]) | (~b & s[1])       y = (a & ~b & s[2]) | (a & b & s[3])
// In arithmetic mode (m = 0) it outputs x + y + cin; in logic mode (m = 1)
// it outputs ~(x ^ y), which gives the sixteen logic functions of the part
// (for example s = 1001 is A plus B, s = 0110 is A minus B minus 1 with
// cin = 0, s = 1011 with m = 1 is A and B).
// This model uses active-high data and an active-high carry: cin = 1 adds
// one. p and g are the active-high group propagate and generate used by the
// lookahead unit; cout is the slice's own ripple carry out. aeqb is high
// when every bit of f is one (the A = B output of the part).
// Purely combinational.
module sparc_alu181 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cin,
  output logic [3:0] f,
  output logic       p,
  output logic       g,
  output logic       cout,
  output logic       aeqb
);
  logic [3:0] x, y, gi, pi;
  logic [4:0] c;

  always_comb begin
    x  = a | (b & {4{s[0]}}) | (~b & {4{s[1]}});
    y  = (a & ~b & {4{s[2]}}) | (a & b & {4{s[3]}});
    gi = x & y;
    pi = x | y;
    g    = gi[3] | (pi[3] & gi[2]) | (pi[3] & pi[2] & gi[1]) | (pi[3] & pi[2] & pi[1] & gi[0]);
    p    = &pi;
    c[0] = cin;
    c[1] = gi[0] | (pi[0] & cin);
    c[2] = gi[1] | (pi[1] & gi[0]) | (pi[1] & pi[0] & cin);
    c[3] = gi[2] | (pi[2] & gi[1]) | (pi[2] & pi[1] & gi[0]) | (pi[2] & pi[1] & pi[0] & cin);
    c[4] = g | (p & cin);
    f    = m ? ~(x ^ y) : (x ^ y ^ c[3:0]);
    cout = c[4];
    aeqb = &f;
  end
endmodule
