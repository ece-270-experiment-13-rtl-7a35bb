// cla4: 4-bit carry-lookahead adder/subtractor with condition codes.
//
// Computes S = X + Y when SUB = 0 and S = X - Y when SUB = 1, the latter as
// X + ~Y + 1 (the subtract line inverts Y and forms the carry-in). Bit
// generate g = x & y' and propagate p = x ^ y' feed two-level carry-lookahead
// equations for all four carries, so no carry ripples through the stages.
// Purely combinational.
//
// Condition codes, as an adder/subtractor with condition codes delivers them:
//   CF  carry out of bit 3 for an add; for a subtract, the borrow, that is
//       the inverted carry out (this convention is this design's choice)
//   NF  bit 3 of the result
//   ZF  result is zero
//   VF  two's complement overflow, carry into bit 3 XOR carry out of bit 3
module cla4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       sub,
  output logic [3:0] s,
  output logic       cf,
  output logic       nf,
  output logic       zf,
  output logic       vf
);
  logic [3:0] yy, g, p;
  logic [4:0] c;

  always_comb begin
    yy = y ^ {4{sub}};
    g  = x & yy;
    p  = x ^ yy;
    c[0] = sub;
    c[1] = g[0] | (p[0] & c[0]);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c[0]);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
         | (p[2] & p[1] & p[0] & c[0]);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
         | (p[3] & p[2] & p[1] & g[0]) | (p[3] & p[2] & p[1] & p[0] & c[0]);
    s  = p ^ c[3:0];
    cf = c[4] ^ sub;
    nf = s[3];
    zf = (s == 4'b0000);
    vf = c[4] ^ c[3];
  end
endmodule
