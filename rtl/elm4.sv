// elm4 -- modified 4-bit ELM adder cell.
//
// Adds two 4-bit operands assuming a carry-in of 0 and reports what a later
// carry-in would change: partial sums ps[3:0], prefix propagates
// pp = {P(3,1), P(2,1), P(1,1)} and the group generate/propagate G(4,1),
// P(4,1). With a carry-in c the true sum bit i is ps[i] ^ (P(i,1) & c), with
// P(0,1) taken as 1 (bit 0 just gets ps[0] ^ c).
// Inside, bit-level g/p feed two 2-bit groups that are merged into the 4-bit
// group, as in the ELM scheme. The gates follow the modified cell: the
// OR-of-ANDs carry terms are NAND-NAND pairs, the 2-bit upper-group generate
// is kept inverted, and the XOR on the ps4 path takes inverted inputs (an
// XNOR below it and a NAND beside it). Combinational; function and gate
// structure as in the document, signal names this design's own.
module elm4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] ps,
  output logic [2:0] pp,
  output logic       g,
  output logic       p
);

  // bit level
  logic p1, p2, p3, p4;
  logic g1, g3, g2_n, g4_n;
  assign p1   = a[0] ^ b[0];
  assign g1   = a[0] & b[0];
  assign p2   = a[1] ^ b[1];
  assign g2_n = ~(a[1] & b[1]);
  assign p3   = a[2] ^ b[2];
  assign g3   = a[2] & b[2];
  assign p4   = a[3] ^ b[3];
  assign g4_n = ~(a[3] & b[3]);

  // 2-bit groups
  logic p2g1_n, G21, P21, ps2;
  assign p2g1_n = ~(p2 & g1);
  assign G21    = ~(g2_n & p2g1_n);
  assign P21    = p2 & p1;
  assign ps2    = p2 ^ g1;

  logic p4g3_n, G43_n, P43, ps4_n;
  assign p4g3_n = ~(p4 & g3);
  assign G43_n  = g4_n & p4g3_n;
  assign P43    = p4 & p3;
  assign ps4_n  = ~(p4 ^ g3);

  // 4-bit group
  logic P43G21_n, p3G21_n;
  assign P43G21_n = ~(P43 & G21);
  assign g        = ~(G43_n & P43G21_n);
  assign p        = P43 & P21;
  assign p3G21_n  = ~(p3 & G21);

  assign ps = {ps4_n ^ p3G21_n, p3 ^ G21, ps2, p1};
  assign pp = {p3 & P21, P21, p1};

endmodule
