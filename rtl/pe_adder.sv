// pe_adder -- the nine-input adder of a processing element.
//
// Adds eight ADDEND_W-bit DPU addends, the ACC_W-bit accumulated sum `acc`
// and the SEXT_W-bit `sign_extend` (which sits at bits [ACC_W-1:ADDEND_W]),
// modulo 2^ACC_W, in one combinational step:
//  1. three ADDEND_W-bit carry-save rows compress addend1..3, addend4..6 and
//     addend7, addend8, acc[ADDEND_W-1:0];
//  2. two more rows compress those six vectors into four;
//  3. the four vectors, acc[ACC_W-1:ADDEND_W] and sign_extend are compressed
//     to two full-width vectors;
//  4. a modified-ELM carry-propagate adder forms the sum.
// Steps 1, 2 and 4 and the split of acc follow the document. Carry vectors
// keep their top bit here (second-level rows are one bit wider than 14), and
// the last compression of six vectors takes three levels of rows rather than
// the two the document names; both are this design's choices that keep the
// sum exact. The addends are indexed 0..7 for addend1..addend8.
module pe_adder
  import rfir_pkg::*;
(
  input  logic [ADDEND_W-1:0] addend [8],
  input  logic [ACC_W-1:0]    acc,
  input  logic [SEXT_W-1:0]   sign_extend,
  output logic [ACC_W-1:0]    sum
);

  localparam int AW = ADDEND_W;

  // level 1: three AW-bit rows
  logic [AW-1:0] s1 [3];
  logic [AW:0]   c1 [3];

  csa #(.W(AW)) u_l1a (.a(addend[0]), .b(addend[1]), .c(addend[2]),   .s(s1[0]), .cy(c1[0]));
  csa #(.W(AW)) u_l1b (.a(addend[3]), .b(addend[4]), .c(addend[5]),   .s(s1[1]), .cy(c1[1]));
  csa #(.W(AW)) u_l1c (.a(addend[6]), .b(addend[7]), .c(acc[AW-1:0]), .s(s1[2]), .cy(c1[2]));

  // level 2: two rows, one bit wider to keep the carries
  logic [AW:0]   s2 [2];
  logic [AW+1:0] c2 [2];

  csa #(.W(AW+1)) u_l2a (.a({1'b0, s1[0]}), .b(c1[0]), .c({1'b0, s1[2]}), .s(s2[0]), .cy(c2[0]));
  csa #(.W(AW+1)) u_l2b (.a({1'b0, s1[1]}), .b(c1[1]), .c(c1[2]),         .s(s2[1]), .cy(c2[1]));

  // upper merge: four low vectors, acc[23:14] and sign_extend
  logic [ACC_W-1:0] v [6];
  assign v[0] = ACC_W'(s2[0]);
  assign v[1] = ACC_W'(c2[0]);
  assign v[2] = ACC_W'(s2[1]);
  assign v[3] = ACC_W'(c2[1]);
  assign v[4] = {acc[ACC_W-1:AW], {AW{1'b0}}};
  assign v[5] = {sign_extend, {AW{1'b0}}};

  logic [ACC_W-1:0] s3 [2];
  logic [ACC_W:0]   c3 [2];
  csa #(.W(ACC_W)) u_l3a (.a(v[0]), .b(v[1]), .c(v[2]), .s(s3[0]), .cy(c3[0]));
  csa #(.W(ACC_W)) u_l3b (.a(v[3]), .b(v[4]), .c(v[5]), .s(s3[1]), .cy(c3[1]));

  logic [ACC_W-1:0] s4;
  logic [ACC_W:0]   c4;
  csa #(.W(ACC_W)) u_l4 (.a(s3[0]), .b(c3[0][ACC_W-1:0]), .c(s3[1]), .s(s4), .cy(c4));

  logic [ACC_W-1:0] s5;
  logic [ACC_W:0]   c5;
  csa #(.W(ACC_W)) u_l5 (.a(s4), .b(c4[ACC_W-1:0]), .c(c3[1][ACC_W-1:0]), .s(s5), .cy(c5));

  elm_adder #(.W(ACC_W)) u_cpa (.a(s5), .b(c5[ACC_W-1:0]), .sum(sum));

endmodule
