// elm_adder -- W-bit two-operand adder built as an ELM tree.
//
// The operands are cut into 4-bit slices, each handled by a modified elm4
// cell that forms its sums for carry-in 0, the propagate of all bits below
// each bit of the slice ("prefix propagate", 1 for the slice's lowest bit)
// and the slice's group generate G and propagate P. Neighbouring blocks are
// then merged pairwise, level by level (4 -> 8 -> 16 -> ... bits), exactly as
// the cell itself merges its two 2-bit halves: for a low block L and a high
// block H,
//   ps_H     <= ps_H ^ (pp_H & G_L)     pp_H <= pp_H & P_L
//   G        =  G_H | P_H & G_L          P    =  P_H & P_L
// A block without a partner passes up unchanged. After the last level the
// whole word has carry-in 0 and ps is the sum: (a + b) mod 2^W, combinational,
// log2(W/4) merge levels deep.
// The 4-bit cell and the ELM principle of recursive merging are the
// document's; the merge levels above 4 bits are written from that principle,
// as the document shows only the 4-bit cell. The top block's G and P (the
// carry out) are not needed for a modulo-2^W sum and are left unused.
module elm_adder #(
  parameter int W = rfir_pkg::ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  localparam int NB = W / 4;                        // 4-bit slices
  localparam int NL = (NB > 1) ? $clog2(NB) : 0;    // merge levels

  logic [W-1:0]  ps [NL+1];   // sums for carry-in 0 into the current block
  logic [W-1:0]  pp [NL+1];   // prefix propagates inside the current block
  logic [NB-1:0] gg [NL+1];   // block generate, indexed by block
  logic [NB-1:0] gp [NL+1];   // block propagate

  for (genvar j = 0; j < NB; j++) begin : g_cell
    logic [2:0] pp3;
    elm4 u_cell (
      .a  (a[4*j +: 4]),
      .b  (b[4*j +: 4]),
      .ps (ps[0][4*j +: 4]),
      .pp (pp3),
      .g  (gg[0][j]),
      .p  (gp[0][j])
    );
    assign pp[0][4*j +: 4] = {pp3, 1'b1};
  end

  for (genvar l = 0; l < NL; l++) begin : g_level
    localparam int BS  = 4 << l;                    // block size at this level
    localparam int NBL = (W + BS - 1) / BS;         // blocks at this level
    localparam int NBN = (NBL + 1) / 2;             // blocks after merging
    for (genvar j = 0; j < NBN; j++) begin : g_blk
      localparam int LO = 2 * j * BS;
      localparam int HI = (2 * j + 1) * BS;
      if (2 * j + 1 < NBL) begin : g_merge
        localparam int HW = (W - HI < BS) ? W - HI : BS;
        assign ps[l+1][LO +: BS] = ps[l][LO +: BS];
        assign pp[l+1][LO +: BS] = pp[l][LO +: BS];
        assign ps[l+1][HI +: HW] = ps[l][HI +: HW] ^ (pp[l][HI +: HW] & {HW{gg[l][2*j]}});
        assign pp[l+1][HI +: HW] = pp[l][HI +: HW] & {HW{gp[l][2*j]}};
        assign gg[l+1][j] = gg[l][2*j+1] | (gp[l][2*j+1] & gg[l][2*j]);
        assign gp[l+1][j] = gp[l][2*j+1] & gp[l][2*j];
      end else begin : g_pass
        assign ps[l+1][W-1:LO] = ps[l][W-1:LO];
        assign pp[l+1][W-1:LO] = pp[l][W-1:LO];
        assign gg[l+1][j] = gg[l][2*j];
        assign gp[l+1][j] = gp[l][2*j];
      end
    end
    if (NBN < NB) begin : g_unused
      assign gg[l+1][NB-1:NBN] = '0;
      assign gp[l+1][NB-1:NBN] = '0;
    end
  end

  assign sum = ps[NL];

  if (W % 4 != 0) begin : g_bad_w
    $error("elm_adder: W must be a multiple of 4");
  end

endmodule
