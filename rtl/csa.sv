// csa -- W-bit carry-save adder: a row of W full adders.
//
// Reduces three W-bit vectors to a sum vector `s` (weight 1) and a carry
// vector `cy` (W+1 bits, already shifted left by one), so a+b+c == s+cy.
// Combinational. The adder tree of the processing element is built from
// these rows, as in the document.
module csa #(
  parameter int W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W:0]   cy
);

  assign s  = a ^ b ^ c;
  assign cy = {(a & b) | (a & c) | (b & c), 1'b0};

endmodule
