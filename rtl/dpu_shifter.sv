// dpu_shifter -- scales a digit product by 2^-p.
//
// The product (sign + DATA_W-1 magnitude bits) is sign-extended and shifted
// left by MAXP-p, giving a 2*(DATA_W-1)-bit addend whose LSBs are filled with
// `pad`: 0 for a +1 or 0 digit, 1 for a -1 digit. With the one's complement
// from the multiplier, a -1 digit then yields -x*2^(MAXP-p) - 1, and the
// missing 1 is supplied by the compensation vector. Together with `sign` the
// addend is a (2*DATA_W-1)-bit two's complement term. Combinational; follows
// the document (7-bit input, 14-bit output, shift by 7-p, LSB padding).
module dpu_shifter #(
  parameter int DATA_W  = rfir_pkg::DATA_W,
  parameter int SHIFT_W = rfir_pkg::SHIFT_W
) (
  input  logic [DATA_W-2:0]                 mag,
  input  logic                              sign,
  input  logic                              pad,
  input  logic [SHIFT_W-1:0]                shift,
  output logic [DATA_W-2+(1<<SHIFT_W)-1:0]  addend
);

  localparam int MAXP = (1 << SHIFT_W) - 1;
  localparam int AW   = DATA_W - 1 + MAXP;

  logic [SHIFT_W-1:0] amount;
  logic [AW-1:0]      extended;
  logic [AW-1:0]      fill;

  always_comb begin
    amount   = SHIFT_W'(MAXP) - shift;
    extended = {{MAXP{sign}}, mag};
    fill     = pad ? ((AW'(1) << amount) - AW'(1)) : '0;
    addend   = (extended << amount) | fill;
  end

endmodule
