// dpu_multiplier -- multiplies a sample by one canonical-signed digit.
//
// The digit is given by two control bits: zero=1 forces the product to 0;
// otherwise plus=1 passes the sample unchanged (digit +1) and plus=0 outputs
// its one's complement (digit -1). The +1 that would complete the two's
// complement negation is not added here: it is collected for all -1 digits of
// the filter into a compensation vector that presets the accumulated sum.
// Output: the product's MSB as `sign` and its other DATA_W-1 bits as `mag`.
// Purely combinational. All of this follows the document.
module dpu_multiplier #(
  parameter int DATA_W = rfir_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] x,
  input  logic              zero,
  input  logic              plus,
  output logic [DATA_W-2:0] mag,
  output logic              sign
);

  logic [DATA_W-1:0] prod;

  always_comb begin
    if (zero)      prod = '0;
    else if (plus) prod = x;
    else           prod = ~x;
  end

  assign sign = prod[DATA_W-1];
  assign mag  = prod[DATA_W-2:0];

endmodule
