// sign_ext_gen -- sum of the sign-extension bits of the DPU terms.
//
// Each DPU term is (ADDEND_W+1) bits wide; sign-extending it to ACC_W bits
// would add sign*(2^ACC_W - 2^ADDEND_W). Summed over K terms this is
// -(number of negative terms) * 2^ADDEND_W, so only bits [ACC_W-1:ADDEND_W]
// are needed. With K a power of two the SEXT_W-bit value is all zeros when no
// term is negative and otherwise all ones above the log2(K) LSBs, which equal
// the count of non-negative (sign=0) terms. Implemented as the document
// describes: complement the signs, count them, keep the log2(K) LSBs, and set
// the upper bits when at least one sign is 1. Combinational.
module sign_ext_gen #(
  parameter int K      = 8,
  parameter int SEXT_W = rfir_pkg::SEXT_W
) (
  input  logic [K-1:0]      sign,
  output logic [SEXT_W-1:0] sign_extend
);

  localparam int CW = $clog2(K);

  logic [CW:0] nonneg;

  always_comb begin
    nonneg = '0;
    for (int i = 0; i < K; i++) nonneg += (CW+1)'(~sign[i]);
    sign_extend = (|sign) ? {{(SEXT_W-CW){1'b1}}, nonneg[CW-1:0]} : '0;
  end

  // The closed form above holds only for a power-of-two number of DPUs.
  if ((1 << CW) != K) begin : g_bad_k
    $error("sign_ext_gen: K must be a power of two");
  end

endmodule
