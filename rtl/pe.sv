// pe -- processing element: one pipeline stage of eight DPUs.
//
// Eight DPUs are cascaded on three chains: the serial control chain
// (ctrl_in -> DPU1 ... DPU8 -> ctrl_out), the sample chain (data_in -> DPU1
// ... DPU8 -> output REG -> data_out) and their partial products, which the
// sign extension generator and the nine-input adder sum together with the
// accumulated sum `acc`:
//     sum = acc + sum_k (addend_k - sign_k * 2^14)   (mod 2^24)
// `acc` must come from a register outside this module: the previous stage's
// pipeline REG, or on the chip the 24-bit scan SIPO holding the compensation
// vector. `sum` is combinational from the DPUs' sample registers and `acc`.
// data_out is registered so that the next stage, whose acc is also one
// register later, stays aligned. K = 8 DPUs per stage as on the chip.
module pe
  import rfir_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ctrl_shift,
  input  logic              ctrl_in,
  output logic              ctrl_out,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  input  logic [ACC_W-1:0]  acc,
  output logic [ACC_W-1:0]  sum
);

  localparam int K = 8;

  logic [K:0]          ctrl_chain;
  logic [DATA_W-1:0]   data_chain [K+1];
  logic [ADDEND_W-1:0] addend [K];
  logic [K-1:0]        sign;
  logic [SEXT_W-1:0]   sign_extend;

  assign ctrl_chain[0] = ctrl_in;
  assign data_chain[0] = data_in;

  for (genvar k = 0; k < K; k++) begin : g_dpu
    dpu u_dpu (
      .clk        (clk),
      .rst_n      (rst_n),
      .ctrl_shift (ctrl_shift),
      .ctrl_in    (ctrl_chain[k]),
      .ctrl_out   (ctrl_chain[k+1]),
      .data_in    (data_chain[k]),
      .data_out   (data_chain[k+1]),
      .addend     (addend[k]),
      .sign       (sign[k])
    );
  end
  assign ctrl_out = ctrl_chain[K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_out <= '0;
    else        data_out <= data_chain[K];
  end

  sign_ext_gen #(.K(K), .SEXT_W(SEXT_W)) u_sext (
    .sign        (sign),
    .sign_extend (sign_extend)
  );

  pe_adder u_add (
    .addend      (addend),
    .acc         (acc),
    .sign_extend (sign_extend),
    .sum         (sum)
  );

endmodule
