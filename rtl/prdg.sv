// prdg -- pseudorandom data generator and input select of the filter.
//
// Supplies the first DPU either with the external sample data_in or with an
// 8-bit pseudorandom sequence, so that the filter can be exercised at full
// speed without an external pattern source. The three control signals are
//   ctrl[0]  select: 1 = pseudorandom sequence to the DPUs, 0 = data_in
//   ctrl[1]  run:    advance the sequence every clock
//   ctrl[2]  seed:   load the generator from data_in (0 is replaced by 1)
// (seed has priority over run). The generator is a maximal-length Fibonacci
// LFSR with feedback x^8 + x^6 + x^5 + x^4 + 1 (period 255); it resets to
// 8'h01. data_out is combinational from the select and the LFSR register.
// The block, its 8-bit input/output and its three control signals are the
// document's; the generator polynomial and control encoding are this
// design's own.
module prdg #(
  parameter int DATA_W = rfir_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        ctrl,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);

  logic [7:0] lfsr;
  logic       fb;

  assign fb = lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lfsr <= 8'h01;
    else if (ctrl[2]) lfsr <= (data_in[7:0] == 8'h00) ? 8'h01 : data_in[7:0];
    else if (ctrl[1]) lfsr <= {lfsr[6:0], fb};
  end

  assign data_out = ctrl[0] ? DATA_W'(lfsr) : data_in;

  if (DATA_W != 8) begin : g_bad_w
    $error("prdg: the generator is 8 bits wide");
  end

endmodule
