// dpu -- digit processing unit, the basic building block of the filter.
//
// One DPU evaluates one signed-digit term d * 2^-p * x[n-i] of a coefficient.
//  * Control: a CTRL_W-bit serial-in-parallel-out register loaded through the
//    chain ctrl_in -> ctrl_out while ctrl_shift is 1 (cfg = config, zero, plus,
//    shift; see rfir_pkg::dpu_ctrl_t).
//  * Data: the incoming sample is registered every cycle. The multiplier works
//    on the registered sample. The output mux passes on either the unbuffered
//    input (config=0, more digits of the same tap follow) or the registered
//    sample (config=1, last digit of the tap, so the next tap sees x one
//    sample older).
//  * Result: `addend` (14 bits) and `sign`; the term's value is
//    addend - sign*2^14 (plus 1 owed for a -1 digit, see dpu_multiplier).
// Timing: data register and control register on clk; addend/sign are
// combinational from the registered sample. The structure is the document's
// (Fig. 1); the control bit order and config polarity are this design's.
module dpu
  import rfir_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ctrl_shift,
  input  logic                ctrl_in,
  output logic                ctrl_out,
  input  logic [DATA_W-1:0]   data_in,
  output logic [DATA_W-1:0]   data_out,
  output logic [ADDEND_W-1:0] addend,
  output logic                sign
);

  dpu_ctrl_t         ctrl;
  logic [DATA_W-1:0] data_q;
  logic [MAG_W-1:0]  mag;
  logic              msb;

  // control SIPO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ctrl <= '0;
    else if (ctrl_shift) ctrl <= {ctrl[CTRL_W-2:0], ctrl_in};
  end
  assign ctrl_out = ctrl[CTRL_W-1];

  // data REG and bypass MUX
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_q <= '0;
    else        data_q <= data_in;
  end
  assign data_out = ctrl.cfg ? data_q : data_in;

  dpu_multiplier #(.DATA_W(DATA_W)) u_mult (
    .x    (data_q),
    .zero (ctrl.zero),
    .plus (ctrl.plus),
    .mag  (mag),
    .sign (msb)
  );

  dpu_shifter #(.DATA_W(DATA_W), .SHIFT_W(SHIFT_W)) u_shift (
    .mag    (mag),
    .sign   (msb),
    .pad    (~ctrl.zero & ~ctrl.plus),
    .shift  (ctrl.shift),
    .addend (addend)
  );

  assign sign = msb;

endmodule
