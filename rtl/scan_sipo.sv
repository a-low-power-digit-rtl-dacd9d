// scan_sipo -- W-bit serial-in-parallel-out register for the accumulated sum.
//
// On the chip it stands in for the PE's acc REG: while `shift` is 1 each
// clock moves din in at the MSB and shifts the word toward the LSB, so after
// W clocks the first bit sent is q[0] (LSB first). It is loaded with the
// compensation vector (first chip) or the partial sum of the previous chip
// (cascade); the serial order is this design's choice. q holds while shift
// is 0. Asynchronous active-low reset to 0.
module scan_sipo #(
  parameter int W = rfir_pkg::ACC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         din,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {din, q[W-1:1]};
  end

endmodule
