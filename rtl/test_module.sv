// test_module -- on-chip result accumulator with serial read-out.
//
// Sums the filter output over a run so that a long full-speed test can be
// checked through one slow serial read. The IN_W-bit input is sign-extended
// and added each clock (acc_en=1) into a TEST_W-bit carry-save accumulator,
// a sum vector S and a carry vector C, so no carry propagates at full speed;
// the accumulated total is (S + C) mod 2^TEST_W.
// Controls, by priority: clear zeroes S and C; dump shifts S and then C out
// on scan_out, LSB first, one bit per clock (2*TEST_W clocks in all); acc_en
// accumulates. The 32-bit carry-save accumulation and serial scan-out at a
// slow clock are the document's; the read-out order (raw S then C, left to
// the reader to add) and the sign extension of the input are this design's.
module test_module #(
  parameter int IN_W   = rfir_pkg::ACC_W,
  parameter int TEST_W = rfir_pkg::TEST_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            acc_en,
  input  logic            dump,
  input  logic [IN_W-1:0] din,
  output logic            scan_out
);

  logic [TEST_W-1:0] s_q, c_q;
  logic [TEST_W-1:0] x, s_n;
  logic [TEST_W:0]   c_n;

  assign x = {{(TEST_W-IN_W){din[IN_W-1]}}, din};

  csa #(.W(TEST_W)) u_csa (.a(s_q), .b(c_q), .c(x), .s(s_n), .cy(c_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
    end else if (clear) begin
      s_q <= '0;
      c_q <= '0;
    end else if (dump) begin
      s_q <= {c_q[0], s_q[TEST_W-1:1]};
      c_q <= {1'b0, c_q[TEST_W-1:1]};
    end else if (acc_en) begin
      s_q <= s_n;
      c_q <= c_n[TEST_W-1:0];
    end
  end

  assign scan_out = s_q[0];

endmodule
