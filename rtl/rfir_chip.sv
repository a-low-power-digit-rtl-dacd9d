// rfir_chip -- digit-reconfigurable FIR filter chip.
//
// The filter computes y[n] = sum_i h_i x[n-i] where every coefficient h_i is
// a sum of one or more signed power-of-two digits, and each digit occupies
// one digit processing unit (DPU). Taps and digits per tap are set freely by
// the control words loaded into the DPUs, up to 8*N_PE digits in all.
//
// Blocks: the pseudorandom data generator (input select), N_PE processing
// elements of 8 DPUs each (one on the chip), the 24-bit scan SIPO that
// presets the first PE's accumulated sum, and the test module.
// Clocks: CLK runs the filter; DumpCLK loads the configuration and shifts
// out results. Here one internal clock is taken from DumpCLK while setup=1
// and from CLK while setup=0; setup may only change while both clocks are
// low (checked by an assertion).
// Phases (setup, mode):
//   1,0  load:  on each DumpCLK the DPU control chain takes ctrl_in, the scan
//               SIPO takes scan_in, and the test accumulator is cleared.
//   1,1  dump:  the test module shifts its result out on scan_out.
//   0,1  run with test accumulation of the filter output on CLK.
//   0,0  run without accumulation.
// Timing: with data_in = x[n] in a cycle, `sum` in the next cycle is
// comp + 2^7 * sum_i h_i x[n-i] (mod 2^24), comp being the scan SIPO
// contents. A second PE adds one cycle of latency (pipeline registers on
// its data and acc inputs). data_out is the sample chain after the last PE,
// registered, for a cascaded chip.
// Following the document: the block set, the pins (CLK, DumpCLK, ctrl_in/out,
// data_in/out, 3 PRDG controls, scan_in/out, Setup, Mode), the 24-bit SIPO
// in place of the acc REG, and the 8-DPU PE. This design's own choices: the
// meaning of Setup/Mode, the clock selection, the `sum` observation port,
// the active-low reset, and the pipeline REG between PEs when N_PE > 1.
module rfir_chip
  import rfir_pkg::*;
#(
  parameter int N_PE = 1
) (
  input  logic              clk,
  input  logic              dump_clk,
  input  logic              rst_n,
  input  logic              setup,
  input  logic              mode,
  input  logic [2:0]        prdg_ctrl,
  input  logic [DATA_W-1:0] data_in,
  input  logic              ctrl_in,
  output logic              ctrl_out,
  output logic [DATA_W-1:0] data_out,
  input  logic              scan_in,
  output logic              scan_out,
  output logic [ACC_W-1:0]  sum
);

  logic core_clk;
  assign core_clk = setup ? dump_clk : clk;

  // Clock-switch rule: Setup may only change while both clocks are low, or
  // the multiplexed clock would see a spurious edge.
  always @(setup) begin
    assert (!clk && !dump_clk)
      else $error("rfir_chip: setup changed while a clock was high");
  end

  logic load_phase, dump_phase, test_run;
  assign load_phase = setup & ~mode;
  assign dump_phase = setup & mode;
  assign test_run   = ~setup & mode;

  logic [DATA_W-1:0] first_data;
  prdg #(.DATA_W(DATA_W)) u_prdg (
    .clk      (core_clk),
    .rst_n    (rst_n),
    .ctrl     (prdg_ctrl),
    .data_in  (data_in),
    .data_out (first_data)
  );

  logic [ACC_W-1:0] comp;
  scan_sipo #(.W(ACC_W)) u_sipo (
    .clk   (core_clk),
    .rst_n (rst_n),
    .shift (load_phase),
    .din   (scan_in),
    .q     (comp)
  );

  logic [N_PE:0]     ctrl_chain;
  logic [DATA_W-1:0] data_chain [N_PE+1];
  logic [ACC_W-1:0]  acc_in     [N_PE];
  logic [ACC_W-1:0]  pe_sum     [N_PE];

  assign ctrl_chain[0] = ctrl_in;
  assign data_chain[0] = first_data;
  assign acc_in[0]     = comp;

  for (genvar j = 0; j < N_PE; j++) begin : g_pe
    pe u_pe (
      .clk        (core_clk),
      .rst_n      (rst_n),
      .ctrl_shift (load_phase),
      .ctrl_in    (ctrl_chain[j]),
      .ctrl_out   (ctrl_chain[j+1]),
      .data_in    (data_chain[j]),
      .data_out   (data_chain[j+1]),
      .acc        (acc_in[j]),
      .sum        (pe_sum[j])
    );
    if (j > 0) begin : g_acc_reg
      always_ff @(posedge core_clk or negedge rst_n) begin
        if (!rst_n) acc_in[j] <= '0;
        else        acc_in[j] <= pe_sum[j-1];
      end
    end
  end

  assign ctrl_out = ctrl_chain[N_PE];
  assign data_out = data_chain[N_PE];
  assign sum      = pe_sum[N_PE-1];

  test_module #(.IN_W(ACC_W), .TEST_W(TEST_W)) u_test (
    .clk      (core_clk),
    .rst_n    (rst_n),
    .clear    (load_phase),
    .acc_en   (test_run),
    .dump     (dump_phase),
    .din      (sum),
    .scan_out (scan_out)
  );

endmodule
