// tb_pe -- processing element against an FIR reference model.
// Configurations: the 3-tap example with 3, 3 and 2 digits per tap, an 8-tap
// one-digit (binary matched filter) set, one 8-digit tap, and random ones
// (random tap boundaries, digits +1/0/-1, positions 0..7). For each, the
// control words are shifted in, the acc input is set to a random partial
// sum plus the number of -1 digits (the compensation), random samples are
// clocked, and after a warm-up every cycle checks
//   sum      == P + sum_i (128*h_i) * x[n-i]   (mod 2^24)
//   data_out == x[n - taps]
// and, for the 3-tap case, which sample each DPU holds (taps 1, 2, 3 see
// x[n], x[n-1], x[n-2]).
module tb_pe;
  import rfir_pkg::*;
  logic        clk = 0, rst_n = 0, ctrl_shift = 0, ctrl_in = 0, ctrl_out;
  logic [7:0]  data_in = 0, data_out;
  logic [23:0] acc = 0, sum;
  int checks = 0, failures = 0;

  pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dpu_ctrl_t cw [8];
  logic [7:0] held [8];   // sample register of each DPU
  for (genvar g = 0; g < 8; g++) begin : g_probe
    assign held[g] = dut.g_dpu[g].u_dpu.data_q;
  end
  logic [7:0] hist [$];   // hist[0] is the sample clocked most recently

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic clock_sample(logic [7:0] x);
    data_in = x;
    @(negedge clk);
    hist.push_front(x);
    if (hist.size() > 40) void'(hist.pop_back());
  endtask

  task automatic load_config();
    ctrl_shift = 1;
    for (int k = 7; k >= 0; k--)
      for (int b = CTRL_W-1; b >= 0; b--) begin
        ctrl_in = cw[k][b];
        clock_sample(8'($urandom));
      end
    ctrl_shift = 0;
  endtask

  task automatic run_config(bit table1);
    int nneg, tap, taps;
    logic [23:0] part;
    nneg = 0;
    for (int k = 0; k < 8; k++) if (!cw[k].zero && !cw[k].plus) nneg++;
    part = 24'($urandom);
    load_config();
    acc = part + 24'(nneg);
    taps = 0;
    for (int k = 0; k < 8; k++) taps += int'(cw[k].cfg);
    repeat (9) clock_sample(8'($urandom));
    for (int n = 0; n < 40; n++) begin
      logic [23:0] expv;
      expv = part;
      tap  = 0;
      for (int k = 0; k < 8; k++) begin
        int d;
        d = cw[k].zero ? 0 : (cw[k].plus ? 1 : -1);
        expv += 24'(d * int'($signed(hist[tap])) * (1 << (7 - int'(cw[k].shift))));
        if (table1) check(held[k] === hist[tap], "DPU sample alignment");
        tap += int'(cw[k].cfg);
      end
      #1;
      check(sum === expv, "sum");
      check(data_out === hist[taps], "data_out");
      clock_sample(8'($urandom));
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    // 3 taps with 3, 3, 2 digits
    for (int k = 0; k < 8; k++) begin
      cw[k].zero  = 0;
      cw[k].plus  = 1'($urandom);
      cw[k].shift = 3'(k);
      cw[k].cfg   = (k == 2 || k == 5 || k == 7);
    end
    run_config(1);
    // 8 taps, one digit each, p = 0 (1-bit coefficients)
    for (int k = 0; k < 8; k++) begin
      cw[k] = '{cfg: 1'b1, zero: 1'b0, plus: 1'($urandom), shift: 3'd0};
    end
    run_config(0);
    // one tap with 8 digits
    for (int k = 0; k < 8; k++) begin
      cw[k] = '{cfg: (k == 7), zero: 1'b0, plus: 1'($urandom), shift: 3'(7 - k)};
    end
    run_config(0);
    // random
    for (int r = 0; r < 30; r++) begin
      for (int k = 0; k < 8; k++) begin
        cw[k] = dpu_ctrl_t'($urandom);
        if (cw[k].zero) cw[k].plus = 0;
      end
      run_config(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
