// tb_rfir_pn128 -- a 128-chip binary PN code matched filter on 16 PEs.
// The 128 DPUs are configured as 128 one-digit taps (coefficients +1/-1,
// digit position 0) holding a random 128-chip code time-reversed; the
// compensation vector is the number of -1 taps. The input is the code,
// chips mapped to +64/-64, sent three times back to back. Every cycle the
// output is compared with a reference FIR (the output lags the input by the
// 15 inter-PE pipeline registers), and the correlation peak
// 128 * 64 * 128 = 2^20 must appear exactly when a full code period has
// entered the filter.
module tb_rfir_pn128;
  import rfir_pkg::*;
  localparam int NP = 16;
  localparam int ND = 8 * NP;
  localparam int L  = 128;

  logic        clk = 0, dump_clk = 0, rst_n = 0, setup = 1, mode = 0;
  logic [2:0]  prdg_ctrl = 0;
  logic [7:0]  data_in = 0, data_out;
  logic        ctrl_in = 0, ctrl_out, scan_in = 0, scan_out;
  logic [23:0] sum;
  int checks = 0, failures = 0;

  rfir_chip #(.N_PE(NP)) dut (.*);

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        code [L];
  logic [7:0]  hist [$];
  int          peaks = 0, peaks_exp = 0;

  task automatic tick();
    hist.push_front(data_in);
    if (hist.size() > L + NP + 4) void'(hist.pop_back());
    #1;   // inputs, including setup, settle before the clock edge
    if (setup) begin dump_clk = 1; #20; dump_clk = 0; #20; end
    else       begin clk = 1;      #5;  clk = 0;      #5;  end
  endtask

  initial begin
    int nneg, i;
    logic [23:0] comp;
    #3; rst_n = 1;
    nneg = 0;
    for (int k = 0; k < L; k++) begin
      code[k] = 1'($urandom);
      if (!code[k]) nneg++;
    end
    // tap i (DPU i) holds h_i = c[L-1-i]; the last DPU's word goes in first
    comp = 24'(nneg);
    i = 0;
    for (int k = ND-1; k >= 0; k--) begin
      dpu_ctrl_t w;
      w = '{cfg: 1'b1, zero: 1'b0, plus: code[L-1-k], shift: 3'd0};
      for (int b = CTRL_W-1; b >= 0; b--) begin
        ctrl_in = w[b];
        scan_in = (i >= ND*CTRL_W - 24) ? comp[i - (ND*CTRL_W - 24)] : 1'b0;
        tick();
        i++;
      end
    end
    setup = 0;
    data_in = 0;
    repeat (L + NP) tick();       // flush the delay line with zeros
    for (int n = 0; n < 3*L + NP; n++) begin
      logic [23:0] expv;
      int y;
      data_in = (n < 3*L) ? (code[n % L] ? 8'sd64 : -8'sd64) : 8'd0;
      y = 0;
      for (int t = 0; t < L; t++)
        y += (code[L-1-t] ? 1 : -1) * int'($signed(hist[t + NP - 1])) * 128;
      expv = 24'(y);
      #1;
      checks++;
      if (sum !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %0d exp %0d", n, $signed(sum), y);
      end
      if (y == (1 << 20)) peaks_exp++;
      if ($signed(sum) == (1 << 20)) peaks++;
      tick();
    end
    // full code periods are inside the filter after samples L-1, 2L-1, 3L-1
    checks++;
    if (peaks != 3 || peaks_exp != 3) begin
      failures++;
      $display("FAIL peaks seen %0d expected 3 (model %0d)", peaks, peaks_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
