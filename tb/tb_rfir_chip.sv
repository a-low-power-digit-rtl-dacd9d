// tb_rfir_chip -- end-to-end test of the filter chip at its default size.
// Each round loads a filter through the pins alone and checks it:
//  1. load phase (setup=1, mode=0, DumpCLK): 48 control bits per PE on ctrl_in and
//     the 24-bit compensation/partial sum on scan_in; the previous round's
//     control stream must come out of ctrl_out unchanged;
//  2. run (setup=0, CLK): samples from data_in or from the pseudorandom
//     generator (seeded through data_in); after a warm-up, every cycle checks
//     sum == P + 128 * sum_i h_i x[n-i] (mod 2^24) against a reference FIR
//     built from the digit list, and data_out == x[n - taps];
//  3. mode=1 for part of the run accumulates in the test module, mode=0
//     afterwards must not;
//  4. dump phase (setup=1, mode=1): 64 bits from scan_out, S + C must equal
//     the sum of the outputs seen while mode was 1.
// Configurations: the 3-tap 3/3/2-digit example, an 8-tap one-digit binary
// matched filter, an 8-digit single tap and random mixes, and every
// mechanism (both data sources, seed load, -1 and 0 digits, multi-digit taps,
// partial sum input, accumulate/hold switch, dump, reconfiguration, control
// chain output) is counted and must occur.
module tb_rfir_chip;
  import rfir_pkg::*;
  logic        clk = 0, dump_clk = 0, rst_n = 0, setup = 1, mode = 0;
  logic [2:0]  prdg_ctrl = 0;
  logic [7:0]  data_in = 0, data_out;
  logic        ctrl_in = 0, ctrl_out, scan_in = 0, scan_out;
  logic [23:0] sum;
  int checks = 0, failures = 0;

  localparam int NP = 1;          // processing elements in the chip
  localparam int ND = 8 * NP;     // DPUs
  localparam int NB = ND * CTRL_W; // control chain length

  rfir_chip dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dpu_ctrl_t  cw [ND];
  logic [7:0] hist [$];
  logic [7:0] lfsr_m = 8'h01;
  logic [NB-1:0] prev_stream;
  bit          have_prev = 0;

  // mechanism counters
  int n_prdg = 0, n_datain = 0, n_seed = 0, n_neg = 0, n_zero = 0, n_multi = 0;
  int n_partial = 0, n_acc = 0, n_hold = 0, n_dump = 0, n_reconf = 0, n_ctrlout = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one edge of the internal clock: DumpCLK in setup, CLK otherwise
  task automatic tick();
    logic [7:0] x;
    x = prdg_ctrl[0] ? lfsr_m : data_in;
    if (prdg_ctrl[2])      lfsr_m = (data_in == 0) ? 8'h01 : data_in;
    else if (prdg_ctrl[1]) lfsr_m = {lfsr_m[6:0], lfsr_m[7] ^ lfsr_m[5] ^ lfsr_m[4] ^ lfsr_m[3]};
    hist.push_front(x);
    if (hist.size() > 2*ND + 2*NP + 8) void'(hist.pop_back());
    #1;   // inputs, including setup, settle before the clock edge
    if (setup) begin dump_clk = 1; #20; dump_clk = 0; #20; end
    else       begin clk = 1;      #5;  clk = 0;      #5;  end
  endtask

  task automatic load(logic [23:0] scan_word);
    logic [NB-1:0] stream;
    int i;
    setup = 1; mode = 0; #1;
    i = 0;
    for (int k = ND-1; k >= 0; k--)
      for (int b = CTRL_W-1; b >= 0; b--) begin
        stream[NB-1-i] = cw[k][b];
        ctrl_in = cw[k][b];
        scan_in = (i >= NB-24) ? scan_word[i-(NB-24)] : 1'b0;
        data_in = 8'($urandom);
        #1;
        if (have_prev) begin
          check(ctrl_out === prev_stream[NB-1-i], "ctrl_out stream");
          n_ctrlout++;
        end
        tick();
        i++;
      end
    prev_stream = stream;
    have_prev = 1;
    n_reconf++;
  endtask

  task automatic round(bit use_prdg, int n_run);
    int nneg, taps, tap, digits;
    logic [23:0] part;
    logic [31:0] acc_exp;
    logic [63:0] bits;
    nneg = 0; taps = 0; digits = 0;
    for (int k = 0; k < ND; k++) begin
      if (!cw[k].zero && !cw[k].plus) begin nneg++; n_neg++; end
      if (cw[k].zero) n_zero++;
      digits++;
      if (cw[k].cfg) begin
        if (digits > 1) n_multi++;
        digits = 0;
        taps++;
      end
    end
    part = ($urandom % 2) ? 24'($urandom) : 24'h0;
    if (part != 0) n_partial++;
    prdg_ctrl = 3'b000;
    load(part + 24'(nneg));
    // run
    setup = 0; mode = 0;
    if (use_prdg) begin
      data_in = 8'($urandom); prdg_ctrl = 3'b100; tick(); n_seed++;
      prdg_ctrl = 3'b011;
    end
    repeat (ND + NP + 1) begin data_in = 8'($urandom); tick(); end
    acc_exp = 0;
    for (int n = 0; n < n_run; n++) begin
      logic [23:0] expv;
      mode = (n < n_run - 6);
      data_in = 8'($urandom);
      expv = part;   // the partial sum is held constant, so its delay does not matter
      tap  = NP - 1;   // each PE after the first adds one pipeline register
      for (int k = 0; k < ND; k++) begin
        int d;
        d = cw[k].zero ? 0 : (cw[k].plus ? 1 : -1);
        expv += 24'(d * int'($signed(hist[tap])) * (1 << (7 - int'(cw[k].shift))));
        tap += int'(cw[k].cfg);
      end
      #1;
      check(sum === expv, "sum");
      check(data_out === hist[taps + NP - 1], "data_out");
      if (mode) begin acc_exp += {{8{expv[23]}}, expv}; n_acc++; end
      else n_hold++;
      if (use_prdg) n_prdg++; else n_datain++;
      tick();
    end
    // dump
    mode = 0; #1; setup = 1; mode = 1; #1;
    for (int b = 0; b < 64; b++) begin
      #1 bits[b] = scan_out;
      tick();
    end
    check(bits[31:0] + bits[63:32] === acc_exp, "test module result");
    n_dump++;
  endtask

  task automatic require(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #3; rst_n = 1;
    // 3 taps with 3, 3, 2 digits
    for (int k = 0; k < ND; k++)
      cw[k] = '{cfg: (k % 8 == 2 || k % 8 == 5 || k % 8 == 7), zero: 1'b0, plus: 1'($urandom), shift: 3'(k % 8)};
    round(0, 40);
    // 8-tap binary matched filter, coefficients +-1
    for (int k = 0; k < ND; k++)
      cw[k] = '{cfg: 1'b1, zero: 1'b0, plus: 1'($urandom), shift: 3'd0};
    round(1, 40);
    // one tap with 8 digits
    for (int k = 0; k < ND; k++)
      cw[k] = '{cfg: (k % 8 == 7), zero: 1'b0, plus: 1'($urandom), shift: 3'(7 - k % 8)};
    round(0, 40);
    // a zero tap between two others
    for (int k = 0; k < ND; k++)
      cw[k] = '{cfg: (k % 8 == 3 || k % 8 == 4 || k % 8 == 7), zero: (k % 8 == 4),
                plus: (k % 8 != 4) && 1'($urandom), shift: 3'(k % 8)};
    round(1, 40);
    for (int r = 0; r < 12; r++) begin
      for (int k = 0; k < ND; k++) begin
        cw[k] = dpu_ctrl_t'($urandom);
        if (cw[k].zero) cw[k].plus = 0;
      end
      round(r % 2 == 1, 30);
    end
    require(n_prdg, "pseudorandom input");
    require(n_datain, "external input");
    require(n_seed, "seed load");
    require(n_neg, "-1 digit");
    require(n_zero, "0 digit");
    require(n_multi, "multi-digit tap");
    require(n_partial, "partial sum on scan_in");
    require(n_acc, "test accumulation");
    require(n_hold, "test hold");
    require(n_dump, "dump");
    require(n_reconf - 1, "reconfiguration");
    require(n_ctrlout, "control chain output");
    $display("mechanisms: prdg=%0d datain=%0d seed=%0d neg=%0d zero=%0d multi=%0d partial=%0d acc=%0d hold=%0d dump=%0d reconf=%0d ctrl_out=%0d",
             n_prdg, n_datain, n_seed, n_neg, n_zero, n_multi, n_partial, n_acc, n_hold, n_dump, n_reconf, n_ctrlout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
