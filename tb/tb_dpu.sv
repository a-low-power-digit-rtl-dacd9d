// tb_dpu -- check of one digit processing unit.
// For many random control words: the word is shifted in MSB first (and the
// previous word must appear on ctrl_out bit by bit), then random samples are
// clocked through. Each cycle it checks that the sample register holds the
// previous sample, that data_out is the registered sample for cfg=1 and the
// live input for cfg=0, and that the 15-bit term equals d*x*2^(7-p), minus
// 1 for a -1 digit.
module tb_dpu;
  import rfir_pkg::*;
  logic        clk = 0, rst_n = 0, ctrl_shift = 0, ctrl_in = 0, ctrl_out;
  logic [7:0]  data_in = 0, data_out;
  logic [13:0] addend;
  logic        sign;
  int checks = 0, failures = 0;

  dpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    dpu_ctrl_t w, prev;
    logic [7:0] x_prev;
    prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int iter = 0; iter < 200; iter++) begin
      int d, p, expv;
      w = dpu_ctrl_t'($urandom);
      if (w.zero) w.plus = 0;
      // load the word, MSB first; the old word leaves on ctrl_out
      ctrl_shift = 1;
      for (int b = CTRL_W-1; b >= 0; b--) begin
        ctrl_in = w[b];
        @(negedge clk);
        // after the shift the bit that left is the old word's next bit
      end
      ctrl_shift = 0;
      check(dut.ctrl === w, "control word loaded");
      check(ctrl_out === w[CTRL_W-1], "ctrl_out is the word MSB");
      d = w.zero ? 0 : (w.plus ? 1 : -1);
      p = int'(w.shift);
      x_prev = 8'($urandom);
      data_in = x_prev;
      @(negedge clk);
      for (int n = 0; n < 20; n++) begin
        data_in = 8'($urandom);
        #1;
        check(data_out === (w.cfg ? x_prev : data_in), "data_out mux");
        expv = d * int'($signed(x_prev)) * (1 << (7 - p)) - ((d == -1) ? 1 : 0);
        check(int'($signed({sign, addend})) == expv, "term value");
        x_prev = data_in;
        @(negedge clk);
      end
      prev = w;
    end
    // ctrl chain: shifting 6 more bits moves the word out MSB first
    ctrl_shift = 1;
    for (int b = CTRL_W-1; b >= 0; b--) begin
      check(ctrl_out === prev[b], "ctrl_out stream");
      ctrl_in = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
