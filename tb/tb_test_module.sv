// tb_test_module -- the carry-save test accumulator: random signed 24-bit
// values are accumulated (with pauses), then the 64 bits are dumped and
// S + C is compared with the sign-extended sum mod 2^32; clear is checked too.
module tb_test_module;
  logic        clk = 0, rst_n = 0, clear = 0, acc_en = 0, dump = 0;
  logic [23:0] din = 0;
  logic        scan_out;
  int checks = 0, failures = 0;

  test_module dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dump_and_check(logic [31:0] expv);
    logic [63:0] bits;
    dump = 1;
    for (int b = 0; b < 64; b++) begin
      #1 bits[b] = scan_out;
      @(negedge clk);
    end
    dump = 0;
    checks++;
    if (bits[31:0] + bits[63:32] !== expv) begin
      failures++;
      $display("FAIL got %h exp %h", bits[31:0] + bits[63:32], expv);
    end
  endtask

  initial begin
    logic [31:0] ref_sum;
    @(negedge clk); rst_n = 1;
    for (int run = 0; run < 10; run++) begin
      clear = 1; @(negedge clk); clear = 0;
      ref_sum = 0;
      for (int i = 0; i < 300; i++) begin
        din    = 24'($urandom);
        if (run == 0) din = 24'h800000;   // most negative value
        acc_en = ($urandom % 4) != 0;
        if (acc_en) ref_sum += {{8{din[23]}}, din};
        @(negedge clk);
      end
      acc_en = 0;
      dump_and_check(ref_sum);
    end
    // clear empties the accumulator
    clear = 1; @(negedge clk); clear = 0;
    dump_and_check(32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
