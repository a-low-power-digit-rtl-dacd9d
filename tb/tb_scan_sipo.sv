// tb_scan_sipo -- the 24-bit scan SIPO: random words shifted in LSB first
// must appear in parallel after 24 clocks and hold while shift is low.
module tb_scan_sipo;
  logic        clk = 0, rst_n = 0, shift = 0, din = 0;
  logic [23:0] q;
  int checks = 0, failures = 0;

  scan_sipo dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    checks++; if (q !== 24'h0) failures++;
    for (int i = 0; i < 50; i++) begin
      logic [23:0] w;
      w = 24'($urandom);
      shift = 1;
      for (int b = 0; b < 24; b++) begin din = w[b]; @(negedge clk); end
      shift = 0; din = ~din;
      checks++; if (q !== w) begin failures++; $display("FAIL got %h exp %h", q, w); end
      repeat (3) @(negedge clk);
      checks++; if (q !== w) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
