// tb_csa -- random check of the carry-save row at its default 14 bits: s + cy == a + b + c.
module tb_csa;
  logic [13:0] a, b, c, s;
  logic [14:0] cy;
  int checks = 0, failures = 0;

  csa dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = 14'($urandom); b = 14'($urandom); c = 14'($urandom);
      if (i == 0) begin a = '1; b = '1; c = '1; end
      #1;
      checks++;
      if (32'(s) + 32'(cy) != 32'(a) + 32'(b) + 32'(c)) begin
        failures++;
        $display("FAIL %h %h %h -> %h %h", a, b, c, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
