// tb_pe_adder -- random check of the nine-input adder: the sum of eight
// 14-bit addends, the 24-bit acc and sign_extend placed at bits [23:14],
// modulo 2^24; includes all-ones inputs to exercise every carry.
module tb_pe_adder;
  logic [13:0] addend [8];
  logic [23:0] acc, sum;
  logic [9:0]  sext;
  int checks = 0, failures = 0;

  pe_adder dut (.addend(addend), .acc(acc), .sign_extend(sext), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [23:0] expv;
      for (int k = 0; k < 8; k++) addend[k] = (i == 0) ? '1 : 14'($urandom);
      acc  = (i == 0) ? '1 : 24'($urandom);
      sext = (i == 0) ? '1 : 10'($urandom);
      #1;
      expv = acc + {sext, 14'b0};
      for (int k = 0; k < 8; k++) expv += 24'(addend[k]);
      checks++;
      if (sum !== expv) begin
        failures++;
        $display("FAIL got %h exp %h", sum, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
