// tb_sign_ext_gen -- exhaustive check of the sign extension generator.
// For all 256 sign patterns the output must equal bits [23:14] of the sum of
// the eight terms' sign extensions, i.e. -(number of 1 signs) mod 2^10; the
// two end rows of the nine-case table (0 and 8 non-negative signs) are also
// checked against their literal values.
module tb_sign_ext_gen;
  logic [7:0] sign;
  logic [9:0] sext;
  int checks = 0, failures = 0;

  sign_ext_gen dut (.sign(sign), .sign_extend(sext));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [23:0] total;
      sign  = 8'(v);
      total = '0;
      for (int k = 0; k < 8; k++) if (sign[k]) total += 24'hFFC000;  // 10 ones at [23:14]
      #1;
      checks++;
      if (sext !== total[23:14]) begin
        failures++;
        $display("FAIL sign=%b got %b exp %b", sign, sext, total[23:14]);
      end
    end
    sign = 8'hFF; #1; checks++; if (sext !== 10'b1111111000) failures++;
    sign = 8'h00; #1; checks++; if (sext !== 10'b0000000000) failures++;
    sign = 8'h07; #1; checks++; if (sext !== 10'b1111111101) failures++;  // 5 non-negative
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
