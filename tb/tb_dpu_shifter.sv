// tb_dpu_shifter -- exhaustive check of the digit shifter.
// For every sample, digit and position p the shifter is fed the product
// (x, 0 or ~x) and the 15-bit term {sign, addend} is compared with
// d * x * 2^(7-p), minus 1 for a -1 digit (the 1 the compensation vector adds).
module tb_dpu_shifter;
  logic [6:0]  mag;
  logic        sign, pad;
  logic [2:0]  shift;
  logic [13:0] addend;
  int checks = 0, failures = 0;

  dpu_shifter dut (.mag(mag), .sign(sign), .pad(pad), .shift(shift), .addend(addend));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      for (int d = -1; d <= 1; d++) begin
        for (int p = 0; p < 8; p++) begin
          logic [7:0] prod;
          int expv, got;
          prod  = (d == 0) ? 8'h00 : (d == 1) ? 8'(v) : ~8'(v);
          {sign, mag} = prod;
          pad   = (d == -1);
          shift = 3'(p);
          #1;
          expv = d * v * (1 << (7 - p)) - ((d == -1) ? 1 : 0);
          got  = int'($signed({sign, addend}));
          checks++;
          if (got != expv) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d d=%0d p=%0d got %0d exp %0d", v, d, p, got, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
