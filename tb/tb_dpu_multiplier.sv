// tb_dpu_multiplier -- exhaustive check of the signed-digit multiplier.
// Every 8-bit sample is multiplied by each digit (+1, 0, -1); the product is
// compared with x, 0 or ~x, and for -1 it is checked that adding the owed 1
// gives exactly -x in two's complement.
module tb_dpu_multiplier;
  logic [7:0] x;
  logic       zero, plus;
  logic [6:0] mag;
  logic       sign;
  int checks = 0, failures = 0;

  dpu_multiplier dut (.x(x), .zero(zero), .plus(plus), .mag(mag), .sign(sign));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int d = -1; d <= 1; d++) begin
        logic [7:0] exp_p;
        x    = 8'(v);
        zero = (d == 0);
        plus = (d == 1);
        #1;
        exp_p = (d == 0) ? 8'h00 : (d == 1) ? 8'(v) : 8'(255 - v);
        checks++;
        if ({sign, mag} !== exp_p) begin
          failures++;
          $display("FAIL x=%0d d=%0d got %h exp %h", v, d, {sign, mag}, exp_p);
        end
        if (d == -1) begin
          checks++;
          if (8'({sign, mag} + 8'd1) !== 8'(-v)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
