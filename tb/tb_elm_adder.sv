// tb_elm_adder -- random and corner-case check of the 24-bit ELM adder
// against a + b mod 2^24, including carries that ripple across all slices.
module tb_elm_adder;
  logic [23:0] a, b, sum;
  int checks = 0, failures = 0;

  elm_adder dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = 24'($urandom); b = 24'($urandom);
      case (i)
        0: begin a = 24'hFFFFFF; b = 24'h000001; end
        1: begin a = 24'h0FFFFF; b = 24'h000001; end
        2: begin a = 24'h7FFFFF; b = 24'h7FFFFF; end
        3: begin a = 24'h00FFF0; b = 24'h000010; end
        default: ;
      endcase
      #1;
      checks++;
      if (sum !== 24'(a + b)) begin
        failures++;
        $display("FAIL %h + %h got %h", a, b, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
