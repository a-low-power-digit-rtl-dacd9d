// tb_elm4 -- exhaustive check of the 4-bit ELM cell.
// For every pair of operands and carry-in 0 and 1, the sum rebuilt from the
// cell outputs (ps ^ prefix-propagate & cin, carry out G | P & cin) must equal
// a + b + cin.
module tb_elm4;
  logic [3:0] a, b, ps;
  logic [2:0] pp;
  logic       g, p;
  int checks = 0, failures = 0;

  elm4 dut (.a(a), .b(b), .ps(ps), .pp(pp), .g(g), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      for (int cin = 0; cin < 2; cin++) begin
        logic [4:0] got, expv;
        got[3:0] = ps ^ ({pp, 1'b1} & {4{cin[0]}});
        got[4]   = g | (p & cin[0]);
        expv     = 5'(a) + 5'(b) + 5'(cin);
        checks++;
        if (got !== expv) begin
          failures++;
          $display("FAIL a=%h b=%h cin=%0d got %h exp %h", a, b, cin, got, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
