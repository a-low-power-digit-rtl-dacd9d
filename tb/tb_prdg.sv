// tb_prdg -- pseudorandom data generator: select between data_in and the
// sequence, seed loading (including the all-zero seed), and the sequence
// itself against an independent model of x^8+x^6+x^5+x^4+1, whose period
// must be 255.
module tb_prdg;
  logic       clk = 0, rst_n = 0;
  logic [2:0] ctrl = 0;
  logic [7:0] data_in = 0, data_out;
  int checks = 0, failures = 0;

  prdg dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  initial begin
    logic [7:0] m, first;
    int period;
    @(negedge clk); rst_n = 1;
    // select: data_in passes through
    ctrl = 3'b000;
    for (int i = 0; i < 20; i++) begin
      data_in = 8'($urandom); #1;
      checks++; if (data_out !== data_in) failures++;
      @(negedge clk);
    end
    // reset value 1 shows with select=1 and run=0
    ctrl = 3'b001; #1;
    checks++; if (data_out !== 8'h01) failures++;
    // seed load
    data_in = 8'hA5; ctrl = 3'b100; @(negedge clk);
    ctrl = 3'b001; #1;
    checks++; if (data_out !== 8'hA5) failures++;
    // run and compare with the model
    m = 8'hA5;
    ctrl = 3'b011;
    for (int i = 0; i < 600; i++) begin
      data_in = 8'($urandom); #1;
      checks++; if (data_out !== m) begin failures++; if (failures < 5) $display("FAIL %h %h", data_out, m); end
      m = step(m);
      @(negedge clk);
    end
    // period of the sequence
    first = data_out; period = 0;
    do begin @(negedge clk); period++; end while (data_out != first && period < 1000);
    checks++; if (period != 255) begin failures++; $display("FAIL period %0d", period); end
    // zero seed is replaced by 1
    data_in = 8'h00; ctrl = 3'b110; @(negedge clk);
    ctrl = 3'b001; #1;
    checks++; if (data_out !== 8'h01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
