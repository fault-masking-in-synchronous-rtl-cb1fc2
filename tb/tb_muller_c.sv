// Self-checking testbench for muller_c.
// Drives a long random sequence of input pairs (with occasional resets) and
// compares the output after each step with a reference C-element kept in the
// testbench: output = a when a == b, otherwise the previous output; 0 in reset.
module tb_muller_c;
  timeunit 1ps;
  timeprecision 1ps;

  logic rst, a, b, c, ref_c;
  int checks = 0, failures = 0;

  muller_c dut (.rst(rst), .a(a), .b(b), .c(c));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; a = 0; b = 0; ref_c = 0;
    #10;
    checks++; if (c !== 1'b0) begin failures++; $display("reset: c=%b", c); end
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom_range(1)); b = 1'($urandom_range(1));
      rst = ($urandom_range(40) == 0);
      if (rst) ref_c = 1'b0; else if (a == b) ref_c = a;
      #10;
      checks++;
      if (c !== ref_c) begin failures++; $display("step %0d a=%b b=%b c=%b exp=%b", i, a, b, c, ref_c); end
    end
    // hold behaviour explicitly: set, then disagree both ways
    rst = 0; a = 1; b = 1; #10; a = 0; #10;
    checks++; if (c !== 1'b1) failures++;
    a = 1; b = 0; #10;
    checks++; if (c !== 1'b1) failures++;
    a = 0; b = 0; #10;
    checks++; if (c !== 1'b0) failures++;
    b = 1; #10;
    checks++; if (c !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
