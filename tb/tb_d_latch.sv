// Self-checking testbench for d_latch.
// Two instances, open-high and open-low, get the same random data and enable
// sequence; each output is compared with a reference latch model (follows d
// while open, holds while closed, clears in reset).
module tb_d_latch;
  timeunit 1ps;
  timeprecision 1ps;

  logic       rst, en;
  logic [7:0] d, q_hi, q_lo, ref_hi, ref_lo;
  int checks = 0, failures = 0;

  d_latch #(.WIDTH(8), .OPEN_HIGH(1'b1)) dut_hi (.rst(rst), .en(en), .d(d), .q(q_hi));
  d_latch #(.WIDTH(8), .OPEN_HIGH(1'b0)) dut_lo (.rst(rst), .en(en), .d(d), .q(q_lo));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = 8'h5a; ref_hi = 0; ref_lo = 0;
    #10;
    checks += 2;
    if (q_hi !== 0) failures++;
    if (q_lo !== 0) failures++;
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      if ($urandom_range(3) == 0) en = ~en;
      d = 8'($urandom);
      if (en)  ref_hi = d;
      if (!en) ref_lo = d;
      #10;
      checks += 2;
      if (q_hi !== ref_hi) begin failures++; $display("hi step %0d en=%b d=%h q=%h exp=%h", i, en, d, q_hi, ref_hi); end
      if (q_lo !== ref_lo) begin failures++; $display("lo step %0d en=%b d=%h q=%h exp=%h", i, en, d, q_lo, ref_lo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
