// Self-checking testbench for sync_pipeline (three rising-edge flip-flops).
// Random data enter every cycle; q must equal the input of three cycles
// earlier and each stage output the input of i+1 cycles earlier. Then the
// fault port of the middle flip-flop is exercised: a forced value that spans
// a rising clock edge is captured (and reaches q one cycle later), one that
// starts and ends between two edges is masked.
module tb_sync_pipeline;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TCLK = 20000;

  logic            clk = 0, rst;
  logic [7:0]      d, q;
  logic [2:0]      ff;
  logic [2:0][7:0] fv, sq;
  logic [7:0]      hist[$];
  int checks = 0, failures = 0;

  sync_pipeline dut (.clk(clk), .rst(rst), .d(d), .q(q), .flt_force(ff), .flt_value(fv), .stage_q(sq));

  always #(TCLK / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 0; ff = '0; fv = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(sq == '0, "reset clears all stages");
    for (int i = 0; i < 300; i++) begin
      d = 8'($urandom);
      hist.push_front(d);
      @(posedge clk); #1;
      if (hist.size() >= 3) begin
        check(q == hist[2], "q is d delayed by three cycles");
        check(sq[0] == hist[0] && sq[1] == hist[1], "stage outputs");
      end
    end
    // fault on the middle flip-flop's D input spanning a clock edge
    d = 8'h00;
    repeat (4) @(posedge clk);
    #(TCLK / 2);                          // mid-cycle
    ff[1] = 1; fv[1] = 8'hff;
    #(TCLK);                              // spans the next rising edge
    ff[1] = 0;
    check(sq[1] == 8'hff, "fault across the edge captured");
    @(posedge clk); #1;
    check(q == 8'hff, "captured fault reaches q");
    repeat (3) @(posedge clk);
    #1 check(sq == '0, "pipeline flushed");
    // fault between two edges: masked
    #(TCLK / 4);
    ff[1] = 1; fv[1] = 8'hff;
    #(TCLK / 2);
    ff[1] = 0;
    repeat (3) @(posedge clk);
    #1 check(sq == '0, "fault between edges masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
