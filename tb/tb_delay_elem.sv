// Self-checking testbench for delay_elem (13 ns, the 4-phase Delta value).
// The input toggles at random intervals, some shorter than the delay. Every
// input edge must reappear at the output exactly DELAY_PS later: the output is
// checked 1 ps before (old value) and 1 ps after (new value) each expected edge, which
// also shows that short pulses are passed, not swallowed.
module tb_delay_elem;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D = 13000;

  logic a, y;
  int checks = 0, failures = 0;
  time  edge_t[$];
  logic edge_v[$];

  delay_elem #(.DELAY_PS(D)) dut (.a(a), .y(y));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input stimulus
  initial begin
    a = 0;
    #(2 * D);
    for (int i = 0; i < 200; i++) begin
      #($urandom_range(30000, 300));
      a = ~a;
      edge_t.push_back($time);
      edge_v.push_back(a);
    end
    #(2 * D);
    checks++;
    if (y !== a) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: for each input edge, look at the output around time edge+D
  initial begin
    time t; logic v;
    #(2 * D);
    forever begin
      wait (edge_t.size() > 0);
      t = edge_t.pop_front(); v = edge_v.pop_front();
      #(t + D - 1 - $time);
      checks++;
      if (y !== ~v) begin failures++; $display("early edge at %0t", $time); end
      #2;
      checks++;
      if (y !== v) begin failures++; $display("missing edge at %0t", $time); end
    end
  end
endmodule
