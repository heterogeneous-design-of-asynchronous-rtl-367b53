// Self-checking testbench for the divide-by-256 counter: the output period is
// 256 input periods, and the stage outputs count input periods modulo 256
// (as a ripple counter of rising-edge toggles they hold 256 - n).
`timescale 1ps / 1ps
module tb_divider256;
  logic       reset, in, out;
  logic [7:0] count;
  int checks = 0, failures = 0;
  int n;
  realtime t0, t1;

  divider256 dut (.reset(reset), .in(in), .out(out), .count(count));

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; in = 0; #100;
    reset = 0; #100;
    checks++; if (count !== 8'd0 || out !== 0) begin failures++; $display("reset failed"); end
    n = 0;
    for (int i = 0; i < 700; i++) begin
      in = 1; #5; in = 0; #5;
      n++;
      checks++;
      if (count !== 8'(256 - n)) begin
        failures++;
        $display("after %0d periods count=%0d expected %0d", n, count, 8'(256 - n));
      end
    end
    // output period: 256 input periods of 10 ps
    fork
      forever begin in = 1; #5; in = 0; #5; end
      begin
        @(posedge out) t0 = $realtime;
        @(posedge out) t1 = $realtime;
        checks++;
        if (t1 - t0 != 2560) begin failures++; $display("out period %0t", t1 - t0); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join
  end
endmodule
