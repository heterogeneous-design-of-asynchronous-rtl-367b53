// Self-checking testbench for the pausible-clock generator model.
//
// A simple mutex model closes the ring. Checked: the free-running period is
// 2 * HALF_PERIOD_PS (454 ps, 2.2 GHz); holding the mutex while sysclk is low
// stretches the low phase by the hold time and the clock resumes after it;
// en low stops the clock low.
`timescale 1ps / 1ps
module tb_pcc_clock_gen;
  localparam int HP = 227;
  logic en, grant, rclk, sysclk, hold;
  int checks = 0, failures = 0;
  realtime t0, t1, tl;

  pcc_clock_gen #(.HALF_PERIOD_PS(HP)) dut (.en(en), .grant(grant), .rclk(rclk), .sysclk(sysclk));

  // mutex stand-in: the ring gets the grant unless the other side holds it
  assign grant = rclk & ~hold;

  initial begin
    #200_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; hold = 0;
    #2000;
    checks++; if (sysclk !== 0) begin failures++; $display("clock runs while disabled"); end
    en = 1;
    repeat (3) @(posedge sysclk);
    // free-running period
    for (int i = 0; i < 10; i++) begin
      @(posedge sysclk) t0 = $realtime;
      @(posedge sysclk) t1 = $realtime;
      checks++;
      if (t1 - t0 != 2 * HP) begin failures++; $display("period %0t expected %0d", t1 - t0, 2 * HP); end
    end
    // pause: take the mutex while the clock is low
    @(negedge grant);
    #1;
    hold = 1;
    tl = $realtime;
    #1000;
    checks++; if (sysclk !== 0) begin failures++; $display("clock not paused"); end
    hold = 0;
    @(posedge sysclk);
    checks++;
    if ($realtime - tl < 1000) begin failures++; $display("low phase not stretched"); end
    checks++;
    if ($realtime - tl > 1000 + 100) begin failures++; $display("clock slow to resume: %0t", $realtime - tl); end
    @(posedge sysclk) t0 = $realtime;
    @(posedge sysclk) t1 = $realtime;
    checks++; if (t1 - t0 != 2 * HP) begin failures++; $display("period after pause %0t", t1 - t0); end
    // stop
    en = 0;
    #2000;
    checks++; if (sysclk !== 0 || rclk !== 0) begin failures++; $display("clock did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
