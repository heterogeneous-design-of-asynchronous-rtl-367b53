// Self-checking testbench for one micropipeline stage control: the four
// phases of a handshake on both sides, the latch enable, the clear, and
// the delays from rin to ain (C-element) and to rout (plus the request delay).
`timescale 1ps / 1ps
module tb_mp_stage_ctrl;
  logic clear, rin, ain, rout, aout, len;
  int checks = 0, failures = 0;
  realtime t0, t1, t2;

  mp_stage_ctrl dut (.clear(clear), .rin(rin), .ain(ain), .rout(rout), .aout(aout), .len(len));

  task automatic expect_s(input logic r, input string what);
    checks++;
    if (rout !== r || ain !== r || len !== ~r) begin
      failures++;
      $display("%s: rout=%b ain=%b len=%b expected rout=%b", what, rout, ain, len, r);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1; rin = 1; aout = 0; #400;
    expect_s(0, "clear");
    rin = 0; clear = 0; #400;
    expect_s(0, "empty");
    rin = 1; #400;  expect_s(1, "token taken");
    rin = 0; #400;  expect_s(1, "held until next stage acks");
    aout = 1; #400; expect_s(0, "return to zero");
    rin = 1; #400;  expect_s(0, "blocked while next stage full");
    aout = 0; #400; expect_s(1, "next stage free: token taken");
    aout = 1; #400; expect_s(1, "rin still high: held");
    rin = 0; #400;  expect_s(0, "return to zero");
    clear = 1; #400; expect_s(0, "clear");
    // delays: C-element 142 ps rise / 110 ps fall, request 70 ps later
    clear = 0; aout = 0; #400;
    rin = 1; t0 = $realtime;
    @(posedge ain) t1 = $realtime;
    @(posedge rout) t2 = $realtime;
    checks++;
    if (t1 - t0 != 142 || t2 - t0 != 212) begin
      failures++;
      $display("rise delays ain %0t rout %0t, expected 142 and 212", t1 - t0, t2 - t0);
    end
    #400 rin = 0; aout = 1; t0 = $realtime;
    @(negedge ain) t1 = $realtime;
    @(negedge rout) t2 = $realtime;
    checks++;
    if (t1 - t0 != 110 || t2 - t0 != 180) begin
      failures++;
      $display("fall delays ain %0t rout %0t, expected 110 and 180", t1 - t0, t2 - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
