// Self-checking testbench for the mutual exclusion element: one grant at a
// time, first come first served, a grant kept until its request falls, a
// tie won by r1, and random request traffic checked against a model.
`timescale 1ps / 1ps
module tb_mutex;
  logic r1, r2, g1, g2;
  logic e1, e2;
  int checks = 0, failures = 0;

  mutex dut (.r1(r1), .r2(r2), .g1(g1), .g2(g2));

  task automatic expect_g(input logic x1, input logic x2, input string what);
    checks++;
    if (g1 !== x1 || g2 !== x2) begin
      failures++;
      $display("%s: g1=%b g2=%b expected %b %b", what, g1, g2, x1, x2);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = 0; r2 = 0; #10;
    expect_g(0, 0, "idle");
    r2 = 1; #10; expect_g(0, 1, "r2 alone");
    r1 = 1; #10; expect_g(0, 1, "r2 keeps grant");
    r2 = 0; #10; expect_g(1, 0, "handover to r1");
    r2 = 1; #10; expect_g(1, 0, "r1 keeps grant");
    r1 = 0; #10; expect_g(0, 1, "handover to r2");
    r2 = 0; #10; expect_g(0, 0, "idle again");
    r1 = 1; r2 = 1; #10; expect_g(1, 0, "tie goes to r1");
    r1 = 0; r2 = 0; #10;
    // random traffic against a reference model
    e1 = 0; e2 = 0;
    for (int i = 0; i < 500; i++) begin
      if ($urandom % 2) r1 = ~r1; else r2 = ~r2;
      if (!r1) e1 = 0;
      if (!r2) e2 = 0;
      if (r1 && !e2) e1 = 1;
      if (r2 && !e1) e2 = 1;
      #10;
      expect_g(e1, e2, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
