// Self-checking testbench for the PCC arbiter: one port at a time reaches
// the clock mutex, the grant returns only to the winner, and a waiting port
// follows when the winner lets go.
`timescale 1ps / 1ps
module tb_pcc_arbiter;
  logic rq_rx, rq_tx, gt_rx, gt_tx, mreq, mgnt;
  int checks = 0, failures = 0;

  pcc_arbiter dut (.rq_rx(rq_rx), .rq_tx(rq_tx), .gt_rx(gt_rx), .gt_tx(gt_tx),
                   .mreq(mreq), .mgnt(mgnt));

  // the clock mutex is modelled as granting whenever asked, after a delay
  always @(mreq) mgnt <= #7 mreq;

  task automatic expect_s(input logic m, input logic a, input logic b, input string what);
    checks++;
    if (mreq !== m || gt_rx !== a || gt_tx !== b) begin
      failures++;
      $display("%s: mreq=%b gt_rx=%b gt_tx=%b expected %b %b %b", what, mreq, gt_rx, gt_tx, m, a, b);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rq_rx = 0; rq_tx = 0; mgnt = 0; #20;
    expect_s(0, 0, 0, "idle");
    rq_rx = 1; #3; expect_s(1, 0, 0, "rx asks, clock not yet granted");
    #10; expect_s(1, 1, 0, "rx granted");
    rq_tx = 1; #20; expect_s(1, 1, 0, "tx waits");
    rq_rx = 0; #3; expect_s(1, 0, 1, "handover: tx inherits the paused clock");
    rq_tx = 0; #20; expect_s(0, 0, 0, "both released");
    // random traffic: at most one grant
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 1) == 1) rq_rx = ~rq_rx; else rq_tx = ~rq_tx;
      #($urandom_range(1, 20));
      checks++;
      if (gt_rx && gt_tx) begin failures++; $display("two grants"); end
      checks++;
      if ((gt_rx && !rq_rx) || (gt_tx && !rq_tx)) begin failures++; $display("grant without request"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
