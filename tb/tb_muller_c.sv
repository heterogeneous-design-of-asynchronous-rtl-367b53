// Self-checking testbench for the Muller C-element: random input sequences
// against a reference state machine, plus the active-low clear, the
// 142 ps rise and 110 ps fall delays and the filtering of a short pulse.
`timescale 1ps / 1ps
module tb_muller_c;
  logic cdn, in1, in2, out;
  logic ref_q;
  int checks = 0, failures = 0;
  realtime t0, t1;

  muller_c dut (.cdn(cdn), .in1(in1), .in2(in2), .out(out));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdn = 0; in1 = 1; in2 = 1; ref_q = 0;
    #300;
    checks++; if (out !== 1'b0) begin failures++; $display("clear failed"); end
    cdn = 1; in1 = 0; in2 = 0;
    #300;
    for (int i = 0; i < 400; i++) begin
      in1 = 1'($urandom);
      in2 = 1'($urandom);
      if (in1 == in2) ref_q = in1;
      #300;
      checks++;
      if (out !== ref_q) begin
        failures++;
        $display("mismatch in1=%b in2=%b out=%b exp=%b", in1, in2, out, ref_q);
      end
    end
    // hold: inputs differ after a 1 and after a 0
    in1 = 1; in2 = 1; #300; in1 = 0; #300;
    checks++; if (out !== 1'b1) failures++;
    in2 = 0; #300; in1 = 1; #300;
    checks++; if (out !== 1'b0) failures++;
    // propagation delays of the cell: 142 ps rise, 110 ps fall
    in1 = 1; in2 = 1; t0 = $realtime;
    @(posedge out) t1 = $realtime;
    checks++;
    if (t1 - t0 != 142) begin failures++; $display("rise delay %0t", t1 - t0); end
    #300 in1 = 0; in2 = 0; t0 = $realtime;
    @(negedge out) t1 = $realtime;
    checks++;
    if (t1 - t0 != 110) begin failures++; $display("fall delay %0t", t1 - t0); end
    // a glitch shorter than the delay never reaches the output
    #300 in1 = 1; in2 = 1; #50 in2 = 0; in1 = 0; #300;
    checks++;
    if (out !== 1'b0) begin failures++; $display("short pulse passed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
