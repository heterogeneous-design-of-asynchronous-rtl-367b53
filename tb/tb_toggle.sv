// Self-checking testbench for the toggle element: each input transition
// moves exactly one output, alternately y1 and y2.
`timescale 1ps / 1ps
module tb_toggle;
  logic cdn, in, y1, y2;
  logic e1, e2;
  int checks = 0, failures = 0;

  toggle dut (.cdn(cdn), .in(in), .y1(y1), .y2(y2));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdn = 0; in = 0; #10;
    cdn = 1; #10;
    e1 = 0; e2 = 0;
    checks++; if (y1 !== 0 || y2 !== 0) failures++;
    for (int n = 1; n <= 200; n++) begin
      in = ~in;
      if (n % 2) e1 = ~e1; else e2 = ~e2;
      #10;
      checks++;
      if (y1 !== e1 || y2 !== e2) begin
        failures++;
        $display("event %0d: y1=%b y2=%b expected %b %b", n, y1, y2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
