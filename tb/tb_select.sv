// Self-checking testbench for the select element: each input transition is
// passed to yt when sel is high and to yf when sel is low.
`timescale 1ps / 1ps
module tb_select;
  logic cdn, in, sel, yt, yf;
  logic et, ef;
  int checks = 0, failures = 0;

  select dut (.cdn(cdn), .in(in), .sel(sel), .yt(yt), .yf(yf));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdn = 0; in = 0; sel = 0; #10;
    cdn = 1; #10;
    et = 0; ef = 0;
    for (int n = 0; n < 300; n++) begin
      sel = 1'($urandom);
      #5;
      checks++;
      if (yt !== et || yf !== ef) begin
        failures++;
        $display("sel change moved an output");
      end
      in = ~in;
      if (sel) et = ~et; else ef = ~ef;
      #5;
      checks++;
      if (yt !== et || yf !== ef) begin
        failures++;
        $display("event %0d sel=%b: yt=%b yf=%b expected %b %b", n, sel, yt, yf, et, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
