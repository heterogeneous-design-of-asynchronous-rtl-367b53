// Self-checking testbench for the transparent latch: follows d while en is
// high, holds the last value while en is low; then the per-bit delays,
// 130 ps for a rising and 203 ps for a falling bit.
`timescale 1ps / 1ps
module tb_trans_latch;
  logic       en;
  logic [7:0] d, q, held;
  int checks = 0, failures = 0;
  realtime t0, t1;

  trans_latch #(.WIDTH(8)) dut (.en(en), .d(d), .q(q));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; d = 8'h00; #300;
    held = 8'h00;
    for (int i = 0; i < 300; i++) begin
      en = 1'($urandom);
      #300;
      d = 8'($urandom);
      #300;
      if (en) held = d;
      checks++;
      if (q !== held) begin
        failures++;
        $display("mismatch en=%b d=%h q=%h exp=%h", en, d, q, held);
      end
    end
    // propagation delays of the cell per bit: 130 ps rise, 203 ps fall
    en = 1; d = 8'h00; #300;
    d = 8'h0F; t0 = $realtime;
    @(q) t1 = $realtime;
    checks++;
    if (t1 - t0 != 130 || q !== 8'h0F) begin failures++; $display("rise delay %0t", t1 - t0); end
    #300 d = 8'hF0; t0 = $realtime;
    @(q) t1 = $realtime;
    checks++;
    if (t1 - t0 != 130 || q !== 8'hFF) begin failures++; $display("mixed edge: q %h after %0t", q, t1 - t0); end
    @(q) t1 = $realtime;
    checks++;
    if (t1 - t0 != 203 || q !== 8'hF0) begin failures++; $display("fall delay %0t", t1 - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
