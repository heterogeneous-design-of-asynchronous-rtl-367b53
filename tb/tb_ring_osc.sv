// Self-checking testbench for the 21-stage ring-oscillator model: it rests
// while disabled, oscillates with period 2 * 21 * STAGE_PS when select and
// enable are high, and stops again when either goes low.
`timescale 1ps / 1ps
module tb_ring_osc;
  localparam int STAGES = 21, STAGE_PS = 60;
  logic select, enable, out;
  int checks = 0, failures = 0;
  int edges;
  realtime t0, t1;

  ring_osc #(.STAGES(STAGES), .STAGE_PS(STAGE_PS)) dut (.select(select), .enable(enable), .out(out));

  initial begin
    #500_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(out) edges++;

  initial begin
    select = 0; enable = 0;
    #5000;
    edges = 0;
    #5000;
    checks++; if (edges != 0) begin failures++; $display("oscillates while disabled"); end
    select = 1; #3000;
    checks++; if (edges != 0) begin failures++; $display("oscillates with enable low"); end
    enable = 1;
    repeat (2) @(posedge out);
    for (int i = 0; i < 8; i++) begin
      @(posedge out) t0 = $realtime;
      @(posedge out) t1 = $realtime;
      checks++;
      if (t1 - t0 != 2 * STAGES * STAGE_PS) begin
        failures++;
        $display("period %0t expected %0d", t1 - t0, 2 * STAGES * STAGE_PS);
      end
    end
    select = 0;
    #5000;
    edges = 0;
    #5000;
    checks++; if (edges != 0) begin failures++; $display("did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
