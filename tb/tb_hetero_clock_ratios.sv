// Clock-ratio testbench of the heterogeneous-system interface.
//
// The local clock frequency of each side is set by the length of its ring
// oscillator, so the interface must work whatever the two frequencies are.
// Four complete interfaces run side by side at different pairs of half
// periods: the default pair (side A faster), the pair swapped (side B
// faster), equal clocks, and a 5:1 ratio in each direction. In each, both
// sides exchange random words under random stalls; the checks of every run
// (delivery, order, data, clock pauses and the rule that handshake state
// changes only while a clock is held) are summed.
`timescale 1ps / 1ps
module tb_hetero_clock_ratios;
  localparam int N = 100;

  logic [4:0] done;
  int         chk [5];
  int         fail[5];

  hetero_ratio_run #(.HP_A(227),  .HP_B(313),  .N(N)) r0 (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  hetero_ratio_run #(.HP_A(313),  .HP_B(227),  .N(N)) r1 (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  hetero_ratio_run #(.HP_A(227),  .HP_B(227),  .N(N)) r2 (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  hetero_ratio_run #(.HP_A(227),  .HP_B(1135), .N(N)) r3 (.done(done[3]), .checks(chk[3]), .failures(fail[3]));
  hetero_ratio_run #(.HP_A(1135), .HP_B(227),  .N(N)) r4 (.done(done[4]), .checks(chk[4]), .failures(fail[4]));

  function automatic void report(int extra);
    int c = 0, f = extra;
    foreach (chk[i]) begin
      c += chk[i];
      f += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    #30_000_000;
    $display("watchdog: runs done %b", done);
    report(1);
    $finish;
  end

  initial begin
    wait (&done);
    report(0);
    $finish;
  end
endmodule
