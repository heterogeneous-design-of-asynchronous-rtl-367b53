// Traffic generator and checker for one interface instance at one pair of
// clock frequencies; used by the clock-ratio testbench.
//
// It pulses clear, lets side A and side B each send N random words to the
// other while taking received words at random moments, and checks that
// every word arrives in order and intact. It also checks, on each side,
// that the signals the synchronous module samples change only at its own
// rising edge or while its clock is held by the mutex (sysclk lags the
// grant by the 20 ps clock buffer), and it counts clock pauses on both
// sides: a run with no pause on a side is a failure. done rises when both
// directions are complete; checks and failures are running totals.
`timescale 1ps / 1ps
module hetero_ratio_run #(
  parameter int unsigned HP_A = 227,   // half period of side A, ps
  parameter int unsigned HP_B = 313,   // half period of side B, ps
  parameter int          N    = 100
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int W   = 32;
  localparam int BUF = 20;

  logic         clear, en_a, en_b, sysclk_a, sysclk_b, pause_a, pause_b;
  logic [W-1:0] a_tx_data, a_rx_data, b_tx_data, b_rx_data;
  logic         a_tx_valid, a_tx_ready, a_rx_valid, a_rx_take;
  logic         b_tx_valid, b_tx_ready, b_rx_valid, b_rx_take;
  logic         osc_out, osc_div_out, sel_yt, sel_yf;

  logic [W-1:0] ab_words [N];
  logic [W-1:0] ba_words [N];
  int a_sent = 0, b_sent = 0, a_got = 0, b_got = 0, n_pause_a = 0, n_pause_b = 0;
  bit traffic = 0;

  hetero_interface #(.HALF_PERIOD_A_PS(HP_A), .HALF_PERIOD_B_PS(HP_B)) dut (
    .clear(clear),
    .en_a(en_a), .sysclk_a(sysclk_a), .pause_a(pause_a),
    .a_tx_data(a_tx_data), .a_tx_valid(a_tx_valid), .a_tx_ready(a_tx_ready),
    .a_rx_data(a_rx_data), .a_rx_valid(a_rx_valid), .a_rx_take(a_rx_take),
    .en_b(en_b), .sysclk_b(sysclk_b), .pause_b(pause_b),
    .b_tx_data(b_tx_data), .b_tx_valid(b_tx_valid), .b_tx_ready(b_tx_ready),
    .b_rx_data(b_rx_data), .b_rx_valid(b_rx_valid), .b_rx_take(b_rx_take),
    .osc_select(1'b0), .osc_enable(1'b0), .osc_reset(1'b1),
    .osc_out(osc_out), .osc_div_out(osc_div_out),
    .sel_cdn(1'b0), .sel_in(1'b0), .sel_sel(1'b0), .sel_yt(sel_yt), .sel_yf(sel_yf));

  // handshake state may change only while the local clock is withheld
  realtime pos_a = 0, chg_a = 0, hi_a = -1, pos_b = 0, chg_b = 0, hi_b = -1;
  always @(posedge sysclk_a) begin
    if (traffic && chg_a > 0) begin
      checks++;
      if ($realtime - chg_a < BUF) begin failures++; $display("%0t: A change too close to the edge", $time); end
    end
    pos_a = $realtime;
  end
  always @(negedge sysclk_a) begin
    if (hi_a >= 0) begin
      checks++;
      if (hi_a < $realtime - BUF) begin failures++; $display("%0t: A state changed while clocked", hi_a); end
    end
    hi_a = -1;
  end
  always @(a_rx_valid or a_rx_data or a_tx_ready)
    if (traffic && $realtime != pos_a) begin
      chg_a = $realtime;
      if (sysclk_a && hi_a < 0) hi_a = $realtime;
    end
  always @(posedge sysclk_b) begin
    if (traffic && chg_b > 0) begin
      checks++;
      if ($realtime - chg_b < BUF) begin failures++; $display("%0t: B change too close to the edge", $time); end
    end
    pos_b = $realtime;
  end
  always @(negedge sysclk_b) begin
    if (hi_b >= 0) begin
      checks++;
      if (hi_b < $realtime - BUF) begin failures++; $display("%0t: B state changed while clocked", hi_b); end
    end
    hi_b = -1;
  end
  always @(b_rx_valid or b_rx_data or b_tx_ready)
    if (traffic && $realtime != pos_b) begin
      chg_b = $realtime;
      if (sysclk_b && hi_b < 0) hi_b = $realtime;
    end

  always @(posedge pause_a) if (traffic) n_pause_a++;
  always @(posedge pause_b) if (traffic) n_pause_b++;

  always @(posedge sysclk_a) begin
    if (traffic) begin
      if (a_rx_valid && a_rx_take) begin
        checks++;
        if (a_rx_data !== ba_words[a_got]) begin
          failures++;
          $display("A got word %0d = %h, expected %h", a_got, a_rx_data, ba_words[a_got]);
        end
        a_got++;
      end
      if (a_tx_valid && a_tx_ready) a_sent++;
    end
    #1;
    if (traffic) begin
      a_rx_take  <= ($urandom_range(0, 2) == 0);
      a_tx_valid <= (a_sent < N) && ($urandom_range(0, 1) == 0);
      a_tx_data  <= ab_words[a_sent < N ? a_sent : 0];
    end
  end

  always @(posedge sysclk_b) begin
    if (traffic) begin
      if (b_rx_valid && b_rx_take) begin
        checks++;
        if (b_rx_data !== ab_words[b_got]) begin
          failures++;
          $display("B got word %0d = %h, expected %h", b_got, b_rx_data, ab_words[b_got]);
        end
        b_got++;
      end
      if (b_tx_valid && b_tx_ready) b_sent++;
    end
    #1;
    if (traffic) begin
      b_rx_take  <= ($urandom_range(0, 2) == 0);
      b_tx_valid <= (b_sent < N) && ($urandom_range(0, 1) == 0);
      b_tx_data  <= ba_words[b_sent < N ? b_sent : 0];
    end
  end

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    foreach (ab_words[i]) ab_words[i] = $urandom();
    foreach (ba_words[i]) ba_words[i] = $urandom();
    {a_tx_valid, a_rx_take, b_tx_valid, b_rx_take} = '0;
    a_tx_data = '0;
    b_tx_data = '0;
    en_a = 0;
    en_b = 0;
    clear = 0;
    #10 clear = 1;
    #1000 clear = 0;
    #100;
    en_a = 1;
    en_b = 1;
    traffic = 1;
    wait (a_got == N && b_got == N && a_sent == N && b_sent == N);
    traffic = 0;
    checks++;
    if (n_pause_a == 0) begin failures++; $display("side A clock never paused"); end
    checks++;
    if (n_pause_b == 0) begin failures++; $display("side B clock never paused"); end
    $display("half periods A %0d ps, B %0d ps: %0d words each way, pauses A %0d B %0d",
             HP_A, HP_B, N, n_pause_a, n_pause_b);
    done = 1;
  end
endmodule
