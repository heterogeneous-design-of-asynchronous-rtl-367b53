// End-to-end testbench of the heterogeneous-system interface, at the
// design's default parameters (32-bit words, four-stage FIFOs, 2.2 GHz and
// 1.6 GHz local clocks).
//
// Both synchronous sides send N random words to each other at the same time
// and take received words at random moments. Checked: every word arrives, in
// order and intact, in both directions; both clocks pause for handshakes;
// the FIFOs exert back-pressure on a sender (tx_valid high with tx_ready
// low) and a full receive register holds the FIFO back (rx_valid high
// without rx_take); on both sides the signals the synchronous module
// samples change only while the mutex withholds its clock; the idle clocks run at their nominal periods; Clear
// empties the channels; the ring-oscillator test structure runs at
// 2 * 21 stage delays and its divider output toggles once per 256 ring
// periods; the Select cell steers events by its select level. Each of these
// mechanisms is counted and a count of zero is a failure.
`timescale 1ps / 1ps
module tb_hetero_interface;
  localparam int W    = 32;
  localparam int N    = 200;
  localparam int HP_A = 227;
  localparam int HP_B = 313;

  logic         clear, en_a, en_b, sysclk_a, sysclk_b, pause_a, pause_b;
  logic [W-1:0] a_tx_data, a_rx_data, b_tx_data, b_rx_data;
  logic         a_tx_valid, a_tx_ready, a_rx_valid, a_rx_take;
  logic         b_tx_valid, b_tx_ready, b_rx_valid, b_rx_take;
  logic         osc_select, osc_enable, osc_reset, osc_out, osc_div_out;
  logic         sel_cdn, sel_in, sel_sel, sel_yt, sel_yf;

  logic [W-1:0] ab_words [N];
  logic [W-1:0] ba_words [N];
  int checks = 0, failures = 0;
  int a_sent = 0, b_sent = 0, a_got = 0, b_got = 0;
  int n_pause_a = 0, n_pause_b = 0, n_txstall_a = 0, n_txstall_b = 0;
  int n_rxhold_a = 0, n_rxhold_b = 0, n_div = 0, n_sel = 0, n_clear = 0;
  bit traffic = 0;
  realtime t0, t1;

  hetero_interface dut (
    .clear(clear),
    .en_a(en_a), .sysclk_a(sysclk_a), .pause_a(pause_a),
    .a_tx_data(a_tx_data), .a_tx_valid(a_tx_valid), .a_tx_ready(a_tx_ready),
    .a_rx_data(a_rx_data), .a_rx_valid(a_rx_valid), .a_rx_take(a_rx_take),
    .en_b(en_b), .sysclk_b(sysclk_b), .pause_b(pause_b),
    .b_tx_data(b_tx_data), .b_tx_valid(b_tx_valid), .b_tx_ready(b_tx_ready),
    .b_rx_data(b_rx_data), .b_rx_valid(b_rx_valid), .b_rx_take(b_rx_take),
    .osc_select(osc_select), .osc_enable(osc_enable), .osc_reset(osc_reset),
    .osc_out(osc_out), .osc_div_out(osc_div_out),
    .sel_cdn(sel_cdn), .sel_in(sel_in), .sel_sel(sel_sel), .sel_yt(sel_yt), .sel_yf(sel_yf));

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog: A sent %0d got %0d, B sent %0d got %0d", a_sent, a_got, b_sent, b_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // On each side, what the synchronous module samples may change only at its
  // own rising edge or while the mutex withholds its clock: sysclk is the
  // grant delayed by the 20 ps clock buffer, so changes with sysclk high are
  // allowed only in the last 20 ps before it falls, and none may come within
  // 20 ps before a rising edge.
  localparam int BUF = 20;
  int n_window = 0;
  realtime pos_a = 0, chg_a = 0, hi_a = -1, pos_b = 0, chg_b = 0, hi_b = -1;
  always @(posedge sysclk_a) begin
    if (traffic && chg_a > 0) begin
      checks++;
      if ($realtime - chg_a < BUF) begin failures++; $display("%0t: side A change too close to the edge", $time); end
    end
    pos_a = $realtime;
  end
  always @(negedge sysclk_a) begin
    if (hi_a >= 0) begin
      checks++;
      n_window++;
      if (hi_a < $realtime - BUF) begin failures++; $display("%0t: side A state changed while clocked", hi_a); end
    end
    hi_a = -1;
  end
  always @(a_rx_valid or a_rx_data or a_tx_ready) begin
    if (traffic && $realtime != pos_a) begin
      chg_a = $realtime;
      if (sysclk_a && hi_a < 0) hi_a = $realtime;
    end
  end
  always @(posedge sysclk_b) begin
    if (traffic && chg_b > 0) begin
      checks++;
      if ($realtime - chg_b < BUF) begin failures++; $display("%0t: side B change too close to the edge", $time); end
    end
    pos_b = $realtime;
  end
  always @(negedge sysclk_b) begin
    if (hi_b >= 0) begin
      checks++;
      n_window++;
      if (hi_b < $realtime - BUF) begin failures++; $display("%0t: side B state changed while clocked", hi_b); end
    end
    hi_b = -1;
  end
  always @(b_rx_valid or b_rx_data or b_tx_ready) begin
    if (traffic && $realtime != pos_b) begin
      chg_b = $realtime;
      if (sysclk_b && hi_b < 0) hi_b = $realtime;
    end
  end

  always @(posedge pause_a) if (traffic) n_pause_a++;
  always @(posedge pause_b) if (traffic) n_pause_b++;
  always @(osc_div_out) n_div++;

  // side A synchronous module
  always @(posedge sysclk_a) begin
    if (traffic) begin
      if (a_rx_valid && a_rx_take) begin
        checks++;
        if (a_rx_data !== ba_words[a_got]) begin
          failures++;
          $display("A received word %0d: %h expected %h", a_got, a_rx_data, ba_words[a_got]);
        end
        a_got++;
      end
      if (a_rx_valid && !a_rx_take) n_rxhold_a++;
      if (a_tx_valid && a_tx_ready) a_sent++;
      if (a_tx_valid && !a_tx_ready) n_txstall_a++;
    end
    #1;
    if (traffic) begin
      a_rx_take  <= ($urandom_range(0, 3) == 0);
      a_tx_valid <= (a_sent < N) && ($urandom_range(0, 2) != 0);
      a_tx_data  <= ab_words[a_sent < N ? a_sent : 0];
    end
  end

  // side B synchronous module
  always @(posedge sysclk_b) begin
    if (traffic) begin
      if (b_rx_valid && b_rx_take) begin
        checks++;
        if (b_rx_data !== ab_words[b_got]) begin
          failures++;
          $display("B received word %0d: %h expected %h", b_got, b_rx_data, ab_words[b_got]);
        end
        b_got++;
      end
      if (b_rx_valid && !b_rx_take) n_rxhold_b++;
      if (b_tx_valid && b_tx_ready) b_sent++;
      if (b_tx_valid && !b_tx_ready) n_txstall_b++;
    end
    #1;
    if (traffic) begin
      b_rx_take  <= ($urandom_range(0, 2) == 0);
      b_tx_valid <= (b_sent < N) && ($urandom_range(0, 3) != 0);
      b_tx_data  <= ba_words[b_sent < N ? b_sent : 0];
    end
  end

  task automatic measure(ref logic clk, input int hp, input string name);
    @(posedge clk) t0 = $realtime;
    @(posedge clk) t1 = $realtime;
    checks++;
    if (t1 - t0 != 2 * hp) begin
      failures++;
      $display("%s idle period %0t expected %0d", name, t1 - t0, 2 * hp);
    end
  endtask

  initial begin
    logic et, ef;
    for (int i = 0; i < N; i++) begin
      ab_words[i] = $urandom;
      ba_words[i] = $urandom;
    end
    a_tx_data = '0; a_tx_valid = 0; a_rx_take = 0;
    b_tx_data = '0; b_tx_valid = 0; b_rx_take = 0;
    en_a = 0; en_b = 0; clear = 0;
    osc_select = 0; osc_enable = 0; osc_reset = 0;
    sel_cdn = 0; sel_in = 0; sel_sel = 0;
    #10 clear = 1; osc_reset = 1;
    #3000 clear = 0; osc_reset = 0; sel_cdn = 1;
    en_a = 1; en_b = 1;

    // idle clocks
    repeat (3) @(posedge sysclk_a);
    measure(sysclk_a, HP_A, "sysclk_a");
    measure(sysclk_b, HP_B, "sysclk_b");
    checks++;
    if (pause_a || pause_b || a_rx_valid || b_rx_valid || !a_tx_ready || !b_tx_ready) begin
      failures++;
      $display("interface not idle after clear");
    end

    // ring-oscillator test structure, running alongside the traffic
    osc_select = 1; osc_enable = 1;

    // traffic both ways
    traffic = 1;
    wait (a_got == N && b_got == N);
    traffic = 0;
    #10;
    a_rx_take = 0; a_tx_valid = 0; b_rx_take = 0; b_tx_valid = 0;
    #5000;
    checks++;
    if (a_rx_valid || b_rx_valid || pause_a || pause_b) begin
      failures++;
      $display("interface not idle after traffic");
    end

    // Clear with words in flight: B sends, A does not take, then clear
    b_tx_data = 32'hC1EA_0001;
    @(posedge sysclk_b) #1 b_tx_valid = 1;
    @(posedge sysclk_b) #1 b_tx_valid = 0;
    #5000;
    checks++;
    if (!a_rx_valid) begin failures++; $display("word did not reach A"); end
    clear = 1; #500 clear = 0; #3000;
    checks++;
    if (a_rx_valid) begin failures++; $display("clear left a word"); end
    else n_clear++;

    // ring oscillator period and divider
    @(posedge osc_out) t0 = $realtime;
    @(posedge osc_out) t1 = $realtime;
    checks++;
    if (t1 - t0 != 2 * 21 * 60) begin failures++; $display("ring period %0t", t1 - t0); end
    wait (n_div >= 2);
    @(osc_div_out) t0 = $realtime;
    @(osc_div_out) t1 = $realtime;
    checks++;
    if (t1 - t0 != 256 * 2 * 21 * 60 / 2) begin
      failures++;
      $display("divider half period %0t expected %0d", t1 - t0, 256 * 21 * 60);
    end

    // Select cell
    et = 0; ef = 0;
    for (int i = 0; i < 20; i++) begin
      sel_sel = 1'($urandom);
      #50 sel_in = ~sel_in;
      if (sel_sel) et = ~et; else ef = ~ef;
      #50;
      checks++;
      if (sel_yt !== et || sel_yf !== ef) begin failures++; $display("select steering wrong"); end
      else n_sel++;
    end

    $display("pauses A %0d B %0d; tx stalls A %0d B %0d; rx holds A %0d B %0d; divider edges %0d; clears %0d; select events %0d",
             n_pause_a, n_pause_b, n_txstall_a, n_txstall_b, n_rxhold_a, n_rxhold_b, n_div, n_clear, n_sel);
    checks++; if (n_pause_a == 0)   begin failures++; $display("side A clock never paused"); end
    checks++; if (n_pause_b == 0)   begin failures++; $display("side B clock never paused"); end
    checks++; if (n_txstall_a == 0 && n_txstall_b == 0) begin failures++; $display("no sender back-pressure"); end
    checks++; if (n_rxhold_a == 0 || n_rxhold_b == 0) begin failures++; $display("no receive-register hold"); end
    checks++; if (n_div == 0)       begin failures++; $display("divider never toggled"); end
    checks++; if (n_clear == 0)     begin failures++; $display("clear never exercised"); end
    checks++; if (n_sel == 0)       begin failures++; $display("select never steered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
