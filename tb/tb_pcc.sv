// Self-checking testbench for the complete pausible clocking control.
//
// The PCC runs from its own ring-oscillator model. The testbench plays a FIFO
// on each channel (four-phase, random timing) and the synchronous module on
// sysclk. Checked: the idle clock period is 2 * HALF_PERIOD_PS (454 ps,
// 2.2 GHz); every handshake pauses the clock (pause pulses are counted; with
// zero-delay logic a pause completes inside the low phase, so low phases
// longer than nominal are only reported, not required); handshake outputs and the
// sampled words change only while the mutex withholds the clock, never
// within the clock buffer delay before a rising edge; words arrive in order
// on both channels.
`timescale 1ps / 1ps
module tb_pcc;
  localparam int W  = 32;
  localparam int HP = 227;
  localparam int N  = 150;

  logic         en, clear, sysclk, rclk, pause;
  logic         rx_req, rx_ack, tx_req, tx_ack;
  logic [W-1:0] rx_fdata, tx_fdata, rx_data, tx_data;
  logic         rx_valid, rx_take, tx_valid, tx_ready;
  logic [W-1:0] rx_words [N];
  logic [W-1:0] tx_words [N];
  int checks = 0, failures = 0;
  int nrx = 0, ntx_sent = 0, ntx_got = 0, npause = 0, nstretch = 0;
  realtime tneg = 0, last_pos = 0, t0, t1;

  pcc #(.WIDTH(W), .HALF_PERIOD_PS(HP)) dut (
    .en(en), .clear(clear), .sysclk(sysclk), .rclk(rclk), .pause(pause),
    .rx_req(rx_req), .rx_ack(rx_ack), .rx_fdata(rx_fdata),
    .tx_req(tx_req), .tx_ack(tx_ack), .tx_fdata(tx_fdata),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_take(rx_take),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready));

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog: rx %0d tx %0d", nrx, ntx_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pause) npause++;

  // Handshake state may change only while the mutex withholds the clock.
  // sysclk is the mutex grant delayed by the clock buffer (BUF ps), so that
  // window is [falling edge - BUF, rising edge - BUF] in sysclk time.
  localparam int BUF = 20;
  realtime last_chg = 0, first_hi = -1;
  always @(negedge sysclk) begin
    tneg = $realtime;
    if (first_hi >= 0) begin
      checks++;
      if (first_hi < $realtime - BUF) begin
        failures++;
        $display("%0t: handshake state changed while the clock was granted", first_hi);
      end
    end
    first_hi = -1;
  end
  always @(posedge sysclk) begin
    if (tneg > 0 && $realtime - tneg > HP + 2) nstretch++;
    if (!clear && last_chg > 0) begin
      checks++;
      if ($realtime - last_chg < BUF) begin
        failures++;
        $display("%0t: change %0t ps before the clock edge", $time, $realtime - last_chg);
      end
    end
    last_pos = $realtime;
  end
  always @(rx_ack or rx_data or rx_valid or tx_ready) begin
    if (!clear && $realtime != last_pos) begin
      last_chg = $realtime;
      if (sysclk && first_hi < 0) first_hi = $realtime;
    end
  end

  // FIFO producing into the receive channel
  initial begin
    rx_req = 0; rx_fdata = '0;
    #20 wait (!clear);
    #8000;
    for (int i = 0; i < N; i++) begin
      rx_words[i] = $urandom;
      #($urandom_range(1, 700));
      rx_fdata = rx_words[i];
      #($urandom_range(1, 30));
      rx_req = 1;
      wait (rx_ack);
      #($urandom_range(1, 300));
      rx_req = 0;
      wait (!rx_ack);
    end
  end

  // FIFO consuming from the send channel
  initial begin
    tx_ack = 0;
    #20 wait (!clear);
    forever begin
      wait (tx_req);
      #($urandom_range(1, 400));
      checks++;
      if (tx_fdata !== tx_words[ntx_got]) begin
        failures++;
        $display("tx word %0d: %h expected %h", ntx_got, tx_fdata, tx_words[ntx_got]);
      end
      ntx_got++;
      tx_ack = 1;
      wait (!tx_req);
      #($urandom_range(1, 300));
      tx_ack = 0;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) tx_words[i] = $urandom;
    rx_take = 0; tx_valid = 0; tx_data = '0;
    en = 0; clear = 0;
    #10 clear = 1;
    #1000 clear = 0; en = 1;
    npause = 0;
    // idle clock: nominal period
    repeat (2) @(posedge sysclk);
    for (int i = 0; i < 4; i++) begin
      @(posedge sysclk) t0 = $realtime;
      @(posedge sysclk) t1 = $realtime;
      checks++;
      if (t1 - t0 != 2 * HP) begin failures++; $display("idle period %0t", t1 - t0); end
    end
    checks++;
    if (npause != 0) begin failures++; $display("pause without a handshake"); end
    // synchronous module
    forever begin
      @(posedge sysclk);
      if (rx_take && rx_valid) begin
        checks++;
        if (rx_data !== rx_words[nrx]) begin
          failures++;
          $display("rx word %0d: %h expected %h", nrx, rx_data, rx_words[nrx]);
        end
        nrx++;
      end
      if (tx_valid && tx_ready) ntx_sent++;
      #1;
      rx_take = ($urandom_range(0, 2) == 0);
      tx_valid = (ntx_sent < N) && ($urandom_range(0, 1) == 0);
      tx_data = tx_words[ntx_sent < N ? ntx_sent : 0];
      if (nrx == N && ntx_got == N) begin
        #6000;
        checks++;
        if (rx_req || rx_ack || tx_req || tx_ack || rx_valid) begin
          failures++;
          $display("channels not idle at the end");
        end
        checks++;
        if (npause < 3 * N) begin failures++; $display("only %0d pauses", npause); end
        $display("pauses %0d stretched phases %0d", npause, nstretch);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
