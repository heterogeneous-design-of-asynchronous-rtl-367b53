// Self-checking testbench for the PCC asynchronous state machine.
//
// The testbench stands in for the rest of the PCC: its clock pauses while it
// grants a request, and grants are only given while the clock is low. It also
// plays both FIFOs with four-phase handshakes at random times, and the
// synchronous module with random rx_take and tx_valid. Checked: words arrive
// in order on both channels; the one-word receive register is never
// overwritten; every FIFO handshake edge is acknowledged; the signals the
// synchronous side samples never change while sysclk is high.
`timescale 1ps / 1ps
module tb_pcc_async_fsm;
  localparam int W = 16;
  localparam int N = 120;

  logic         clear, sysclk;
  logic         rx_req, rx_ack, tx_req, tx_ack;
  logic [W-1:0] rx_fdata, tx_fdata, rx_data, tx_data;
  logic         rq_rx, rq_tx, gt_rx, gt_tx;
  logic         rx_valid, rx_take, tx_valid, tx_ready;
  logic         serving;
  logic [W-1:0] rx_words [N];
  logic [W-1:0] tx_words [N];
  int checks = 0, failures = 0;
  int nrx = 0, ntx_sent = 0, ntx_got = 0, ngrants = 0;

  pcc_async_fsm #(.WIDTH(W)) dut (
    .clear(clear), .sysclk(sysclk),
    .rx_req(rx_req), .rx_ack(rx_ack), .rx_fdata(rx_fdata),
    .tx_req(tx_req), .tx_ack(tx_ack), .tx_fdata(tx_fdata),
    .rq_rx(rq_rx), .rq_tx(rq_tx), .gt_rx(gt_rx), .gt_tx(gt_tx),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_take(rx_take),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready));

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog: rx %0d tx %0d", nrx, ntx_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pausible clock stand-in
  initial begin
    sysclk = 0;
    forever begin
      #200;
      wait (!serving);
      sysclk = 1;
      #200;
      sysclk = 0;
    end
  end

  // mutex/arbiter stand-in: serve requests only while the clock is low
  initial begin
    serving = 0; gt_rx = 0; gt_tx = 0;
    forever begin
      @(negedge sysclk);
      #20;
      serving = 1;
      while (rq_rx || rq_tx) begin
        ngrants++;
        if (rq_rx) begin gt_rx = 1; wait (!rq_rx); #5; gt_rx = 0; end
        else       begin gt_tx = 1; wait (!rq_tx); #5; gt_tx = 0; end
        #5;
      end
      serving = 0;
    end
  end

  // what the synchronous side samples changes only at its own rising edge
  // or while the clock is low (inside a grant)
  realtime last_pos = 0;
  always @(posedge sysclk) last_pos = $realtime;
  always @(rx_ack or rx_data or rx_valid or tx_ready) begin
    if (sysclk && !clear && $realtime != last_pos) begin
      checks++;
      failures++;
      $display("%0t: handshake state changed while sysclk high", $time);
    end
  end

  // FIFO producing into the receive channel
  initial begin
    rx_req = 0; rx_fdata = '0;
    #20 wait (!clear);
    for (int i = 0; i < N; i++) begin
      rx_words[i] = W'($urandom);
      #($urandom_range(1, 900));
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
      #($urandom_range(1, 500));
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

  // synchronous module: drives after each rising edge, samples at the edge
  initial begin
    for (int i = 0; i < N; i++) tx_words[i] = W'($urandom);
    rx_take = 0; tx_valid = 0; tx_data = '0;
    clear = 0;
    #10 clear = 1;
    #1000 clear = 0;
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
      rx_take = ($urandom_range(0, 3) == 0);
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
        if (ngrants < 3 * N) begin failures++; $display("only %0d grants", ngrants); end
        $display("grants %0d", ngrants);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
