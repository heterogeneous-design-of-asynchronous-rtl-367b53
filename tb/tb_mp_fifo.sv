// Self-checking testbench for the four-stage micropipeline FIFO.
//
// A four-phase producer and consumer with random delays stream words through
// the FIFO; a scoreboard checks order and values. Also checked: a stalled
// consumer fills the FIFO to its capacity (STAGES/2 words in flight) and
// back-pressure blocks the producer, and Clear empties it.
`timescale 1ps / 1ps
module tb_mp_fifo;
  localparam int W = 32;
  localparam int S = 4;
  localparam int N = 300;

  logic         clear, req_in, ack_out, req_out, ack_in;
  logic [W-1:0] data_in, data_out;
  logic [W-1:0] sent [N];
  int checks = 0, failures = 0;
  int nrecv = 0;
  logic consumer_on = 0;

  mp_fifo #(.WIDTH(W), .STAGES(S)) dut (
    .clear(clear), .req_in(req_in), .ack_out(ack_out), .data_in(data_in),
    .req_out(req_out), .ack_in(ack_in), .data_out(data_out));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [W-1:0] w);
    data_in = w;
    #($urandom_range(1, 20));
    req_in = 1;
    wait (ack_out);
    #($urandom_range(1, 20));
    req_in = 0;
    wait (!ack_out);
    #($urandom_range(1, 20));
  endtask

  // consumer
  always begin
    wait (consumer_on && req_out);
    #($urandom_range(1, 30));
    checks++;
    if (data_out !== sent[nrecv]) begin
      failures++;
      $display("word %0d: got %h expected %h", nrecv, data_out, sent[nrecv]);
    end
    nrecv++;
    ack_in = 1;
    wait (!req_out);
    #($urandom_range(1, 30));
    ack_in = 0;
  end

  initial begin
    int accepted;
    clear = 1; req_in = 0; ack_in = 0; data_in = '0;
    #500 clear = 0; #500;
    checks++; if (req_out !== 0 || ack_out !== 0) failures++;

    // capacity with a stalled consumer
    accepted = 0;
    for (int i = 0; i < S; i++) begin
      data_in = 32'hA000_0000 + i;
      sent[i] = data_in;
      #10 req_in = 1;
      #1000;
      if (ack_out) begin
        accepted++;
        req_in = 0;
        #1000;
      end else begin
        req_in = 0;   // withdraw is allowed only before ack; cancel this word
        #1000;
        break;
      end
    end
    checks++;
    if (accepted != S / 2) begin
      failures++;
      $display("capacity %0d, expected %0d", accepted, S / 2);
    end
    checks++;
    if (req_out !== 1 || data_out !== sent[0]) begin
      failures++;
      $display("first word not at output");
    end

    // clear empties the FIFO
    clear = 1; #500; clear = 0; #500;
    checks++; if (req_out !== 0) begin failures++; $display("clear did not empty"); end

    // streaming with random delays
    consumer_on = 1;
    for (int i = 0; i < N; i++) begin
      sent[i] = $urandom;
      put(sent[i]);
    end
    wait (nrecv == N);
    #1000;
    checks++;
    if (req_out !== 0) begin failures++; $display("extra word at output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
