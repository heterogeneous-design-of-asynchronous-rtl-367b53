// Latency and rate testbench of the micropipeline FIFO at its defaults
// (32 bits, four stages, characterized cell delays).
//
// Through an empty FIFO the request passes four C-elements, each followed
// by the matched request delay, and a data bit passes four transparent
// latches. With 142 ps (C-element rise), 70 ps (request margin), 130 ps
// (latch, rising bit) and 203 ps (latch, falling bit) this gives
//   req_in  -> req_out   4 * (142 + 70) = 848 ps
//   data_in -> data_out  4 * 130 = 520 ps rising, 4 * 203 = 812 ps falling
// and the testbench checks these figures, and that every data bit is at the
// output no later than req_out (bundled data). With an environment that
// answers at once it also measures the sustained word period at the output
// and checks it against bounds worked out from the cells (644 to 848 ps).
// The transistor-level figures the design is compared with are 0.73 ns
// request and 0.62 ns data latency at about 1.6 GHz; they are printed next
// to the measured ones.
`timescale 1ps / 1ps
module tb_mp_fifo_latency;
  localparam int W = 32;

  logic         clear, req_in, ack_out, req_out, ack_in;
  logic [W-1:0] data_in, data_out;
  int checks = 0, failures = 0;
  realtime t_req, t_data_rise, t_data_fall, t_d0, t0, t1;

  mp_fifo dut (
    .clear(clear), .req_in(req_in), .ack_out(ack_out), .data_in(data_in),
    .req_out(req_out), .ack_in(ack_in), .data_out(data_out));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one word through the empty FIFO: the data change at t, the request
  // rises at the same time; the output side acknowledges at once
  task automatic one_word(input logic [W-1:0] w, input logic [W-1:0] prev);
    data_in = w;
    t_d0 = $realtime;
    req_in = 1;
    fork
      begin
        @(posedge req_out) t_req = $realtime - t_d0;
      end
      begin
        // last rising and last falling bit to settle at the output
        logic [W-1:0] seen;
        seen = ~(w ^ prev);
        t_data_rise = 0;
        t_data_fall = 0;
        while (data_out !== w) begin
          @(data_out);
          for (int b = 0; b < W; b++)
            if (!seen[b] && data_out[b] === w[b]) begin
              seen[b] = 1'b1;
              if (w[b]) t_data_rise = $realtime - t_d0;
              else      t_data_fall = $realtime - t_d0;
            end
        end
      end
    join
    checks++;
    if (data_out !== w) begin
      failures++;
      $display("data not valid at req_out: %h expected %h", data_out, w);
    end
    wait (ack_out);
    req_in = 0;
    ack_in = 1;
    wait (!req_out);
    ack_in = 0;
    wait (!ack_out);
    #2000;
  endtask

  initial begin
    int n;
    clear = 1; req_in = 0; ack_in = 0; data_in = '0;
    #500 clear = 0; #2000;

    one_word(32'h0000_FFFF, 32'h0000_0000);
    checks++;
    if (t_req != 848) begin failures++; $display("req latency %0t, expected 848", t_req); end
    checks++;
    if (t_data_rise != 520) begin failures++; $display("rising data latency %0t, expected 520", t_data_rise); end
    one_word(32'hFFFF_0000, 32'h0000_FFFF);
    checks++;
    if (t_data_fall != 812 || t_data_rise != 520) begin
      failures++;
      $display("data latency fall %0t rise %0t, expected 812 and 520", t_data_fall, t_data_rise);
    end
    $display("req_in->req_out %0t ps (transistor level 730 ps); data_in->data_out %0t to %0t ps (620 ps)",
             t_req, t_data_rise, t_data_fall);

    // sustained rate: producer and consumer answer at once
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          data_in = W'(i);
          req_in = 1;
          wait (ack_out);
          req_in = 0;
          wait (!ack_out);
        end
      end
      begin
        n = 0;
        for (int i = 0; i < 40; i++) begin
          wait (req_out);
          checks++;
          if (data_out !== W'(i)) begin failures++; $display("stream word %0d: %h", i, data_out); end
          if (i == 10) t0 = $realtime;
          if (i == 30) t1 = $realtime;
          ack_in = 1;
          wait (!req_out);
          ack_in = 0;
        end
      end
    join
    // Bounds worked out from the cells: two neighbouring stages form a ring
    // c[i] rise -> (70 + 142) c[i+1] rise -> (110) c[i] fall
    //   -> (70 + 110) c[i+1] fall -> (142) c[i] rise
    // that carries one word per turn, so no word period can be below 644 ps;
    // and a full pipeline overlaps words, so the period stays below the
    // 848 ps it takes one word to cross the empty FIFO.
    checks++;
    if ((t1 - t0) / 20 < 644 || (t1 - t0) / 20 > 848) begin
      failures++;
      $display("word period %0t outside 644..848", (t1 - t0) / 20);
    end
    $display("sustained word period %0t ps = %0.2f GHz (transistor level about 1.6 GHz)",
             (t1 - t0) / 20, 1000.0 / ((t1 - t0) / 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
