// Self-checking testbench for the four-terminal bus network.
//
// Four sources inject numbered messages to random destinations while the
// outputs apply random back-pressure.  The checker keeps, for every
// (source, destination) pair, the expected sequence of messages and
// demands in-order, exactly-once delivery at the right terminal.  A single
// message on an idle bus must arrive two cycles after it is accepted, and
// at most one message may leave the bus per cycle.
module net_bus_tb;
  import mcore_pkg::*;

  localparam int N = 4;
  localparam int MSGS_PER_SRC = 200;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic        in_val [N], in_rdy [N], out_val [N], out_rdy [N];
  net_req_4B_t in_msg [N], out_msg [N];

  net_bus #(.msg_t(net_req_4B_t), .NPORTS(N)) dut (.*);

  int checks = 0, failures = 0;
  int sent [N], recv_cnt = 0;
  int exp_seq [N][N];            // next sequence number expected per (src,dest)
  int sent_seq [N][N];
  bit backpressure = 0;
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic net_req_4B_t mk(int src, int dest, int seq);
    net_req_4B_t m;
    m = '0;
    m.src = 2'(src);
    m.dest = 2'(dest);
    m.payload.addr = 32'(seq);
    m.payload.data = 32'(src * 1000 + dest * 100000 + seq);
    return m;
  endfunction

  // checker on the outputs
  always @(posedge clk) if (!reset) begin
    int delivered;
    delivered = 0;
    for (int o = 0; o < N; o++) if (out_val[o] && out_rdy[o]) begin
      int s, sq;
      delivered++;
      s  = int'(out_msg[o].src);
      sq = int'(out_msg[o].payload.addr);
      checks++;
      if (int'(out_msg[o].dest) != o || sq != exp_seq[s][o] ||
          out_msg[o].payload.data != 32'(s * 1000 + o * 100000 + sq)) begin
        failures++;
        $display("FAIL out %0d: src %0d dest %0d seq %0d (expected %0d)",
                 o, s, out_msg[o].dest, sq, exp_seq[s][o]);
      end
      exp_seq[s][o]++;
      recv_cnt++;
    end
  end

  // one message per cycle leaves the bus at most
  int bus_moves_max = 0;
  always @(posedge clk) if (!reset) begin
    int g;
    g = $countones(dut.grant);
    if (g > bus_moves_max) bus_moves_max = g;
  end

  always @(negedge clk) for (int o = 0; o < N; o++)
    out_rdy[o] = backpressure ? ($urandom % 3 != 0) : 1'b1;

  initial begin
    for (int i = 0; i < N; i++) begin
      in_val[i] = 0; in_msg[i] = '0; sent[i] = 0;
      for (int j = 0; j < N; j++) begin exp_seq[i][j] = 0; sent_seq[i][j] = 0; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // latency on an idle bus: accepted at edge t, visible after edge t+2
    @(negedge clk);
    in_val[2] = 1; in_msg[2] = mk(2, 1, 0); sent_seq[2][1] = 1;
    @(posedge clk); #1;
    checks++; if (!in_rdy[2]) failures++;
    @(negedge clk) in_val[2] = 0;
    begin
      int lat;
      lat = 1;
      while (!out_val[1] && lat < 10) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL idle latency %0d cycles, expected 2", lat); end
    end
    repeat (3) @(posedge clk);

    // random traffic with back-pressure
    backpressure = 1;
    fork
      for (int s = 0; s < N; s++) begin
        automatic int src = s;
        fork
          begin
            while (sent[src] < MSGS_PER_SRC) begin
              @(negedge clk);
              if (!in_val[src] && ($urandom % 4 != 0)) begin
                automatic int d;
                d = $urandom % N;
                in_val[src] = 1;
                in_msg[src] = mk(src, d, sent_seq[src][d]);
              end
              // in_rdy is registered, so its value now holds at the next edge
              if (in_val[src] && in_rdy[src]) begin
                @(posedge clk);
                sent_seq[src][int'(in_msg[src].dest)]++;
                sent[src]++;
                #1 in_val[src] = 0;
              end
            end
          end
        join_none
      end
    join_none
    wait (recv_cnt == N * MSGS_PER_SRC + 1);
    repeat (5) @(posedge clk);
    checks++;
    if (bus_moves_max != 1) begin failures++; $display("FAIL bus never or over used: %0d", bus_moves_max); end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      checks++;
      if (exp_seq[i][j] != sent_seq[i][j]) begin
        failures++; $display("FAIL pair %0d->%0d sent %0d got %0d", i, j, sent_seq[i][j], exp_seq[i][j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
