// tb_router: self-checking test of the 2x2 router.
// Two sender processes push packets (1 to 24 bytes, direction in bit 0 of the
// first byte, last-byte flag on the final byte) into inputs A and B under the
// four-phase handshake; two receiver processes acknowledge outputs I and II
// after random delays. Every received packet must equal, byte for byte and
// flag for flag, the oldest packet not yet received that one of the inputs
// sent to that output, and packets must never interleave on an output.
// Directed phases first check the latency of an uncontested single-byte and
// multi-byte packet, the two concurrent configurations (A->I with B->II and
// A->II with B->I) and the four blocked ones (both inputs to one output, each
// input once the loser); a random phase with slow receivers then fills the
// input buffers. The test counts how often each of these happened and fails if
// one never did.
module tb_router;
  import router_pkg::*;

  logic clk = 0, rst_n = 0;
  rbyte_t [1:0] in_data, out_data;
  logic   [1:0] in_rdy = '0, in_ack, out_rdy, out_ack = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  router dut (.*);

  typedef rbyte_t pkt_t [$];
  pkt_t exp_q [2][2][$];     // [src][dst] packets sent, not yet received
  int   rx_count = 0, tx_count = 0;
  int   slow_rx = 0;         // receiver delay upper bound
  int   rx_gap = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic pkt_t make_pkt(int src, int dst, int len);
    pkt_t p;
    for (int i = 0; i < len; i++) begin
      rbyte_t b;
      b.data = 8'($urandom);
      if (i == 0) b.data[1:0] = {src[0], dst[0]};
      b.last = (i == len - 1);
      p.push_back(b);
    end
    return p;
  endfunction

  // mechanism counters, from the ports only, sampled every clock
  int cur_src [2] = '{-1, -1};  // input whose packet is on each output now
  int accepted [2][2];          // [src][dst] first byte taken, packet not yet out
  int n_concurrent [2];         // [0]: A->I & B->II, [1]: A->II & B->I
  int n_blocked [2][2];         // [waiting input][output]
  int n_full [2];
  int n_single = 0, n_multi = 0;
  bit ack_stuck [2];
  always @(posedge clk) if (rst_n) begin
    if (cur_src[0] == 0 && cur_src[1] == 1) n_concurrent[0]++;
    if (cur_src[0] == 1 && cur_src[1] == 0) n_concurrent[1]++;
    for (int p = 0; p < 2; p++) begin
      for (int o = 0; o < 2; o++)
        if (accepted[p][o] > 0 && cur_src[o] == 1 - p) n_blocked[p][o]++;
      // a buffer that is full keeps its acknowledge high after ready fell
      if (in_ack[p] && !in_rdy[p]) begin
        if (ack_stuck[p]) n_full[p]++;
        ack_stuck[p] = 1;
      end else ack_stuck[p] = 0;
    end
  end

  task automatic send(int src, pkt_t p);
    exp_q[src][p[0].data[0]].push_back(p);
    tx_count++;
    foreach (p[i]) begin
      in_data[src] = p[i];
      in_rdy[src]  = 1'b1;
      do @(posedge clk); while (!in_ack[src]);
      if (i == 0) accepted[src][p[0].data[0]]++;
      #1 in_rdy[src] = 1'b0;
      do @(posedge clk); while (in_ack[src]);
      #1;
    end
  endtask

  // receivers run forever
  for (genvar o = 0; o < 2; o++) begin : g_rx
    initial begin
      pkt_t got;
      bit   found;
      wait (rst_n);
      forever begin
        do @(posedge clk); while (!out_rdy[o]);
        #1 got.push_back(out_data[o]);
        if (got.size() == 1) begin
          cur_src[o] = -1;
          for (int s = 0; s < 2; s++)
            if (exp_q[s][o].size() > 0 && exp_q[s][o][0][0] == got[0]) cur_src[o] = s;
          check(cur_src[o] >= 0, $sformatf("output %0d: first byte belongs to a sent packet", o));
          if (cur_src[o] >= 0) accepted[cur_src[o]][o]--;
        end
        repeat ($urandom_range(0, slow_rx)) @(posedge clk);
        #1 out_ack[o] = 1'b1;
        do @(posedge clk); while (out_rdy[o]);
        #1 out_ack[o] = 1'b0;
        if (got[$].last) begin
          cur_src[o] = -1;
          found = 0;
          for (int s = 0; s < 2; s++)
            if (!found && exp_q[s][o].size() > 0 && exp_q[s][o][0] == got) begin
              found = 1;
              void'(exp_q[s][o].pop_front());
            end
          check(found, $sformatf("output %0d: packet of %0d bytes matches a sent packet", o, got.size()));
          rx_count++;
          got.delete();
        end
      end
    end
  end

  task automatic drain(int max_clocks);
    int t = 0;
    while (rx_count < tx_count && t < max_clocks) begin @(posedge clk); t++; end
    check(rx_count == tx_count, "all packets delivered");
  endtask

  task automatic send_and_count(int src, pkt_t p);
    if (p.size() == 1) n_single++; else n_multi++;
    send(src, p);
  endtask

  int lat;
  initial begin
    in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    // latency, uncontested single-byte packet A -> I: expect 4 clocks
    @(posedge clk); #1;
    fork send_and_count(0, make_pkt(0, 0, 1)); join_none
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!out_rdy[0]);
    check(lat == 4, $sformatf("single-byte first byte latency %0d clocks (want 4)", lat));
    drain(100);
    // latency, multi-byte packet B -> II: one extra clock in state F
    @(posedge clk); #1;
    fork send_and_count(1, make_pkt(1, 1, 3)); join_none
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!out_rdy[1]);
    check(lat == 5, $sformatf("multi-byte first byte latency %0d clocks (want 5)", lat));
    drain(200);
    // every uncontested route: A->I, A->II, B->I, B->II, single and multi byte
    for (int s = 0; s < 2; s++)
      for (int d = 0; d < 2; d++) begin
        send_and_count(s, make_pkt(s, d, 1));
        send_and_count(s, make_pkt(s, d, 6));
        drain(500);
      end
    // concurrent configurations
    for (int c = 0; c < 2; c++) begin
      slow_rx = 3;
      fork
        send_and_count(0, make_pkt(0, c, 12));
        send_and_count(1, make_pkt(1, 1 - c, 12));
      join
      drain(1000);
    end
    // blocked configurations: both inputs to output d, input w starts later
    for (int d = 0; d < 2; d++)
      for (int w = 0; w < 2; w++) begin
        fork
          send_and_count(1 - w, make_pkt(1 - w, d, 10));
          begin repeat (8) @(posedge clk); #1 send_and_count(w, make_pkt(w, d, 4)); end
        join
        drain(1000);
      end
    // random traffic with slow receivers: buffers fill up
    slow_rx = 12;
    fork
      for (int k = 0; k < 40; k++) send_and_count(0, make_pkt(0, $urandom_range(0, 1), $urandom_range(1, 24)));
      for (int k = 0; k < 40; k++) send_and_count(1, make_pkt(1, $urandom_range(0, 1), $urandom_range(1, 24)));
    join
    drain(40000);
    slow_rx = 0;
    // coverage of the mechanisms
    check(n_concurrent[0] > 0, "concurrent A->I with B->II seen");
    check(n_concurrent[1] > 0, "concurrent A->II with B->I seen");
    for (int p = 0; p < 2; p++)
      for (int o = 0; o < 2; o++)
        check(n_blocked[p][o] > 0, $sformatf("input %0d blocked on output %0d seen", p, o));
    check(n_full[0] > 0 && n_full[1] > 0, "both input buffers filled");
    check(n_single > 0 && n_multi > 0, "single and multi-byte packets sent");
    $display("concurrent %0d/%0d blocked %0d %0d %0d %0d full %0d/%0d single %0d multi %0d packets %0d",
      n_concurrent[0], n_concurrent[1], n_blocked[0][0], n_blocked[0][1], n_blocked[1][0],
      n_blocked[1][1], n_full[0], n_full[1], n_single, n_multi, rx_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
