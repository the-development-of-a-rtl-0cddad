// tb_router_network: self-checking test of the N x N routing network
// (N = 4, its default). Each input sends packets whose first byte holds the
// destination port in its low log2(N) bits; each output acknowledges after
// random delays. Every received packet must equal the oldest outstanding
// packet that some input sent to that output, so both the routing and the
// restoring of the rearranged data lines are checked. All N*N source /
// destination pairs are exercised alone first, then all inputs at once with
// random and then slow receivers. The first byte also carries the source
// port, so each output knows whose packet it is delivering. Watching only the
// ports, the test counts cycles with packets from different sources leaving
// on two or more outputs at once (and on all outputs at once), cycles in
// which a source whose first byte was taken waits while its output carries
// another source's packet, and cycles with an input buffer full (its
// acknowledge held after ready fell); it fails if any of these never happened.
module tb_router_network;
  import router_pkg::*;

  localparam int N = 4;
  localparam int LOG2N = $clog2(N);

  logic clk = 0, rst_n = 0;
  rbyte_t [N-1:0] in_data, out_data;
  logic   [N-1:0] in_rdy = '0, in_ack, out_rdy, out_ack = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  router_network dut (.*);

  typedef rbyte_t pkt_t [$];
  pkt_t exp_q [N][N][$];
  int   rx_count = 0, tx_count = 0;
  int   slow_rx = 2;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic pkt_t make_pkt(int src, int dst, int len);
    pkt_t p;
    for (int i = 0; i < len; i++) begin
      rbyte_t b;
      b.data = 8'($urandom);
      if (i == 0) b.data[2*LOG2N-1:0] = {LOG2N'(src), LOG2N'(dst)};
      b.last = (i == len - 1);
      p.push_back(b);
    end
    return p;
  endfunction

  // mechanism counters, from the ports only, sampled every clock
  int cur_src [N] = '{default: -1};  // source of the packet on each output now
  int accepted [N][N];               // [src][dst] first byte taken, not yet out
  int n_concurrent = 0, n_all_busy = 0, n_blocked = 0, n_full = 0;
  bit ack_stuck [N];
  always @(posedge clk) if (rst_n) begin
    int busy;
    busy = 0;
    for (int o = 0; o < N; o++) if (cur_src[o] >= 0) busy++;
    if (busy >= 2) n_concurrent++;
    if (busy == N) n_all_busy++;
    for (int p = 0; p < N; p++) begin
      for (int o = 0; o < N; o++)
        if (accepted[p][o] > 0 && cur_src[o] >= 0 && cur_src[o] != p) n_blocked++;
      if (in_ack[p] && !in_rdy[p]) begin
        if (ack_stuck[p]) n_full++;
        ack_stuck[p] = 1;
      end else ack_stuck[p] = 0;
    end
  end

  task automatic send(int src, pkt_t p);
    exp_q[src][p[0].data[LOG2N-1:0]].push_back(p);
    tx_count++;
    foreach (p[i]) begin
      in_data[src] = p[i];
      in_rdy[src]  = 1'b1;
      do @(posedge clk); while (!in_ack[src]);
      if (i == 0) accepted[src][p[0].data[LOG2N-1:0]]++;
      #1 in_rdy[src] = 1'b0;
      do @(posedge clk); while (in_ack[src]);
      #1;
    end
  endtask

  for (genvar o = 0; o < N; o++) begin : g_rx
    initial begin
      pkt_t got;
      bit   found;
      wait (rst_n);
      forever begin
        do @(posedge clk); while (!out_rdy[o]);
        #1 got.push_back(out_data[o]);
        if (got.size() == 1) begin
          cur_src[o] = -1;
          for (int s = 0; s < N; s++)
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
          for (int s = 0; s < N; s++)
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
    check(rx_count == tx_count, $sformatf("all packets delivered (%0d of %0d)", rx_count, tx_count));
  endtask

  initial begin
    in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // every source / destination pair alone
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        send(s, make_pkt(s, d, 1 + (s + d) % 5));
        drain(500);
      end
    // all inputs at once
    fork
      begin : all_in
        for (int s = 0; s < N; s++) begin
          automatic int ss = s;
          fork
            for (int k = 0; k < 30; k++) send(ss, make_pkt(ss, $urandom_range(0, N - 1), $urandom_range(1, 20)));
          join_none
        end
        wait fork;
      end
    join
    drain(50000);
    // slow receivers: buffers fill
    slow_rx = 20;
    fork
      begin
        for (int s = 0; s < N; s++) begin
          automatic int ss = s;
          fork
            for (int k = 0; k < 10; k++) send(ss, make_pkt(ss, $urandom_range(0, N - 1), $urandom_range(10, 24)));
          join_none
        end
        wait fork;
      end
    join
    drain(100000);
    check(n_concurrent > 0, "packets leaving on two outputs at once seen");
    check(n_all_busy > 0, "packets leaving on all outputs at once seen");
    check(n_blocked > 0, "blocked requests seen");
    check(n_full > 0, "full input buffers seen");
    $display("concurrent %0d all-busy %0d blocked %0d full %0d packets %0d", n_concurrent, n_all_busy, n_blocked, n_full, rx_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
