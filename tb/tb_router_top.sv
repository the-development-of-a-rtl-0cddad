// tb_router_top: end-to-end test of the whole design at its default size (a
// 4x4 network of four 2x2 routers, 16-word buffers) together with the bench
// test module. The test module's two input sections are wired to network
// inputs 0 and 1 and its two output sections to network outputs 0 and 1, and
// "operators" work them the way the bench procedure describes: set the D / L
// and data switches, press the button, wait for the acknowledge LED, press
// again; on the output side wait for the ready LED, read the byte from the
// LEDs, press to acknowledge, press again once ready has gone. The buttons
// bounce. Network inputs 2 and 3 and outputs 2 and 3 are driven directly by
// the testbench with fast random traffic.
// Every packet received anywhere must equal the oldest outstanding packet
// some input sent to that output. The first byte carries the source port
// next to the destination. Watching only the network's ports, the test counts
// the mechanisms of the design (packets leaving on two outputs at once, a
// source whose first byte was taken waiting while its output carries another
// source's packet, input buffers full, single and multi-byte packets, button
// presses the handshake refuses) and fails if any never happened.
// Meanwhile the behavioural arbiter model in the top gets pairs of requests a
// few ps apart: exactly one grant per pair, never two at once, and some pairs
// must leave the grant withheld for a long time (metastable front end).
module tb_router_top;
  import router_pkg::*;

  localparam int N = 4;
  localparam int LOG2N = 2;

  logic clk = 0, rst_n = 0;
  rbyte_t [N-1:0] net_in_data, net_out_data;
  logic   [N-1:0] net_in_rdy, net_in_ack, net_out_rdy, net_out_ack;
  logic   [1:0]   ti_btn_no_n = '1, ti_btn_nc_n = '0, ti_d_sw = '0, ti_l_sw = '0;
  logic   [1:0][DATA_W-1:1] ti_data_sw = '0;
  logic   [1:0]   ti_ack, ti_rdy, ti_ack_led, ti_pulse;
  rbyte_t [1:0]   ti_data, to_data, to_data_led;
  logic   [1:0]   to_btn_no_n = '1, to_btn_nc_n = '0, to_rdy, to_ack, to_rdy_led, to_pulse;
  rbyte_t [N-1:2] tb_in_data = '0;
  logic   [N-1:2] tb_in_rdy = '0, tb_out_ack = '0;
  logic   [1:0]   arb_req_n = '1, arb_grant;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  router_top dut (.*);

  // test module <-> network inputs 0, 1 and outputs 0, 1
  assign net_in_data = {tb_in_data, ti_data};
  assign net_in_rdy  = {tb_in_rdy, ti_rdy};
  assign ti_ack      = net_in_ack[1:0];
  assign to_rdy      = net_out_rdy[1:0];
  assign to_data     = net_out_data[1:0];
  assign net_out_ack = {tb_out_ack, to_ack};

  typedef rbyte_t pkt_t [$];
  pkt_t exp_q [N][N][$];
  int rx_count = 0, tx_count = 0;
  int n_refused = 0, n_single = 0, n_multi = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

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

  function automatic void sent(int src, pkt_t p);
    exp_q[src][p[0].data[LOG2N-1:0]].push_back(p);
    tx_count++;
    if (p.size() == 1) n_single++; else n_multi++;
  endfunction

  function automatic void received(int o, pkt_t got);
    bit found = 0;
    for (int s = 0; s < N; s++)
      if (!found && exp_q[s][o].size() > 0 && exp_q[s][o][0] == got) begin
        found = 1;
        void'(exp_q[s][o].pop_front());
      end
    check(found, $sformatf("output %0d: packet of %0d bytes matches a sent packet", o, got.size()));
    rx_count++;
  endfunction

  // a bouncing button press on one test-module section
  task automatic press_in(int p);
    ti_btn_nc_n[p] = 1; @(posedge clk); #1;
    repeat ($urandom_range(0, 2)) begin
      ti_btn_no_n[p] = 0; @(posedge clk); #1 ti_btn_no_n[p] = 1; @(posedge clk); #1;
    end
    ti_btn_no_n[p] = 0; repeat (2) @(posedge clk); #1;
    ti_btn_no_n[p] = 1; @(posedge clk); #1;
    ti_btn_nc_n[p] = 0; repeat (2) @(posedge clk); #1;
  endtask

  task automatic press_out(int o);
    to_btn_nc_n[o] = 1; @(posedge clk); #1;
    repeat ($urandom_range(0, 2)) begin
      to_btn_no_n[o] = 0; @(posedge clk); #1 to_btn_no_n[o] = 1; @(posedge clk); #1;
    end
    to_btn_no_n[o] = 0; repeat (2) @(posedge clk); #1;
    to_btn_no_n[o] = 1; @(posedge clk); #1;
    to_btn_nc_n[o] = 0; repeat (2) @(posedge clk); #1;
  endtask

  // input-section operator: send one packet by hand
  task automatic operate_in(int p, pkt_t pk);
    sent(p, pk);
    foreach (pk[i]) begin
      ti_d_sw[p]    = pk[i].data[0];
      ti_data_sw[p] = pk[i].data[DATA_W-1:1];
      ti_l_sw[p]    = pk[i].last;
      press_in(p);
      check(ti_rdy[p] == 1, "input section raised ready");
      while (!ti_ack_led[p]) @(posedge clk);
      #1 press_in(p);
      check(ti_rdy[p] == 0, "input section dropped ready");
      while (ti_ack_led[p]) @(posedge clk);
      #1;
    end
  endtask

  // output-section operators run forever
  for (genvar o = 0; o < 2; o++) begin : g_op_out
    initial begin
      pkt_t got;
      wait (rst_n);
      forever begin
        repeat ($urandom_range(0, 6)) @(posedge clk);
        #1;
        if (!to_rdy_led[o] && !to_ack[o] && (n_refused < 2 || $urandom_range(0, 7) == 0)) begin
          press_out(o);                       // nothing offered: refused
          check(to_ack[o] == 0, "output press without ready refused");
          n_refused++;
        end
        while (!to_rdy_led[o]) @(posedge clk);
        #1 got.push_back(to_data_led[o]);
        press_out(o);
        check(to_ack[o] == 1, "output section acknowledged");
        while (to_rdy_led[o]) @(posedge clk);
        #1 press_out(o);
        check(to_ack[o] == 0, "output section dropped ack");
        if (got[$].last) begin received(o, got); got.delete(); end
      end
    end
  end

  // testbench-driven ports 2 and 3
  task automatic send_fast(int src, pkt_t p);
    sent(src, p);
    foreach (p[i]) begin
      tb_in_data[src] = p[i];
      tb_in_rdy[src]  = 1'b1;
      do @(posedge clk); while (!net_in_ack[src]);
      #1 tb_in_rdy[src] = 1'b0;
      do @(posedge clk); while (net_in_ack[src]);
      #1;
    end
  endtask

  for (genvar o = 2; o < N; o++) begin : g_rx_fast
    initial begin
      pkt_t got;
      wait (rst_n);
      forever begin
        do @(posedge clk); while (!net_out_rdy[o]);
        #1 got.push_back(net_out_data[o]);
        repeat ($urandom_range(0, 30)) @(posedge clk);
        #1 tb_out_ack[o] = 1'b1;
        do @(posedge clk); while (net_out_rdy[o]);
        #1 tb_out_ack[o] = 1'b0;
        if (got[$].last) begin received(o, got); got.delete(); end
      end
    end
  end

  // mechanism counters, from the network's ports only, sampled every clock
  int cur_src [N] = '{default: -1};  // source of the packet on each output now
  int accepted [N][N];               // [src][dst] first byte taken, not yet out
  bit in_first [N] = '{default: 1}, out_first [N] = '{default: 1};
  bit in_ack_d [N], out_rdy_d [N], ack_stuck [N];
  int n_concurrent = 0, n_blocked = 0, n_full = 0;
  always @(posedge clk) if (rst_n) begin
    int busy;
    for (int p = 0; p < N; p++) begin
      if (net_in_ack[p] && !in_ack_d[p]) begin        // a byte was taken
        if (in_first[p]) accepted[p][net_in_data[p].data[LOG2N-1:0]]++;
        in_first[p] = net_in_data[p].last;
      end
      if (net_in_ack[p] && !net_in_rdy[p]) begin
        if (ack_stuck[p]) n_full++;
        ack_stuck[p] = 1;
      end else ack_stuck[p] = 0;
      in_ack_d[p] = net_in_ack[p];
    end
    for (int o = 0; o < N; o++) begin
      if (net_out_rdy[o] && !out_rdy_d[o]) begin      // a byte is offered
        if (out_first[o]) begin
          cur_src[o] = int'(net_out_data[o].data[2*LOG2N-1:LOG2N]);
          accepted[cur_src[o]][o]--;
        end
        out_first[o] = net_out_data[o].last;
      end
      if (!net_out_rdy[o] && out_rdy_d[o] && out_first[o]) cur_src[o] = -1;
      out_rdy_d[o] = net_out_rdy[o];
    end
    busy = 0;
    for (int o = 0; o < N; o++) if (cur_src[o] >= 0) busy++;
    if (busy >= 2) n_concurrent++;
    for (int p = 0; p < N; p++)
      for (int o = 0; o < N; o++)
        if (accepted[p][o] > 0 && cur_src[o] >= 0 && cur_src[o] != p) n_blocked++;
  end

  // the arbiter model: near-simultaneous request pairs
  int n_arb_meta = 0;
  always @(arb_grant) check(arb_grant != 2'b11, "arbiter model: never two grants");
  task automatic arbiter_pairs(int pairs);
    longint t0;
    for (int k = 0; k < pairs; k++) begin
      int skew;
      skew = $urandom_range(0, 8);
      arb_req_n[k % 2] = 1'b0;
      #(skew) arb_req_n[1 - k % 2] = 1'b0;
      t0 = $time;
      fork
        wait (arb_grant != 2'b00);
        #1000000;
      join_any
      disable fork;
      if ($time - t0 > 10000) n_arb_meta++;
      #20000 check(arb_grant == 2'b01 || arb_grant == 2'b10, "arbiter model: one grant per pair");
      arb_req_n = 2'b11;
      #30000 check(arb_grant == 2'b00, "arbiter model: grants gone");
    end
  endtask

  int t;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        for (int k = 0; k < 6; k++) operate_in(0, make_pkt(0, k % N, 1 + (k % 3) * 3));
      end
      begin
        for (int k = 0; k < 6; k++) operate_in(1, make_pkt(1, (k + 2) % N, 1 + (k % 2) * 5));
      end
      begin
        for (int k = 0; k < 12; k++) send_fast(2, make_pkt(2, $urandom_range(0, N - 1), $urandom_range(1, 24)));
      end
      arbiter_pairs(12);
      begin
        for (int k = 0; k < 12; k++) send_fast(3, make_pkt(3, $urandom_range(0, N - 1), $urandom_range(1, 24)));
      end
    join
    t = 0;
    while (rx_count < tx_count && t < 200000) begin @(posedge clk); t++; end
    check(rx_count == tx_count, $sformatf("all packets delivered (%0d of %0d)", rx_count, tx_count));
    check(n_concurrent > 0, "packets leaving on two outputs at once seen");
    check(n_blocked > 0, "blocked requests seen");
    check(n_full > 0, "full input buffers seen");
    check(n_single > 0 && n_multi > 0, "single and multi-byte packets sent");
    check(n_refused > 0, "button presses refused by the handshake seen");
    check(n_arb_meta > 0, "arbiter model: metastable pairs seen");
    $display("concurrent %0d blocked %0d full %0d refused %0d single %0d multi %0d packets %0d arbiter-metastable %0d",
             n_concurrent, n_blocked, n_full, n_refused, n_single, n_multi, rx_count, n_arb_meta);
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
