// tb_router_fifo: self-checking test of the input buffer.
// Fills the 16-word buffer through its four-phase write side, checks that the
// acknowledge of the 16th word stays high while full and that a 17th byte is
// not taken, then reads everything back through the four-phase read side,
// checking order and contents, and finally streams 200 random words with the
// writer and reader running concurrently at random speeds.
module tb_router_fifo;
  import router_pkg::*;

  logic clk = 0, rst_n = 0;
  rbyte_t in_data, out_data;
  logic in_rdy = 0, in_ack, out_rdy, out_ack = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  router_fifo dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(rbyte_t w);
    in_data = w; in_rdy = 1;
    do @(posedge clk); while (!in_ack);
    #1 in_rdy = 0;
  endtask

  task automatic wait_ack_low(int max, output bit ok);
    ok = 0;
    repeat (max) begin @(posedge clk); #1 if (!in_ack) begin ok = 1; break; end end
  endtask

  task automatic get(output rbyte_t w);
    do @(posedge clk); while (!out_rdy);
    #1 w = out_data; out_ack = 1;
    do @(posedge clk); while (out_rdy);
    #1 out_ack = 0;
  endtask

  rbyte_t exp_q[$];
  rbyte_t w, g;
  bit ok;
  int n_wr, n_rd;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(!out_rdy && !in_ack, "idle after reset");
    // fill
    for (int i = 0; i < 16; i++) begin
      w = '{last: (i % 4 == 3), data: 8'(i * 7 + 3)};
      exp_q.push_back(w);
      put(w);
      wait_ack_low(4, ok);
      if (i < 15) check(ok, $sformatf("ack falls after word %0d", i));
      else        check(!ok, "ack held high after the 16th word (full)");
    end
    // 17th byte offered: must not be taken while full
    in_data = '{last: 0, data: 8'hEE}; 
    repeat (10) @(posedge clk);
    check(in_ack == 1, "ack still high while full");
    // read one word: ack must then fall
    get(g);
    check(g == exp_q.pop_front(), "first word read back");
    wait_ack_low(4, ok);
    check(ok, "ack falls once a word has been removed");
    // now offer the 17th word properly
    w = '{last: 1, data: 8'hEE}; exp_q.push_back(w); put(w);
    while (exp_q.size() > 0) begin
      get(g);
      check(g == exp_q.pop_front(), $sformatf("word %0h read back in order", g));
    end
    repeat (5) @(posedge clk);
    check(!out_rdy, "ready stays low when empty");
    // concurrent random traffic
    fork
      begin
        for (n_wr = 0; n_wr < 200; n_wr++) begin
          w = rbyte_t'($urandom);
          exp_q.push_back(w);
          put(w);
          do @(posedge clk); while (in_ack);
          repeat ($urandom_range(0, 2)) @(posedge clk);
          #1;
        end
      end
      begin
        for (n_rd = 0; n_rd < 200; n_rd++) begin
          get(g);
          check(g == exp_q.pop_front(), "concurrent word in order");
          repeat ($urandom_range(0, 3)) @(posedge clk);
        end
      end
    join
    // latency: write into empty buffer -> out_rdy two clocks after in_rdy seen
    repeat (3) @(posedge clk);
    #1 in_data = 9'h15; in_rdy = 1;
    @(posedge clk); #1 check(in_ack && !out_rdy, "ack one clock after ready");
    @(posedge clk); #1 check(out_rdy, "out_rdy two clocks after ready");
    in_rdy = 0;
    get(g); check(g == 9'h15, "latency word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
