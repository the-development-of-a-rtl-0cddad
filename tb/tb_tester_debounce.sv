// tb_tester_debounce: self-checking test of the pushbutton debouncer.
// Presses and releases the button with contact bounce on the closing throw
// (the throw opens and closes several times, the other throw stays open) and
// checks that the output changes exactly once per press and once per release.
module tb_tester_debounce;
  logic clk = 0, rst_n = 0;
  logic no_n = 1, nc_n = 0, q;
  int checks = 0, failures = 0, edges = 0;
  logic q_d;

  always #5 clk = ~clk;
  tester_debounce dut (.*);

  always @(posedge clk) begin
    q_d <= q;
    if (rst_n && q !== q_d) edges++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bounce(ref logic c, input int times);
    for (int i = 0; i < times; i++) begin
      c = 0; repeat ($urandom_range(1, 3)) @(posedge clk); #1;
      c = 1; repeat ($urandom_range(1, 3)) @(posedge clk); #1;
    end
    c = 0;
  endtask

  initial begin
    q_d = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;
    check(q == 0, "released after reset");
    for (int k = 0; k < 10; k++) begin
      edges = 0;
      nc_n = 1; repeat (3) @(posedge clk); #1;       // contact in flight
      check(q == 0, "holds while in flight");
      bounce(no_n, $urandom_range(1, 5));
      repeat (3) @(posedge clk); #1;
      check(q == 1, "pressed");
      no_n = 1; repeat (3) @(posedge clk); #1;
      check(q == 1, "holds while in flight back");
      bounce(nc_n, $urandom_range(1, 5));
      repeat (3) @(posedge clk); #1;
      check(q == 0, "released");
      check(edges == 2, $sformatf("one rise and one fall per press (saw %0d edges)", edges));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
