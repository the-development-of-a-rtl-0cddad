// tb_router_arbiter: self-checking test of the two-way arbiter.
// Checks single requests, hold-until-withdrawn, hand-over to a waiting
// requester, fairness of simultaneous requests (the winner alternates), and,
// under 3000 clocks of random requests, mutual exclusion and that a waiting
// request is granted within a clock of the port being released.
module tb_router_arbiter;
  logic clk = 0, rst_n = 0;
  logic [1:0] req = 0, gnt;
  int checks = 0, failures = 0;
  int wins [2];

  always #5 clk = ~clk;

  router_arbiter dut (.*);

  task automatic expect_gnt(logic [1:0] g, string what);
    @(posedge clk); #1;
    checks++;
    if (gnt !== g) begin failures++; $display("FAIL %s: gnt=%b want %b", what, gnt, g); end
  endtask

  logic [1:0] prev_gnt;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_gnt(2'b00, "idle");
    req = 2'b01; expect_gnt(2'b01, "A granted");
    req = 2'b11; expect_gnt(2'b01, "A holds while B waits");
    expect_gnt(2'b01, "A still holds");
    req = 2'b10; expect_gnt(2'b10, "hand-over to B");
    req = 2'b00; expect_gnt(2'b00, "released");
    req = 2'b10; expect_gnt(2'b10, "B granted");
    req = 2'b00; expect_gnt(2'b00, "released");
    // simultaneous requests: the winner must alternate
    for (int i = 0; i < 8; i++) begin
      req = 2'b11;
      @(posedge clk); #1;
      checks++;
      if (gnt != 2'b01 && gnt != 2'b10) begin failures++; $display("FAIL tie: gnt=%b", gnt); end
      else wins[gnt[1]]++;
      req = 2'b00;
      expect_gnt(2'b00, "released after tie");
    end
    checks++;
    if (wins[0] != 4 || wins[1] != 4) begin
      failures++; $display("FAIL ties not shared: A %0d B %0d", wins[0], wins[1]);
    end
    // random requests
    for (int i = 0; i < 3000; i++) begin
      prev_gnt = gnt;
      // a requester keeps its request while granted, like the Master does
      req = ($urandom_range(0, 3) == 0) ? 2'(($urandom_range(0, 3))) : req;
      @(posedge clk); #1;
      checks++;
      if (gnt[0] && gnt[1]) begin failures++; $display("FAIL two grants"); end
      checks++;
      if (((prev_gnt & req) != 0) && (gnt != (prev_gnt & req))) begin
        failures++; $display("FAIL grant not held: prev %b req %b gnt %b", prev_gnt, req, gnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
