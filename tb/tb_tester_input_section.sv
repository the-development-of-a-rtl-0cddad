// tb_tester_input_section: self-checking test of the test-module sender.
// Presses the button with and without an acknowledge present and checks that
// ready rises only when ready and ack are both low, falls only when both are
// high, and ignores presses at any other time; checks the switch-driven byte
// and the acknowledge LED. Then 300 random steps (random ack, switches and
// bounce count; some steps only bounce the released throw, which is no press)
// are checked against a J-K reference.
module tb_tester_input_section;
  import router_pkg::*;
  logic clk = 0, rst_n = 0;
  logic btn_no_n = 1, btn_nc_n = 0, d_sw = 0, l_sw = 0, ack = 0;
  logic [DATA_W-1:1] data_sw = '0;
  logic rdy, ack_led, pulse;
  rbyte_t data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  tester_input_section dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(int bounces = 1);
    btn_nc_n = 1; @(posedge clk); #1;
    repeat (bounces) begin
      btn_no_n = 0; @(posedge clk); #1 btn_no_n = 1; @(posedge clk); #1;  // bounce
    end
    btn_no_n = 0;
    repeat (3) @(posedge clk); #1;
    btn_no_n = 1; @(posedge clk); #1;
    btn_nc_n = 0; repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1 check(rdy == 0, "ready low after reset");
    d_sw = 1; l_sw = 1; data_sw = 7'h5A; #1;
    check(data == '{last: 1'b1, data: 8'hB5}, "byte from switches");
    press();  check(rdy == 1, "press raises ready (ack low)");
    press();  check(rdy == 1, "press ignored while ack not given");
    ack = 1;  #1 check(ack_led == 1, "ack LED on");
    press();  check(rdy == 0, "press drops ready after ack");
    press();  check(rdy == 0, "press ignored while ack still high");
    ack = 0;  #1 check(ack_led == 0, "ack LED off");
    press();  check(rdy == 1, "next byte: ready raised again");
    // random steps against a J-K reference
    for (int k = 0; k < 300; k++) begin
      bit exp_rdy;
      ack = 1'($urandom); d_sw = 1'($urandom); l_sw = 1'($urandom); data_sw = 7'($urandom);
      #1;
      check(data == '{last: l_sw, data: {data_sw, d_sw}} && ack_led == ack, "switches and LED");
      exp_rdy = rdy;
      if ($urandom_range(0, 4) == 0) begin
        // the released throw bounces: not a press
        repeat ($urandom_range(1, 3)) begin
          btn_nc_n = 1; @(posedge clk); #1 btn_nc_n = 0; @(posedge clk); #1;
        end
        check(pulse == 0, "bounce on the released throw gives no pulse");
      end else begin
        if (!rdy && !ack) exp_rdy = 1;
        else if (rdy && ack) exp_rdy = 0;
        press($urandom_range(0, 3));
      end
      check(rdy == exp_rdy, $sformatf("step %0d: ready %0b, expected %0b", k, rdy, exp_rdy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
