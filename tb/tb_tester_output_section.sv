// tb_tester_output_section: self-checking test of the test-module receiver.
// Presses the button with and without a ready present and checks that ack
// rises only while a byte is offered, falls only after ready has been
// withdrawn, and ignores presses at other times; checks the LEDs. Then 300
// random steps (random ready, byte and bounce count; some steps only bounce the
// released throw, which is no press) are checked against a J-K reference.
module tb_tester_output_section;
  import router_pkg::*;
  logic clk = 0, rst_n = 0;
  logic btn_no_n = 1, btn_nc_n = 0, rdy = 0;
  rbyte_t data = '0, data_led;
  logic ack, rdy_led, pulse;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  tester_output_section dut (.*);

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
    @(posedge clk); #1 check(ack == 0, "ack low after reset");
    press();  check(ack == 0, "press ignored without ready");
    rdy = 1; data = '{last: 1'b0, data: 8'h3C}; #1;
    check(rdy_led == 1 && data_led == data, "LEDs show ready and byte");
    press();  check(ack == 1, "press acknowledges offered byte");
    press();  check(ack == 1, "press ignored while ready still high");
    rdy = 0; #1 check(rdy_led == 0, "ready LED off");
    press();  check(ack == 0, "press drops ack after ready withdrawn");
    press();  check(ack == 0, "press ignored, nothing offered");
    // random steps against a J-K reference
    for (int k = 0; k < 300; k++) begin
      bit exp_ack;
      rdy = 1'($urandom); data = rbyte_t'($urandom);
      #1;
      check(rdy_led == rdy && data_led == data, "LEDs show ready and byte");
      exp_ack = ack;
      if ($urandom_range(0, 4) == 0) begin
        repeat ($urandom_range(1, 3)) begin
          btn_nc_n = 1; @(posedge clk); #1 btn_nc_n = 0; @(posedge clk); #1;
        end
        check(pulse == 0, "bounce on the released throw gives no pulse");
      end else begin
        if (rdy && !ack) exp_ack = 1;
        else if (!rdy && ack) exp_ack = 0;
        press($urandom_range(0, 3));
      end
      check(ack == exp_ack, $sformatf("step %0d: ack %0b, expected %0b", k, ack, exp_ack));
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
