// tester_output_section: one output section of the bench test module. It
// plays the receiver of a reset-signalling link, one handshake step per
// button press, and displays what arrives.
//
// A debounced press clocks a J-K flip-flop whose output is acknowledge:
//   J = ready & !ack     raise ack only while a byte is offered
//   K = !ready & ack     drop ack only once ready has been withdrawn
// so a press changes ack only when the handshake allows it. rdy_led and
// data_led mirror the ready line and the byte on the port for the user.
// The structure (debounced button, J-K flip-flop, LEDs on ready and on the
// data and L lines) follows the document's circuit; the exact J and K gating is
// read as the mirror image of the input section, which the document calls
// analogous. Clocking is as in tester_input_section.
module tester_output_section
  import router_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   btn_no_n,
  input  logic   btn_nc_n,
  input  logic   rdy,       // ready from the port under test
  input  rbyte_t data,      // byte on the port under test
  output logic   ack,       // acknowledge to the port under test
  output logic   rdy_led,
  output rbyte_t data_led,
  output logic   pulse      // debounced button level
);

  logic pulse_q, step;

  tester_debounce u_db (.clk, .rst_n, .no_n(btn_no_n), .nc_n(btn_nc_n), .q(pulse));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pulse_q <= 1'b0;
    else        pulse_q <= pulse;
  end
  assign step = pulse && !pulse_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else if (step) begin
      unique case ({rdy && !ack, !rdy && ack})   // {J, K}
        2'b10:   ack <= 1'b1;
        2'b01:   ack <= 1'b0;
        default: ;
      endcase
    end
  end

  assign rdy_led  = rdy;
  assign data_led = data;

endmodule
