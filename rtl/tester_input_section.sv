// tester_input_section: one input section of the bench test module. It plays
// the sender of a reset-signalling link, one handshake step per button press.
//
// A debounced press clocks a J-K flip-flop whose output is ready:
//   J = !(ready | ack)   raise ready only when ready and ack are both low
//   K =   ready & ack    drop ready only once ack has answered it
// so a press changes ready only when the handshake allows it, and a press at
// any other time does nothing. Two switches set the last-byte flag L and the
// direction D (data bit 0); the other data lines are tied by the user
// (data_sw). ack_led shows that an acknowledge is present, i.e. the next press
// will drop ready. The raw debounced level is brought out as pulse for tests
// that need pulses outside the protocol.
// The J-K equations, switches and LED follow the document's circuit; the
// flip-flop is clocked by clk on the rising edge of the debounced level (one
// clock after the latch) instead of directly by the latch.
module tester_input_section
  import router_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              btn_no_n,  // pushbutton throws (see tester_debounce)
  input  logic              btn_nc_n,
  input  logic              d_sw,      // direction switch: data bit 0
  input  logic              l_sw,      // last-byte switch
  input  logic [DATA_W-1:1] data_sw,   // remaining data lines, tied high or low
  input  logic              ack,       // acknowledge from the port under test
  output logic              rdy,       // ready to the port under test
  output rbyte_t            data,      // byte presented to the port under test
  output logic              ack_led,   // on while ack is high
  output logic              pulse      // debounced button level
);

  logic pulse_q, step;

  tester_debounce u_db (.clk, .rst_n, .no_n(btn_no_n), .nc_n(btn_nc_n), .q(pulse));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pulse_q <= 1'b0;
    else        pulse_q <= pulse;
  end
  assign step = pulse && !pulse_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdy <= 1'b0;
    else if (step) begin
      unique case ({!(rdy || ack), rdy && ack})   // {J, K}
        2'b10:   rdy <= 1'b1;
        2'b01:   rdy <= 1'b0;
        default: ;
      endcase
    end
  end

  assign data    = '{last: l_sw, data: {data_sw, d_sw}};
  assign ack_led = ack;

endmodule
