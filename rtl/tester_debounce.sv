// tester_debounce: the pushbutton debouncer of the bench test module, a
// set-reset latch driven by the two throws of a changeover switch.
//
// The switch's common contact is grounded; pressing it pulls no_n low,
// releasing it pulls nc_n low. While a contact bounces it only opens and
// closes its own throw, never reaching the other, so the latch simply holds:
// q goes high on the first touch of the pressed throw and low on the first
// touch of the released throw, one clean pulse per press.
//   no_n low, nc_n high -> q = 1      nc_n low, no_n high -> q = 0
//   both high (contact in flight or bouncing) -> q holds
// The document builds this from two cross-coupled gates; here it is a clocked
// register, so q follows a contact one clock later. Reset clears q.
module tester_debounce (
  input  logic clk,
  input  logic rst_n,
  input  logic no_n,   // normally-open throw, low while pressed
  input  logic nc_n,   // normally-closed throw, low while released
  output logic q       // debounced button level
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                q <= 1'b0;
    else if (!no_n && nc_n)    q <= 1'b1;
    else if (!nc_n && no_n)    q <= 1'b0;
  end

endmodule
