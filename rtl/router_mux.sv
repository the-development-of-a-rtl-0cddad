// router_mux: the Multiplexor of the router, purely combinational.
//
// It links input ports A and B to output ports I and II as the arbiters'
// grants say, relays ready from the Master to the output and acknowledge from
// the output back to the Master, and tells each Master whether its port is
// linked (det low) or free (det high).
//   rdy_out[I]  = gIA & rdy_a | gIB & rdy_b      (likewise for II)
//   ack_a       = gIA & ack_out[I] | gIIA & ack_out[II]   (likewise for B)
//   det_a       = !(gIA | gIIA)                            (likewise for B)
// Data steering: output I carries input A's data when gIA is high and input
// B's otherwise; output II carries input B's data when gIIB is high and input
// A's otherwise. A data path is therefore always connected, but its ready is
// only passed on under a grant.
//
// All of this, including the default data connection (A to II, B to I), is
// the document's. Its two set-up delays (data path switched before the grant
// reaches the control paths; data valid before ready) are not needed here:
// every signal that feeds this block comes from a register, so data and ready
// change together on a clock edge and the data is settled before the receiver
// samples ready.
module router_mux
  import router_pkg::*;
(
  // grants from the arbiter of output I: [0] to input A, [1] to input B
  input  logic [1:0] gnt_i,
  // grants from the arbiter of output II: [0] to input A, [1] to input B
  input  logic [1:0] gnt_ii,
  // input side (from the Masters / buffers)
  input  rbyte_t     data_a,
  input  rbyte_t     data_b,
  input  logic       rdy_a,
  input  logic       rdy_b,
  output logic       ack_a,
  output logic       ack_b,
  output logic       det_a,
  output logic       det_b,
  // output side
  output rbyte_t     data_o_i,
  output rbyte_t     data_o_ii,
  output logic       rdy_o_i,
  output logic       rdy_o_ii,
  input  logic       ack_o_i,
  input  logic       ack_o_ii
);

  assign data_o_i  = gnt_i[0]  ? data_a : data_b;
  assign data_o_ii = gnt_ii[1] ? data_b : data_a;

  assign rdy_o_i   = (gnt_i[0]  && rdy_a) || (gnt_i[1]  && rdy_b);
  assign rdy_o_ii  = (gnt_ii[0] && rdy_a) || (gnt_ii[1] && rdy_b);

  assign ack_a     = (gnt_i[0] && ack_o_i) || (gnt_ii[0] && ack_o_ii);
  assign ack_b     = (gnt_i[1] && ack_o_i) || (gnt_ii[1] && ack_o_ii);

  assign det_a     = !(gnt_i[0] || gnt_ii[0]);
  assign det_b     = !(gnt_i[1] || gnt_ii[1]);

endmodule
