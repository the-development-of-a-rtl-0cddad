// router: the 2x2 packet router. Packets arrive byte-serially on input ports
// A and B under the reset-signalling handshake and leave on output ports I or
// II. Bit 0 of a packet's first byte picks the output (0: I, 1: II); the
// last-byte flag ends the packet. Two packets that want different outputs
// pass at the same time; if both want the same output one waits in its input
// buffer until the other packet's last byte has gone.
//
// Structure (the document's block diagram): each input has a buffer
// (router_fifo) and a controller (router_master); each output has an arbiter
// (router_arbiter); one combinational crossbar (router_mux) links them.
//   input -> fifo -> master -> req -> arbiter -> grant -> mux -> output
// Port index 0 is input A / output I, index 1 is input B / output II.
//
// Timing, all in clocks of clk: a byte written into an empty buffer is offered
// to the Master two clocks later; a first byte then takes one clock in state F,
// one for the request to be granted, and appears on the output in the clock
// after that (about five clocks from in_rdy); later bytes of a packet pass one
// clock after the buffer offers them. The single clock and the active-high
// requests are this design's choices; the document's router is self-timed.
module router
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  rbyte_t [1:0] in_data,
  input  logic   [1:0] in_rdy,
  output logic   [1:0] in_ack,
  output rbyte_t [1:0] out_data,
  output logic   [1:0] out_rdy,
  input  logic   [1:0] out_ack
);

  rbyte_t        f_data [2];
  logic    [1:0] f_rdy, f_ack;
  logic    [1:0] m_rdy, m_ack, m_det, m_req_i, m_req_ii;
  logic    [1:0] gnt_i, gnt_ii;

  for (genvar p = 0; p < 2; p++) begin : g_in
    router_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_data (in_data[p]), .in_rdy (in_rdy[p]), .in_ack (in_ack[p]),
      .out_data(f_data[p]),  .out_rdy(f_rdy[p]),  .out_ack(f_ack[p])
    );
    router_master u_master (
      .clk, .rst_n,
      .rin   (f_rdy[p]),
      .l     (f_data[p].last),
      .d     (f_data[p].data[0]),
      .ackin (f_ack[p]),
      .rdy   (m_rdy[p]),
      .ack   (m_ack[p]),
      .det   (m_det[p]),
      .req_i (m_req_i[p]),
      .req_ii(m_req_ii[p]),
      .state ()
    );
  end

  router_arbiter u_arb_i  (.clk, .rst_n, .req(m_req_i),  .gnt(gnt_i));
  router_arbiter u_arb_ii (.clk, .rst_n, .req(m_req_ii), .gnt(gnt_ii));

  router_mux u_mux (
    .gnt_i, .gnt_ii,
    .data_a(f_data[0]), .data_b(f_data[1]),
    .rdy_a (m_rdy[0]),  .rdy_b (m_rdy[1]),
    .ack_a (m_ack[0]),  .ack_b (m_ack[1]),
    .det_a (m_det[0]),  .det_b (m_det[1]),
    .data_o_i(out_data[0]), .data_o_ii(out_data[1]),
    .rdy_o_i (out_rdy[0]),  .rdy_o_ii (out_rdy[1]),
    .ack_o_i (out_ack[0]),  .ack_o_ii (out_ack[1])
  );

endmodule
