// router_pkg: types and constants shared by the 2x2 self-timed router blocks.
//
// A link between two modules carries one byte at a time under the four-phase
// "reset signalling" handshake: the sender presents data and raises ready, the
// receiver raises acknowledge once it has taken the byte, the sender drops
// ready, and the receiver drops acknowledge when it can take another byte.
// Each byte carries an extra "last" bit that is one only on the final byte of
// a packet. The 8-bit data width and the 16-word buffer depth are the
// document's; the Master state encoding (Y1 Y2 Y3) is the state assignment of
// its state table. Everything here is shared by the RTL and the testbenches.
package router_pkg;

  localparam int unsigned DATA_W     = 8;   // data lines per link
  localparam int unsigned FIFO_DEPTH = 16;  // words per input buffer

  // One transferred word: the last-byte flag above the data byte.
  typedef struct packed {
    logic              last;
    logic [DATA_W-1:0] data;
  } rbyte_t;


  // Master module states, encoded as {Y1, Y2, Y3}.
  //   Y1    = in the middle of a packet (not yet on its last byte)
  //   Y2 Y3 = 10 output I, 01 output II, 00 none chosen, 11 error
  typedef enum logic [2:0] {
    ST_I  = 3'b000,  // idle, waiting for a packet and a free link
    ST_BP = 3'b001,  // B': last byte, routed to output II
    ST_E  = 3'b011,  // error state reached from G, no request
    ST_AP = 3'b010,  // A': last byte, routed to output I
    ST_F  = 3'b100,  // first byte seen, direction not yet chosen
    ST_B  = 3'b101,  // packet routed to output II
    ST_G  = 3'b111,  // error state (both direction bits set), no request
    ST_A  = 3'b110   // packet routed to output I
  } master_state_t;

endpackage
