// router_master: the input-port controller of the router, one per input.
//
// It watches the word its input buffer presents. On the first byte of a
// packet it waits until the port is detached from both outputs (det high),
// then takes bit 0 of the data (D) as the direction: D = 0 requests output I,
// D = 1 requests output II. The request is held for the whole packet while the
// ready and acknowledge of every byte are relayed between the buffer and the
// Multiplexor. When the last-byte flag (L) is seen the machine moves to the
// last-byte state; once that byte's handshake has finished (rin and ack both
// low) it returns to idle and drops its request.
//
// States follow the document's state diagram and state assignment {Y1,Y2,Y3}:
//   I -> F        rin & det & !L      F -> A / B        by D
//   I -> A' / B'  rin & det & L       F -> A' / B'      rin & L (by D)
//   A -> A'       rin & L             B -> B'           rin & L
//   A', B' -> I   !rin & !ack
// plus the two error states G and E (Y2 = Y3 = 1) that make no request;
// G -> E on rin & L and E -> I on !rin & !ack as in the state table.
// The outputs are the document's gate equations:
//   rdy    = rin & (Y2 | Y3) & !(Y1 & L)   (a last byte waits for A'/B')
//   ackin  = ack | (!Y1 & (Y2 | Y3) & !rin) (held high in A'/B' until reset)
//   req_i  = Y2 & !Y3,   req_ii = !Y2 & Y3
// The document builds this as an asynchronous circuit of SR latches with
// delay lines in the feedback paths; here the state is a clocked register, so
// each state change takes one clock and the intermediate state F lasts exactly
// one clock. Requests are active high here (active low in the document).
module router_master
  import router_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // from the input buffer
  input  logic          rin,     // ready from the buffer
  input  logic          l,       // last-byte flag of the presented word
  input  logic          d,       // direction: bit 0 of the presented data
  output logic          ackin,   // acknowledge to the buffer
  // to / from the Multiplexor and Arbiters
  output logic          rdy,     // ready towards the output port
  input  logic          ack,     // acknowledge relayed from the output port
  input  logic          det,     // high when linked to neither output
  output logic          req_i,   // request for output I
  output logic          req_ii,  // request for output II
  output master_state_t state
);

  master_state_t nxt;
  logic y1, y2, y3;

  assign {y1, y2, y3} = state;

  always_comb begin
    nxt = state;
    unique case (state)
      ST_I:  if (rin && det) nxt = l ? (d ? ST_BP : ST_AP) : ST_F;
      ST_F:  if (rin && l)   nxt = d ? ST_BP : ST_AP;
             else            nxt = d ? ST_B  : ST_A;
      ST_A:  if (rin && l)   nxt = ST_AP;
      ST_B:  if (rin && l)   nxt = ST_BP;
      ST_G:  if (rin && l)   nxt = ST_E;
      ST_AP, ST_BP, ST_E:
             if (!rin && !ack) nxt = ST_I;
      default: nxt = ST_I;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_I;
    else        state <= nxt;
  end

  assign rdy    = rin && (y2 || y3) && !(y1 && l);
  assign ackin  = ack || (!y1 && (y2 || y3) && !rin);
  assign req_i  = y2 && !y3;
  assign req_ii = !y2 && y3;

  // A request is never made for both outputs.
  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    !(req_i && req_ii));

endmodule
