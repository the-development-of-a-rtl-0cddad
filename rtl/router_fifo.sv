// router_fifo: the input buffer of one router port, DEPTH words of one byte
// plus its last-byte flag, with a reset-signalling (four-phase) interface on
// both the write side and the read side.
//
// Write side: while in_ack is low, a high in_rdy stores in_data and raises
// in_ack on the next clock. in_ack falls after in_rdy has fallen, but not while
// the buffer is full: after the word that fills the buffer, in_ack stays high
// until a word has been read out, so the sender cannot offer another byte.
// Read side: whenever the buffer holds a word and no transfer is in progress,
// out_rdy rises with the oldest word on out_data. out_rdy falls on the clock
// after out_ack rises; the word is removed on the clock after out_ack falls,
// after which out_rdy rises again if a word is left. Writes and reads may
// proceed at the same time.
//
// Timing: in_rdy -> in_ack one clock; word written -> out_rdy one clock later
// (two clocks from in_rdy into an empty buffer); all outputs are registered.
//
// The depth, the word width, the acknowledge held high while full and the
// removal on the falling acknowledge follow the document's buffer built around
// a 16x5 asynchronous FIFO chip pair. The clocked implementation (a register
// array with pointers) replaces that self-timed chip and is this design's
// choice.
module router_fifo
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  // write side (from the sender)
  input  rbyte_t in_data,
  input  logic   in_rdy,
  output logic   in_ack,
  // read side (to the Master module)
  output rbyte_t out_data,
  output logic   out_rdy,
  input  logic   out_ack
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  rbyte_t          mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [CW-1:0]   count;
  logic            out_pend;   // out_ack seen high, waiting for it to fall
  logic            full;
  logic            do_write, do_pop;

  assign full     = (count == CW'(DEPTH));
  assign do_write = in_rdy && !in_ack && !full;
  assign do_pop   = out_pend && !out_ack;
  assign out_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      in_ack   <= 1'b0;
      out_rdy  <= 1'b0;
      out_pend <= 1'b0;
    end else begin
      // write side
      if (do_write) begin
        wr_ptr <= next_ptr(wr_ptr);
        in_ack <= 1'b1;
      end else if (in_ack && !in_rdy && !full) begin
        in_ack <= 1'b0;
      end
      // read side
      if (out_rdy && out_ack) begin
        out_rdy  <= 1'b0;
        out_pend <= 1'b1;
      end else if (do_pop) begin
        out_pend <= 1'b0;
        rd_ptr   <= next_ptr(rd_ptr);
      end else if (!out_rdy && !out_pend && count != '0) begin
        out_rdy <= 1'b1;
      end
      // occupancy
      case ({do_write, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Handshake rules seen from this buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CW'(DEPTH));
  a_out_ack_only_after_rdy: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(out_ack) |-> $past(out_rdy));

endmodule
