// router_network: an N x N packet routing network built from 2x2 routers,
// log2(N) columns of N/2 routers each, N a power of two (N = 4 by default, the
// four-router example network).
//
// The network is defined recursively: a first column of N/2 routers feeds two
// N/2 x N/2 networks, upper output (I) of router j to input j of the upper
// half, lower output (II) to input j of the lower half. Unrolled, column s
// splits the ports into blocks of M = N >> s; router j of block b takes block
// inputs 2j and 2j+1 and drives block outputs j (I) and M/2 + j (II).
// Each column therefore settles one bit of the output port number, most
// significant first. A router always steers on data bit 0, so the data lines
// are rearranged around the routers of column s: bit 0 and bit LOG2N-1-s are
// swapped on the way in and swapped back on the way out. A packet whose first
// byte holds the destination port number in its low LOG2N bits reaches that
// output port, with its data unchanged.
//
// The recursive construction, the N/2 * log2 N router count and the need to
// rearrange the data lines per column are the document's; the particular
// rearrangement (a swap with bit 0) and the port numbering are this design's.
module router_network
  import router_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  rbyte_t [N-1:0] in_data,
  input  logic   [N-1:0] in_rdy,
  output logic   [N-1:0] in_ack,
  output rbyte_t [N-1:0] out_data,
  output logic   [N-1:0] out_rdy,
  input  logic   [N-1:0] out_ack
);

  localparam int unsigned LOG2N = $clog2(N);

  if (N < 2 || (1 << LOG2N) != N || LOG2N > DATA_W) begin : g_bad_n
    $error("router_network: N must be a power of two from 2 to 2**DATA_W");
  end

  // Swap data bit 0 with data bit k (its own inverse).
  function automatic rbyte_t swap_bit(rbyte_t x, logic [$clog2(DATA_W)-1:0] k);
    rbyte_t y;
    y           = x;
    y.data[0]   = x.data[k];
    y.data[k]   = x.data[0];
    return y;
  endfunction

  // Links between columns: column s reads stage s and drives stage s + 1.
  rbyte_t [LOG2N:0][N-1:0] st_data;
  logic   [LOG2N:0][N-1:0] st_rdy;
  logic   [LOG2N:0][N-1:0] st_ack;

  assign st_data[0]   = in_data;
  assign st_rdy[0]    = in_rdy;
  assign in_ack       = st_ack[0];
  assign out_data     = st_data[LOG2N];
  assign out_rdy      = st_rdy[LOG2N];
  assign st_ack[LOG2N] = out_ack;

  for (genvar s = 0; s < LOG2N; s++) begin : g_col
    localparam int unsigned M = N >> s;        // block size in this column
    localparam int unsigned K = LOG2N - 1 - s; // data bit steered on
    localparam logic [$clog2(DATA_W)-1:0] KB = K[$clog2(DATA_W)-1:0];
    for (genvar r = 0; r < N / 2; r++) begin : g_row
      localparam int unsigned B  = r / (M / 2);
      localparam int unsigned J  = r % (M / 2);
      localparam int unsigned I0 = B * M + 2 * J;
      localparam int unsigned I1 = I0 + 1;
      localparam int unsigned O0 = B * M + J;
      localparam int unsigned O1 = B * M + M / 2 + J;

      rbyte_t [1:0] r_in_data, r_out_data;
      logic   [1:0] r_in_ack, r_out_rdy;

      assign r_in_data[0] = swap_bit(st_data[s][I0], KB);
      assign r_in_data[1] = swap_bit(st_data[s][I1], KB);
      assign st_ack[s][I0] = r_in_ack[0];
      assign st_ack[s][I1] = r_in_ack[1];
      assign st_data[s+1][O0] = swap_bit(r_out_data[0], KB);
      assign st_data[s+1][O1] = swap_bit(r_out_data[1], KB);
      assign st_rdy[s+1][O0]  = r_out_rdy[0];
      assign st_rdy[s+1][O1]  = r_out_rdy[1];

      router #(.DEPTH(DEPTH)) u_router (
        .clk, .rst_n,
        .in_data (r_in_data),
        .in_rdy  ({st_rdy[s][I1], st_rdy[s][I0]}),
        .in_ack  (r_in_ack),
        .out_data(r_out_data),
        .out_rdy (r_out_rdy),
        .out_ack ({st_ack[s+1][O1], st_ack[s+1][O0]})
      );
    end
  end

endmodule
