// router_arbiter: grants one output port to at most one of the two input
// ports (A and B) that request it.
//
// A request is granted if the other grant is not held; the grant is held for
// as long as its request stays high and is withdrawn on the clock after the
// request falls (the other requester, if waiting, is granted on that same
// clock). When both requests are pending and the port is free, the tie is
// broken by a priority bit that alternates after every tie, so neither input
// is favoured. The two grants are never high together.
//
// Interface: req[0] from input A, req[1] from input B; gnt[0] / gnt[1] the
// matching grants. Timing: grant one clock after the request; registered.
//
// The document's arbiter is a cross-coupled gate latch followed by a transistor
// comparator that holds back both grants while the latch is metastable. Here
// the requests are synchronous to the clock, so there is no metastability to
// filter and the registered grant stands in for the comparator. The
// alternating tie-break is this design's choice for the document's rule that
// the arbiter must not favour one request over the other.
module router_arbiter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] req,
  output logic [1:0] gnt
);

  logic       prio;      // which requester wins the next tie (0: A, 1: B)
  logic [1:0] gnt_nxt;
  logic       tie;

  always_comb begin
    tie = 1'b0;
    if (gnt[0] && req[0])      gnt_nxt = 2'b01;
    else if (gnt[1] && req[1]) gnt_nxt = 2'b10;
    else if (req == 2'b11) begin
      tie     = 1'b1;
      gnt_nxt = prio ? 2'b10 : 2'b01;
    end
    else                       gnt_nxt = req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt  <= 2'b00;
      prio <= 1'b0;
    end else begin
      gnt <= gnt_nxt;
      if (tie) prio <= ~prio;
    end
  end

  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) !(gnt[0] && gnt[1]));
  a_hold:  assert property (@(posedge clk) disable iff (!rst_n)
    gnt[0] && req[0] |=> gnt[0]);

endmodule
