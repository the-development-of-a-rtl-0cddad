// tb_router_master: self-checking test of the input-port controller.
// Walks the controller through the situations of the document's module test
// charts: idle with and without a free link, first / middle / last byte of a
// multi-byte packet to output I, a single-byte packet to output II, and a
// multi-byte packet to output II. After every input change it compares the
// state and the four outputs with values worked out by hand from the state
// diagram and the output equations.
module tb_router_master;
  import router_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rin = 0, l = 0, d = 0, det = 1, ack = 0;
  logic ackin, rdy, req_i, req_ii;
  master_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  router_master dut (.*);

  // expect {state, ackin, rdy, req_i, req_ii} after the next clock edge
  task automatic step_expect(master_state_t s, bit e_ackin, bit e_rdy, bit e_ri, bit e_rii,
                             string what);
    @(posedge clk); #1;
    checks++;
    if (state !== s || ackin !== e_ackin || rdy !== e_rdy || req_i !== e_ri || req_ii !== e_rii) begin
      failures++;
      $display("FAIL %s: state=%s ackin=%b rdy=%b req_i=%b req_ii=%b (want %s %b %b %b %b)",
               what, state.name(), ackin, rdy, req_i, req_ii, s.name(), e_ackin, e_rdy, e_ri, e_rii);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    step_expect(ST_I, 0, 0, 0, 0, "idle after reset");
    // Ready with the link still attached elsewhere: no change
    det = 0; rin = 1; l = 0; d = 0;
    step_expect(ST_I, 0, 0, 0, 0, "ready but det low");
    step_expect(ST_I, 0, 0, 0, 0, "ready but det low, held");
    // Det 0 -> 1: I -> F -> A
    det = 1;
    step_expect(ST_F, 0, 0, 0, 0, "I -> F");
    step_expect(ST_A, 0, 1, 1, 0, "F -> A, request I, ready relayed");
    det = 0;  // link made
    step_expect(ST_A, 0, 1, 1, 0, "A holds");
    ack = 1;   #1 checks++; if (!ackin) begin failures++; $display("FAIL ack relayed"); end
    step_expect(ST_A, 1, 1, 1, 0, "ack relayed in A");
    rin = 0;   step_expect(ST_A, 1, 0, 1, 0, "ready dropped in A");
    ack = 0;   step_expect(ST_A, 0, 0, 1, 0, "ack dropped in A");
    // middle byte
    rin = 1;   step_expect(ST_A, 0, 1, 1, 0, "middle byte ready");
    ack = 1;   step_expect(ST_A, 1, 1, 1, 0, "middle byte ack");
    rin = 0;   step_expect(ST_A, 1, 0, 1, 0, "middle byte ready low");
    ack = 0;   step_expect(ST_A, 0, 0, 1, 0, "middle byte ack low");
    // last byte: ready withheld until A'
    rin = 1; l = 1;
    #1 checks++; if (rdy) begin failures++; $display("FAIL last byte ready relayed in A"); end
    step_expect(ST_AP, 0, 1, 1, 0, "A -> A' then ready relayed");
    ack = 1;   step_expect(ST_AP, 1, 1, 1, 0, "last byte ack");
    rin = 0;   step_expect(ST_AP, 1, 0, 1, 0, "last byte ready low, ackin held");
    ack = 0;
    #1 checks++; if (!ackin) begin failures++; $display("FAIL ackin must stay high until reset"); end
    step_expect(ST_I, 0, 0, 0, 0, "A' -> I, request dropped");
    det = 1;
    step_expect(ST_I, 0, 0, 0, 0, "idle");
    // single-byte packet to output II
    rin = 1; l = 1; d = 1;
    step_expect(ST_BP, 0, 1, 0, 1, "I -> B' directly");
    det = 0;
    ack = 1;   step_expect(ST_BP, 1, 1, 0, 1, "B' ack");
    rin = 0;   step_expect(ST_BP, 1, 0, 0, 1, "B' ready low");
    ack = 0;   step_expect(ST_I, 0, 0, 0, 0, "B' -> I");
    // multi-byte packet to output II, D may change after the first byte
    det = 1; rin = 1; l = 0; d = 1;
    step_expect(ST_F, 0, 0, 0, 0, "I -> F (II)");
    step_expect(ST_B, 0, 1, 0, 1, "F -> B");
    d = 0;  // data bit 0 of later bytes is payload
    det = 0;
    ack = 1;   step_expect(ST_B, 1, 1, 0, 1, "B ack");
    rin = 0;   step_expect(ST_B, 1, 0, 0, 1, "B ready low");
    ack = 0;   step_expect(ST_B, 0, 0, 0, 1, "B ack low");
    rin = 1; l = 1;
    step_expect(ST_BP, 0, 1, 0, 1, "B -> B'");
    ack = 1;   step_expect(ST_BP, 1, 1, 0, 1, "B' ack");
    rin = 0;   step_expect(ST_BP, 1, 0, 0, 1, "B' ready low");
    ack = 0;   step_expect(ST_I, 0, 0, 0, 0, "B' -> I");
    // error state G makes no request and moves to E on a last byte
    force dut.state = ST_G;
    @(posedge clk); #1 release dut.state;
    checks++; if (req_i || req_ii) begin failures++; $display("FAIL request in G"); end
    rin = 1; l = 1; step_expect(ST_E, 0, 1, 0, 0, "G -> E");
    rin = 0; ack = 0; step_expect(ST_I, 0, 0, 0, 0, "E -> I");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
