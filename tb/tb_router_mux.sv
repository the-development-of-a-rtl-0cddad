// tb_router_mux: exhaustive self-checking test of the combinational
// Multiplexor. Every legal grant pattern (each arbiter grants at most one
// input) is combined with every value of the four control inputs, and with
// random data bytes; the outputs are compared with the truth table of the
// crossbar written out independently below.
module tb_router_mux;
  import router_pkg::*;
  logic [1:0] gnt_i, gnt_ii;
  rbyte_t data_a, data_b, data_o_i, data_o_ii;
  logic rdy_a, rdy_b, ack_a, ack_b, det_a, det_b, rdy_o_i, rdy_o_ii, ack_o_i, ack_o_ii;
  int checks = 0, failures = 0;

  router_mux dut (.*);

  // reference: which input drives each output, 0 = none, 1 = A, 2 = B
  int src_i, src_ii;
  bit e_rdy_i, e_rdy_ii, e_ack_a, e_ack_b, e_det_a, e_det_b;
  rbyte_t e_d_i, e_d_ii;

  initial begin
    for (int gi = 0; gi < 3; gi++)
      for (int gii = 0; gii < 3; gii++)
        for (int c = 0; c < 16; c++) begin
          gnt_i  = (gi == 0) ? 2'b00 : (gi == 1) ? 2'b01 : 2'b10;
          gnt_ii = (gii == 0) ? 2'b00 : (gii == 1) ? 2'b01 : 2'b10;
          {rdy_a, rdy_b, ack_o_i, ack_o_ii} = 4'(c);
          data_a = rbyte_t'($urandom);
          data_b = rbyte_t'($urandom);
          #1;
          src_i = gi; src_ii = gii;
          e_rdy_i  = (src_i == 1)  ? rdy_a : (src_i == 2)  ? rdy_b : 1'b0;
          e_rdy_ii = (src_ii == 1) ? rdy_a : (src_ii == 2) ? rdy_b : 1'b0;
          e_ack_a  = (src_i == 1 && ack_o_i) || (src_ii == 1 && ack_o_ii);
          e_ack_b  = (src_i == 2 && ack_o_i) || (src_ii == 2 && ack_o_ii);
          e_det_a  = !(src_i == 1 || src_ii == 1);
          e_det_b  = !(src_i == 2 || src_ii == 2);
          // unused outputs default to the other input: I from B, II from A
          e_d_i    = (src_i == 1)  ? data_a : data_b;
          e_d_ii   = (src_ii == 2) ? data_b : data_a;
          checks++;
          if ({rdy_o_i, rdy_o_ii, ack_a, ack_b, det_a, det_b} !==
              {e_rdy_i, e_rdy_ii, e_ack_a, e_ack_b, e_det_a, e_det_b} ||
              data_o_i !== e_d_i || data_o_ii !== e_d_ii) begin
            failures++;
            $display("FAIL gnt_i=%b gnt_ii=%b ctl=%b: got %b want %b", gnt_i, gnt_ii, 4'(c),
              {rdy_o_i, rdy_o_ii, ack_a, ack_b, det_a, det_b},
              {e_rdy_i, e_rdy_ii, e_ack_a, e_ack_b, e_det_a, e_det_b});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
