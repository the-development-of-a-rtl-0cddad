// router_top: the complete design. It holds, side by side:
//  * the N x N routing network (router_network, N = 4 by default: four 2x2
//    routers in two columns), with its N input and N output links as ports;
//  * the bench test module for one 2x2 router: an input section for each of
//    the two router inputs and an output section for each of the two router
//    outputs (tester_input_section / tester_output_section), with their
//    buttons, switches, link signals and LEDs as ports. To test a router, its
//    link ports are wired to the test module's link ports outside this top;
//  * a behavioural model of the original asynchronous arbiter
//    (arbiter_analog, not synthesizable), with its active-low requests and
//    its grants as ports, for experiments on the mutual-exclusion element.
//    The routers use the clocked router_arbiter instead.
// Everything runs on one clock and one active-low asynchronous reset.
module router_top
  import router_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic           clk,
  input  logic           rst_n,
  // routing network links
  input  rbyte_t [N-1:0] net_in_data,
  input  logic   [N-1:0] net_in_rdy,
  output logic   [N-1:0] net_in_ack,
  output rbyte_t [N-1:0] net_out_data,
  output logic   [N-1:0] net_out_rdy,
  input  logic   [N-1:0] net_out_ack,
  // test module, input sections (one per router input)
  input  logic   [1:0]   ti_btn_no_n,
  input  logic   [1:0]   ti_btn_nc_n,
  input  logic   [1:0]   ti_d_sw,
  input  logic   [1:0]   ti_l_sw,
  input  logic   [1:0][DATA_W-1:1] ti_data_sw,
  input  logic   [1:0]   ti_ack,
  output logic   [1:0]   ti_rdy,
  output rbyte_t [1:0]   ti_data,
  output logic   [1:0]   ti_ack_led,
  output logic   [1:0]   ti_pulse,
  // test module, output sections (one per router output)
  input  logic   [1:0]   to_btn_no_n,
  input  logic   [1:0]   to_btn_nc_n,
  input  logic   [1:0]   to_rdy,
  input  rbyte_t [1:0]   to_data,
  output logic   [1:0]   to_ack,
  output logic   [1:0]   to_rdy_led,
  output rbyte_t [1:0]   to_data_led,
  output logic   [1:0]   to_pulse,
  // behavioural model of the asynchronous arbiter
  input  logic   [1:0]   arb_req_n,
  output logic   [1:0]   arb_grant
);

  router_network #(.N(N), .DEPTH(DEPTH)) u_net (
    .clk, .rst_n,
    .in_data (net_in_data),  .in_rdy (net_in_rdy),  .in_ack (net_in_ack),
    .out_data(net_out_data), .out_rdy(net_out_rdy), .out_ack(net_out_ack)
  );

  for (genvar p = 0; p < 2; p++) begin : g_tester
    tester_input_section u_in (
      .clk, .rst_n,
      .btn_no_n(ti_btn_no_n[p]), .btn_nc_n(ti_btn_nc_n[p]),
      .d_sw(ti_d_sw[p]), .l_sw(ti_l_sw[p]), .data_sw(ti_data_sw[p]),
      .ack(ti_ack[p]), .rdy(ti_rdy[p]), .data(ti_data[p]),
      .ack_led(ti_ack_led[p]), .pulse(ti_pulse[p])
    );
    tester_output_section u_out (
      .clk, .rst_n,
      .btn_no_n(to_btn_no_n[p]), .btn_nc_n(to_btn_nc_n[p]),
      .rdy(to_rdy[p]), .data(to_data[p]), .ack(to_ack[p]),
      .rdy_led(to_rdy_led[p]), .data_led(to_data_led[p]), .pulse(to_pulse[p])
    );
  end

  arbiter_analog u_arb_model (
    .req1_n(arb_req_n[0]), .req2_n(arb_req_n[1]), .grant1(arb_grant[0]), .grant2(arb_grant[1])
  );

endmodule
