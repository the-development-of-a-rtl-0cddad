// arbiter_analog: behavioural model (not synthesizable) of the original
// asynchronous two-way arbiter, built from a cross-coupled pair of gates (the
// front end) and a two-transistor comparator that withholds both grants while
// the front end is metastable. It is not used inside the clocked router, where
// router_arbiter takes its place; it is there to study the mutual-exclusion
// element itself, e.g. with the two-delay metastability experiment.
//
// Interface: two active-low requests (normally high) and two active-high
// grants, as after the Schmitt-trigger buffers of the original. Grant k rises
// only while request k is low, at most one grant is high at any time, and a
// grant is held until its request returns high.
//
// How it is modelled: the state is the real-valued difference d = v1 - v2 of
// the two front-end gate output voltages (volts).
//   - only request 1 low: d moves linearly towards +V_SWING, taking T_GATE_PS
//     for the full swing (only request 2 low: towards -V_SWING);
//   - no request: d returns linearly to 0;
//   - both requests low: the pair regenerates, dd/dt = d / TAU, plus a small
//     random noise term, clipped at the rails. The imbalance the first request
//     built up before the second arrived decides the winner; two requests that
//     arrive close together leave d near 0, and the time to resolve grows like
//     TAU * ln(V_TH / |d0|) without bound. A side that has already won stays
//     won, since regeneration only pushes d further out.
// The comparator asserts grant 1 once d > V_TH and grant 2 once d < -V_TH; a
// grant falls again once |d| drops below V_TH - V_HYST (the Schmitt buffer).
// So neither grant changes while the front end is metastable.
// The threshold V_TH = 1.2 V is the document's figure (1.9 V with the
// optional emitter diodes). The swing, gate delay, regeneration time
// constant, noise and step are this model's own assumptions. The model steps
// every STEP_PS while d is moving and sleeps until a request changes once d
// has settled. Like the rest of the design it declares no time unit: times
// are meant as ps, verilator's default unit; under another unit every time
// scales alike and the behaviour is the same.
module arbiter_analog #(
  parameter real V_TH       = 1.2,     // comparator differential, volts
  parameter real V_HYST     = 0.2,     // Schmitt-buffer hysteresis, volts
  parameter real V_SWING    = 3.0,     // settled |v1 - v2|, volts
  parameter real T_GATE_PS  = 10000.0, // full swing of one gate, ps
  parameter real TAU_PS     = 4000.0,  // regeneration time constant, ps
  parameter real NOISE_V    = 0.0005,  // peak noise added per step, volts
  parameter int  STEP_PS    = 50
) (
  input  logic req1_n,   // request 1, active low
  input  logic req2_n,   // request 2, active low
  output logic grant1,   // grant 1, active high
  output logic grant2    // grant 2, active high
);

  localparam real SLEW = V_SWING * real'(STEP_PS) / T_GATE_PS;  // volts per step, lone request

  real  d;               // v1 - v2, volts; a real starts at 0.0
  real  noise;
  bit   settled;

  always begin
    // comparator and Schmitt buffers
    if (d > V_TH)                 grant1 = 1'b1;
    else if (d < V_TH - V_HYST)   grant1 = 1'b0;
    if (d < -V_TH)                grant2 = 1'b1;
    else if (d > V_HYST - V_TH)   grant2 = 1'b0;
    settled = (!req1_n && req2_n && d >= V_SWING) ||
              (req1_n && !req2_n && d <= -V_SWING) ||
              (req1_n && req2_n && d == 0.0) ||
              (!req1_n && !req2_n && (d >= V_SWING || d <= -V_SWING));
    if (settled) @(req1_n or req2_n);
    else begin
      #(STEP_PS);
      if (!req1_n && !req2_n) begin
        noise = NOISE_V * (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
        d = d + d * real'(STEP_PS) / TAU_PS + noise;
      end else if (!req1_n) d = d + SLEW;
      else if (!req2_n)     d = d - SLEW;
      else if (d > SLEW)    d = d - SLEW;
      else if (d < -SLEW)   d = d + SLEW;
      else                  d = 0.0;
      if (d > V_SWING)  d = V_SWING;
      if (d < -V_SWING) d = -V_SWING;
    end
  end

endmodule
