// tb_arbiter_analog: self-checking test of the behavioural model of the
// asynchronous arbiter, along the lines of the two-delay experiment: one
// generator pulse reaches request 1 and request 2 with a skew that is swept
// through zero, in steps down to 1 ps, and the grants are watched the whole
// time. Checked throughout: never two grants, a grant only while its request
// is low, at most one rising edge per grant per pulse (no runt pulses while
// the front end is metastable). Checked per pulse: exactly one grant is
// issued, the earlier request wins when the skew is large, and the time from
// the second request to the grant grows as the skew shrinks (metastable
// pulses must occur). At zero skew the noise decides, and both sides must win
// some pulses. Directed steps check a lone request, holding, hand-over when
// the holder withdraws, and a loser's request that comes and goes.
module tb_arbiter_analog;

  logic req1_n = 1'b1, req2_n = 1'b1;
  logic grant1, grant2;
  int   checks = 0, failures = 0;
  int   rises1 = 0, rises2 = 0;
  int   n_meta = 0, n_win1_tie = 0, n_win2_tie = 0;

  arbiter_analog dut (.*);

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // watchers
  always @(grant1 or grant2) begin
    check(!(grant1 && grant2), "never two grants at once");
    if (grant1) check(!req1_n, "grant 1 only while request 1 is low");
    if (grant2) check(!req2_n, "grant 2 only while request 2 is low");
  end
  always @(posedge grant1) rises1++;
  always @(posedge grant2) rises2++;

  // one generator pulse; skew > 0 means request 2 comes later.
  // Returns the winner (1 or 2, 0 if none) and the time from the later request
  // to the grant.
  task automatic pulse(int skew, output int winner, output longint t_res);
    longint t_last;
    int r1, r2;
    r1 = rises1; r2 = rises2;
    if (skew >= 0) begin
      req1_n = 1'b0; #(skew) req2_n = 1'b0;
    end else begin
      req2_n = 1'b0; #(-skew) req1_n = 1'b0;
    end
    t_last = $time;
    fork
      wait (grant1 || grant2);
      #1000000;
    join_any
    disable fork;
    t_res  = $time - t_last;
    winner = grant1 ? 1 : grant2 ? 2 : 0;
    #20000;  // hold the grant a while
    check(winner != 0, $sformatf("skew %0d ps: a grant is issued", skew));
    check(rises1 - r1 + rises2 - r2 == 1, $sformatf("skew %0d ps: exactly one grant edge", skew));
    check((winner == 1 && grant1) || (winner == 2 && grant2), "grant held while requested");
    req1_n = 1'b1; req2_n = 1'b1;
    #30000;
    check(!grant1 && !grant2, "grants gone once both requests withdrawn");
  endtask

  int     w;
  longint t, t_far, t_near_max;
  initial begin
    #1000;
    // lone request: granted after part of a gate swing, held, released
    req1_n = 1'b0;
    #20000 check(grant1 && !grant2, "lone request 1 granted");
    req2_n = 1'b0;
    #20000 check(grant1 && !grant2, "request 2 waits while 1 holds");
    req2_n = 1'b1;
    #20000 check(grant1 && !grant2, "loser's request came and went: no change");
    req2_n = 1'b0;
    #5000;
    req1_n = 1'b1;                      // holder withdraws, 2 is waiting
    #30000 check(!grant1 && grant2, "hand-over to the waiting request");
    req2_n = 1'b1;
    #30000 check(!grant1 && !grant2, "idle again");
    // skew sweep: large skews, the earlier request wins quickly
    pulse(3000, w, t_far);
    check(w == 1, "request 1 earlier by 3 ns wins");
    pulse(-3000, w, t);
    check(w == 2, "request 2 earlier by 3 ns wins");
    // skews approaching zero: resolution takes longer
    t_near_max = 0;
    for (int s = 200; s >= 1; s = s / 2) begin
      pulse(s, w, t);
      if (t > t_near_max) t_near_max = t;
      if (t > 10000) n_meta++;
      pulse(-s, w, t);
      if (t > t_near_max) t_near_max = t;
      if (t > 10000) n_meta++;
    end
    check(t_near_max > t_far, $sformatf("near-simultaneous requests resolve slower (%0d vs %0d ps)",
                                        t_near_max, t_far));
    // zero skew: the noise decides
    for (int k = 0; k < 40; k++) begin
      pulse(0, w, t);
      if (t > 10000) n_meta++;
      if (w == 1) n_win1_tie++;
      if (w == 2) n_win2_tie++;
    end
    check(n_meta > 0, "metastable pulses seen (grant withheld over 10 ns)");
    check(n_win1_tie > 0 && n_win2_tie > 0, "both sides win some simultaneous requests");
    $display("metastable %0d, ties won 1:%0d 2:%0d, slowest resolution %0d ps, far skew %0d ps",
             n_meta, n_win1_tie, n_win2_tie, t_near_max, t_far);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
