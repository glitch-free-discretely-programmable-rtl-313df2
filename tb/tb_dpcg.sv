`timescale 1ps/1ps
// tb_dpcg: end-to-end test of the clock generator at its default delays.
//
// Drives the frequency and gating channels as four-phase handshakes and
// watches the output clock. Independent expectations: the ring period is
// 2 * (len * T_AND + T_FIX) for len = 7, 15, 30, and must be within 2 % of
// 491 / 317 / 194 MHz. Throughout the run every high and low pulse of the
// clock must last at least the shortest ring half period (no glitch), the
// two handshakes must never be acknowledged together, and at most one ring
// may oscillate outside a frequency change.
// Mechanisms counted (each must occur): frequency change, stretched low
// phase at a change, clock gating, simultaneous requests resolved by the
// arbiter, a frequency request held pending while a change is in progress,
// an unused code falling back to the slowest ring.
module tb_dpcg;
  import dpcg_pkg::*;

  localparam int unsigned T_AND = 68;
  localparam int unsigned T_FIX = 540;
  localparam longint MIN_PULSE = longint'(LEN_FAST * T_AND + T_FIX) - 20;
  localparam longint TIMEOUT   = 200_000;

  logic       rst_n, req_f, req_g, ack_f, ack_g, clock;
  freq_code_t data_f;

  dpcg dut (
    .rst_n(rst_n), .req_f(req_f), .ack_f(ack_f), .data_f(data_f),
    .req_g(req_g), .ack_g(ack_g), .clock(clock)
  );

  int checks = 0, failures = 0;
  int n_change = 0, n_stretch = 0, n_gate = 0, n_conflict = 0, n_pending = 0, n_unused = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic longint exp_period(input freq_code_t c);
    return 2 * longint'(ring_length(c) * T_AND + T_FIX);
  endfunction

  function automatic real paper_mhz(input freq_code_t c);
    case (c)
      CODE_FAST: return 491.0;
      CODE_MID:  return 317.0;
      default:   return 194.0;
    endcase
  endfunction

  // ---------------------------------------------------------------- monitors
  longint t_rise = 0, t_fall = 0;
  bit     mon_on = 0;
  int     n_glitch = 0;

  always @(posedge clock) begin
    if (mon_on && t_fall != 0 && $time - t_fall < MIN_PULSE) begin
      n_glitch++;
      $display("FAIL @%0t: low pulse of %0d ps", $time, $time - t_fall);
    end
    t_rise = $time;
  end

  always @(negedge clock) begin
    if (mon_on && t_rise != 0 && $time - t_rise < MIN_PULSE) begin
      n_glitch++;
      $display("FAIL @%0t: high pulse of %0d ps", $time, $time - t_rise);
    end
    t_fall = $time;
  end

  int n_both_ack = 0;
  always @(ack_f or ack_g) if (ack_f && ack_g) n_both_ack++;

  // Ring activity counters (edges on each ring's S node).
  int s0_edges = 0, s1_edges = 0;
  always @(dut.s0) s0_edges++;
  always @(dut.s1) s1_edges++;

  // ---------------------------------------------------------------- helpers
  task automatic wait_level(ref logic sig, input logic v, input string what);
    longint t0 = $time;
    while (sig !== v && $time - t0 < TIMEOUT) #10;
    check(sig === v, what);
  endtask

  // Average period over n rising edges.
  task automatic measure(input freq_code_t c, input string what);
    longint t0, p, e;
    real mhz;
    @(posedge clock);
    @(posedge clock);
    t0 = $time;
    repeat (8) @(posedge clock);
    p = ($time - t0) / 8;
    e = exp_period(c);
    mhz = 1.0e6 / real'(p);
    check(p >= e - 2 && p <= e + 2, $sformatf("%s: period %0d ps, expected %0d", what, p, e));
    check(mhz > 0.98 * paper_mhz(c) && mhz < 1.02 * paper_mhz(c),
          $sformatf("%s: %0.1f MHz, expected about %0.0f MHz", what, mhz, paper_mhz(c)));
  endtask

  // Only one ring may oscillate: the stopped one must show no S edges.
  task automatic check_one_ring(input string what);
    int a0, a1;
    a0 = s0_edges; a1 = s1_edges;
    #20000;
    check((s0_edges == a0) != (s1_edges == a1),
          $sformatf("%s: exactly one ring oscillates (%0d / %0d edges)", what,
                    s0_edges - a0, s1_edges - a1));
  endtask

  // One frequency handshake; checks the switch latency.
  task automatic change_freq(input freq_code_t c, input freq_code_t old_c);
    longint t_ack, t_new, low;
    logic   mux_before;
    mux_before = dut.f_mux;
    data_f = c;
    #100;
    req_f = 1'b1;
    wait_level(ack_f, 1'b1, "ack_f rises");
    #50;
    req_f = 1'b0;
    wait_level(ack_f, 1'b0, "ack_f falls");
    t_ack = $time;
    @(posedge clock);
    t_new = $time;
    // The old ring stops at its next falling edge, the new one rises half a
    // new period after that: within one old half period plus one new one.
    check(t_new - t_ack <= exp_period(old_c) / 2 + exp_period(c) / 2 + 20,
          $sformatf("first new edge %0d ps after ack_f-", t_new - t_ack));
    // The new ring is released after ack_f- and needs a full half period of
    // its own before its first rising edge, so the low phase that spans the
    // change is the old ring's low time so far plus one new half period.
    low = t_new - t_fall;
    check(t_new - t_ack >= exp_period(c) / 2 - 12 && low >= exp_period(c) / 2 - 2,  // ack_f- seen up to 10 ps late
          $sformatf("low phase at the change %0d ps (%0d after ack_f-), new half period %0d ps", low, t_new - t_ack, exp_period(c) / 2));
    if (low > exp_period(old_c) / 2 + 2) n_stretch++;
    check(dut.f_mux != mux_before, "f_mux alternates between the rings");
    n_change++;
  endtask

  task automatic gate_clock();
    int e;
    req_g = 1'b1;
    wait_level(ack_g, 1'b1, "ack_g rises");
    check(clock == 1'b0, "clock is low while gated");
    e = s0_edges + s1_edges;
    #15000;
    check(clock == 1'b0 && s0_edges + s1_edges == e, "clock and both rings stopped while gated");
    req_g = 1'b0;
    wait_level(ack_g, 1'b0, "ack_g falls");
    // The clock resumes only after the acknowledge has been released.
    check(clock == 1'b0, "clock still low when ack_g falls");
    n_gate++;
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    #(5_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  freq_code_t cur;
  freq_code_t seq [7] = '{CODE_FAST, CODE_MID, CODE_SLOW, CODE_MID, CODE_FAST, CODE_SLOW, CODE_FAST};
  initial begin
    rst_n = 1'b1; req_f = 1'b0; req_g = 1'b0; data_f = CODE_FAST;
    #1 rst_n = 1'b0;
    #20000;
    rst_n = 1'b1;
    mon_on = 1'b1;
    cur = CODE_RESET;
    measure(cur, "after reset");
    check_one_ring("after reset");

    // Each legal code, from every other one.
    for (int i = 0; i < 7; i++) begin
      change_freq(seq[i], cur);
      cur = seq[i];
      measure(cur, $sformatf("code %0d", cur));
      check_one_ring($sformatf("code %0d", cur));
    end

    // Unused code 3 gives the slowest ring.
    change_freq(2'd3, cur);
    cur = 2'd3;
    measure(cur, "unused code 3");
    n_unused++;
    change_freq(CODE_MID, cur);
    cur = CODE_MID;

    // Clock gating, then the same frequency again.
    gate_clock();
    measure(cur, "after gating");

    // Two requests in the same instant: the arbiter serialises them.
    data_f = CODE_FAST;
    #100;
    fork
      begin
        req_f = 1'b1;
        wait_level(ack_f, 1'b1, "conflict: ack_f rises");
        req_f = 1'b0;
        wait_level(ack_f, 1'b0, "conflict: ack_f falls");
      end
      begin
        req_g = 1'b1;
        wait_level(ack_g, 1'b1, "conflict: ack_g rises");
        #5000;
        req_g = 1'b0;
        wait_level(ack_g, 1'b0, "conflict: ack_g falls");
      end
    join
    n_conflict++;
    cur = CODE_FAST;
    measure(cur, "after conflict");

    // A new frequency request issued right after ack_f- is held until the
    // previous change has completed.
    data_f = CODE_SLOW;
    req_f = 1'b1;
    wait_level(ack_f, 1'b1, "back-to-back: first ack_f");
    req_f = 1'b0;
    wait_level(ack_f, 1'b0, "back-to-back: first ack_f falls");
    data_f = CODE_MID;
    req_f = 1'b1;
    #1;
    if (dut.busy_f) n_pending++;
    check(dut.busy_f == 1'b1, "second request arrives during the change");
    wait_level(ack_f, 1'b1, "back-to-back: second ack_f");
    check(dut.busy_f == 1'b1 && !(dut.gated0 && dut.gated1), "second ack_f after the first change ended");
    req_f = 1'b0;
    wait_level(ack_f, 1'b0, "back-to-back: second ack_f falls");
    cur = CODE_MID;
    measure(cur, "after back-to-back");

    // Random mix of changes and gating.
    repeat (12) begin
      freq_code_t c;
      c = freq_code_t'($urandom_range(0, 2));
      if ($urandom_range(0, 3) == 0) gate_clock();
      change_freq(c, cur);
      cur = c;
      measure(cur, $sformatf("random code %0d", cur));
    end

    check(n_glitch == 0, $sformatf("no glitch on clock (%0d seen)", n_glitch));
    check(n_both_ack == 0, "ack_f and ack_g never high together");
    check(n_change > 0,   "mechanism: frequency change");
    check(n_stretch > 0,  "mechanism: stretched low phase");
    check(n_gate > 0,     "mechanism: clock gating");
    check(n_conflict > 0, "mechanism: simultaneous requests");
    check(n_pending > 0,  "mechanism: request pending during a change");
    check(n_unused > 0,   "mechanism: unused code");
    $display("changes=%0d stretched=%0d gatings=%0d conflicts=%0d pending=%0d unused=%0d",
             n_change, n_stretch, n_gate, n_conflict, n_pending, n_unused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
