`timescale 1ps/1ps
// tb_ring_head: checks one ring head closing a fixed delay line.
// The testbench closes the ring with a D = 500 ps delay (del_s = s delayed),
// so the clock period must be 2 * D. Gate and R requests are raised at
// random phases. Checked: gated / a rise only with the clock low, the clock
// then stays low and the ring stops (no edge on s); after release the first
// rising edge comes exactly D later; no high or low pulse is ever shorter
// than D (no glitch).
module tb_ring_head;
  localparam longint D = 500;
  logic rst_n, del_s, s, gate, gated, r, a, clock;
  int checks = 0, failures = 0, n_short = 0, s_edges = 0;
  longint t_rise = 0, t_fall = 0;

  ring_head dut (.*);
  assign #(D) del_s = s;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(s) s_edges++;
  always @(posedge clock) begin
    if (t_fall != 0 && $time - t_fall < D) n_short++;
    t_rise = $time;
  end
  always @(negedge clock) begin
    if (t_rise != 0 && $time - t_rise < D) n_short++;
    t_fall = $time;
  end

  task automatic measure_period();
    longint t0;
    @(posedge clock); t0 = $time;
    repeat (4) @(posedge clock);
    chk(($time - t0) == 4 * 2 * D, $sformatf("period %0d ps", ($time - t0) / 4));
  endtask

  task automatic stop_and_release(input bit use_r);
    longint t0;
    int e;
    #($urandom_range(0, 1000));
    if (use_r) r = 1; else gate = 1;
    if (use_r) wait (a); else wait (gated);
    #1;
    chk(!clock, "clock low when the stop is acknowledged");
    e = s_edges;
    #(6 * D);
    chk(!clock && s_edges == e, "clock and ring stopped");
    if (use_r) r = 0; else gate = 0;
    if (use_r) wait (!a); else wait (!gated);
    t0 = $time;
    @(posedge clock);
    chk($time - t0 == D, $sformatf("restart after %0d ps", $time - t0));
    measure_period();
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; gate = 0; r = 0;
    #(4 * D);
    chk(gated && !clock, "reset: ring gated, clock low");
    rst_n = 1;
    measure_period();
    for (int i = 0; i < 40; i++) stop_and_release(1'($urandom_range(0, 1)));
    chk(n_short == 0, $sformatf("no pulse shorter than D (%0d seen)", n_short));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
