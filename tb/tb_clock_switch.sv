`timescale 1ps/1ps
// tb_clock_switch: checks the two ring heads and the output multiplexer.
// Ring 0 is closed by a 400 ps delay, ring 1 by a 700 ps delay. The
// testbench plays the event controller's part: it stops the running ring,
// waits for its gated, then releases the other, at random phases. Checked:
// the output period is that of the running ring, only that ring oscillates,
// and no output pulse is shorter than the faster ring's half period.
module tb_clock_switch;
  localparam longint D0 = 400, D1 = 700;
  logic rst_n, del_s0, s0, gate0, gated0, r0, a0;
  logic del_s1, s1, gate1, gated1, r1, a1, clock;
  int checks = 0, failures = 0, n_short = 0, e0 = 0, e1 = 0;
  longint t_rise = 0, t_fall = 0;

  clock_switch dut (.*);
  assign #(D0) del_s0 = s0;
  assign #(D1) del_s1 = s1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(s0) e0++;
  always @(s1) e1++;
  always @(posedge clock) begin
    if (t_fall != 0 && $time - t_fall < D0) n_short++;
    t_rise = $time;
  end
  always @(negedge clock) begin
    if (t_rise != 0 && $time - t_rise < D0) n_short++;
    t_fall = $time;
  end

  task automatic check_running(input bit ring);
    longint t0;
    int c0, c1;
    @(posedge clock); t0 = $time;
    c0 = e0; c1 = e1;
    repeat (4) @(posedge clock);
    chk(($time - t0) == 4 * 2 * (ring ? D1 : D0), $sformatf("ring %0d period %0d", ring, ($time - t0) / 4));
    chk(ring ? (e0 == c0 && e1 != c1) : (e1 == c1 && e0 != c0), "only the selected ring oscillates");
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; gate0 = 1; gate1 = 1; r0 = 0; r1 = 0;
    #3000;
    rst_n = 1;
    gate0 = 0;
    check_running(0);
    for (int i = 0; i < 30; i++) begin
      #($urandom_range(0, 1500));
      if (!gate0) begin
        gate0 = 1; wait (gated0); gate1 = 0;
        check_running(1);
      end else begin
        gate1 = 1; wait (gated1); gate0 = 0;
        check_running(0);
      end
    end
    chk(n_short == 0, $sformatf("no output pulse shorter than D0 (%0d seen)", n_short));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
