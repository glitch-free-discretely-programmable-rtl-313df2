`timescale 1ps/1ps
// tb_event_controller: checks the frequency-change sequence.
// The two ring heads are modelled by the testbench: gated_i follows gate_i
// after a fixed delay, different for the two rings (the wait for the ring's low phase). Frequency
// handshakes are issued with random timing, some while the previous change
// is still running. Checked against the signal transition graph:
//   ck_f rises only while new_f is high and the rings are steady, falls only
//   after new_f falls; f_mux toggles once per handshake, after ck_f falls;
//   a ring is released (gate falls) only after the other reports gated;
//   the two gates are never low together; after each change the ring named
//   by f_mux runs and the other is stopped, and busy has returned low.
module tb_event_controller;
  logic rst_n, new_f, gated0, gated1, f_mux, ck_f, gate0, gate1, busy;
  int checks = 0, failures = 0, n_early = 0;
  logic exp_mux;

  event_controller dut (.*);

  assign #137 gated0 = gate0;
  assign #251 gated1 = gate1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge ck_f) if (rst_n) begin
    #0;
    chk(new_f, "ck_f+ needs new_f");
    chk(f_mux ? (gated0 && !gated1) : (!gated0 && gated1), "ck_f+ only with steady rings");
  end
  always @(negedge ck_f) if (rst_n) chk(!new_f, "ck_f- needs new_f-");
  always @(f_mux) if (rst_n) chk(!ck_f, "f_mux changes only with ck_f low");
  always @(negedge gate0) if (rst_n) chk(gated1, "ring 0 released only after ring 1 gated");
  always @(negedge gate1) if (rst_n) chk(gated0, "ring 1 released only after ring 0 gated");
  always @(gate0 or gate1) if (rst_n) begin
    #0;
    chk(gate0 || gate1, "never both rings released");
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; new_f = 0;
    #500;
    rst_n = 1;
    exp_mux = 0;
    wait (!busy);
    chk(!gated0 && gated1 && f_mux == 1'b0, "ring 0 runs after reset");
    for (int i = 0; i < 60; i++) begin
      new_f = 1;
      if (busy) n_early++;
      wait (ck_f);
      #($urandom_range(1, 50));
      new_f = 0;
      wait (!ck_f);
      exp_mux = ~exp_mux;
      #1;
      chk(f_mux == exp_mux, "f_mux toggled");
      chk(busy, "busy during the change");
      if (i % 3 != 0) begin
        wait (!busy);
        chk(f_mux ? (gated0 && !gated1) : (!gated0 && gated1), "new ring runs, old one stopped");
        chk(f_mux ? (gate0 && !gate1) : (!gate0 && gate1), "gates settled");
        #($urandom_range(1, 100));  // inputs change at least 1 ps after the wait
      end
    end
    wait (!busy);
    chk(n_early > 0, "a request arrived during a change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
