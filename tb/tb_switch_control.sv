`timescale 1ps/1ps
// tb_switch_control: checks the handshake multiplexer.
// For each value of sel a full four-phase handshake is run with the ring
// side modelled by the testbench (a_i follows r_i after a delay). Checked:
// the request reaches only the selected ring, ack rises only after the
// selected ring's acknowledge and falls only after it returns to zero, and
// the unselected ring's acknowledge is ignored.
module tb_switch_control;
  logic sel, req, ack, r0, r1, a0, a1;
  int checks = 0, failures = 0;

  switch_control dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 0; req = 0; a0 = 0; a1 = 0;
    #10;
    for (int i = 0; i < 40; i++) begin
      sel = 1'($urandom_range(0, 1));
      #10;
      req = 1; #5;
      chk(r0 == !sel && r1 == sel, "request routed to the selected ring");
      chk(!ack, "no ack before the ring answers");
      // The other ring's acknowledge must not reach ack.
      if (sel) a0 = 1; else a1 = 1;
      #5;
      chk(!ack, "unselected acknowledge ignored");
      if (sel) a0 = 0; else a1 = 0;
      #5;
      if (sel) a1 = 1; else a0 = 1;
      #5;
      chk(ack, "ack after the selected ring answers");
      req = 0; #5;
      chk(!r0 && !r1, "request withdrawn");
      chk(ack, "ack held until the ring returns to zero");
      if (sel) a1 = 0; else a0 = 0;
      #5;
      chk(!ack, "ack released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
