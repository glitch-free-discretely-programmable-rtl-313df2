`timescale 1ps/1ps
// tb_arbiter: checks that the arbiter serialises the two channels.
// The testbench models the event controller (ck_f follows new_f after a
// delay, busy_f stays high for a while after ck_f falls) and the switch
// control (ack_s follows req_s after a delay). Random handshakes run on both
// channels. Checked: the switch control never sees a request while the
// frequency side holds the arbiter (new_f, ck_f or busy_f high), every
// handshake completes, and the acknowledges map straight through.
module tb_arbiter;
  logic req_f, ack_f, req_g, ack_g, new_f, ck_f, busy_f, req_s, ack_s;
  int checks = 0, failures = 0, n_done_f = 0, n_done_g = 0, n_wait = 0;

  arbiter dut (.*);

  // Event controller model.
  always @(new_f) ck_f <= #15 new_f;
  always @(posedge ck_f) busy_f = 1'b1;
  always @(negedge ck_f) begin
    #($urandom_range(50, 150));
    if (!ck_f) busy_f = 1'b0;
  end
  // Switch control model.
  always @(req_s) ack_s <= #25 req_s;

  always @(req_s or new_f or ck_f or busy_f) begin
    #0;
    checks++;
    if (req_s && (new_f || ck_f || busy_f)) begin
      failures++;
      $display("FAIL @%0t: gating request while a frequency change is active", $time);
    end
  end

  always @(posedge req_g) if (busy_f || ck_f) n_wait++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_f = 0; req_g = 0; ck_f = 0; busy_f = 0; ack_s = 0;
    #10;
    fork
      repeat (60) begin
        #($urandom_range(1, 200)); req_f = 1;
        wait (ack_f); chk(ck_f == ack_f, "ack_f is ck_f");
        #($urandom_range(1, 20)); req_f = 0;
        wait (!ack_f); n_done_f++;
      end
      repeat (60) begin
        #($urandom_range(1, 200)); req_g = 1;
        wait (ack_g); chk(ack_s == ack_g, "ack_g is ack_s");
        #($urandom_range(1, 60)); req_g = 0;
        wait (!ack_g); n_done_g++;
      end
    join
    #500;
    chk(n_done_f == 60 && n_done_g == 60, "all handshakes completed");
    chk(n_wait > 0, "a gating request had to wait for a frequency change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
