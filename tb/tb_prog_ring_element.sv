`timescale 1ps/1ps
// tb_prog_ring_element: checks the delay of the programmable delay line.
// For each code a rising and a falling edge are sent into s and the time to
// del_s is measured. Expected: len * 68 ps + 540 ps with len = 7, 15, 30,
// 30 (the unused code), i.e. 1016, 1560, 2580, 2580 ps.
module tb_prog_ring_element;
  import dpcg_pkg::*;
  logic s, del_s;
  freq_code_t code;
  int checks = 0, failures = 0;
  longint t0, expd;

  prog_ring_element dut (.s(s), .code(code), .del_s(del_s));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 1; code = 0;
    #5000;
    for (int c = 0; c < 4; c++) begin
      code = freq_code_t'(c);
      expd = (c == 0) ? 1016 : (c == 1) ? 1560 : 2580;
      #5000;
      for (int e = 0; e < 2; e++) begin
        s = ~s;
        t0 = $time;
        @(del_s);
        checks++;
        if ($time - t0 != expd) begin
          failures++;
          $display("FAIL: code %0d delay %0d ps, expected %0d", c, $time - t0, expd);
        end
        #3000;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
