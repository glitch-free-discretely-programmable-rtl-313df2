`timescale 1ps/1ps
// tb_mux_flipflops: checks the two frequency-code registers.
// After reset both hold the reset code. Each rising ck_mux stores data_f in
// the register of the ring not named by sel_mux; the other register and any
// change of data_f between edges must leave the outputs alone.
module tb_mux_flipflops;
  import dpcg_pkg::*;
  logic rst_n, ck_mux, sel_mux;
  freq_code_t data_f, code0, code1, e0, e1;
  int checks = 0, failures = 0;

  mux_flipflops dut (.*);

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
    rst_n = 1; ck_mux = 0; sel_mux = 0; data_f = 0;
    #1 rst_n = 0;
    #10;
    chk(code0 == CODE_RESET && code1 == CODE_RESET, "reset code");
    rst_n = 1;
    e0 = CODE_RESET; e1 = CODE_RESET;
    for (int i = 0; i < 100; i++) begin
      sel_mux = 1'($urandom_range(0, 1));
      data_f  = freq_code_t'($urandom_range(0, 3));
      #5;
      ck_mux = 1;
      if (sel_mux) e0 = data_f; else e1 = data_f;
      #5;
      chk(code0 == e0 && code1 == e1, "load into the idle ring's register");
      data_f = ~data_f;
      #5;
      chk(code0 == e0 && code1 == e1, "no change while ck_mux is high");
      ck_mux = 0;
      #5;
      chk(code0 == e0 && code1 == e1, "no change on the falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
