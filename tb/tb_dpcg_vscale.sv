`timescale 1ps/1ps
// tb_dpcg_vscale: the clock generator at reduced supply voltage.
//
// Lowering the supply from 1.2 V to 0.8 V slows every gate of the reference
// design by about a factor of 2.2. Here that is represented by scaling both
// delay parameters of the top by 2.2 (T_AND 68 -> 150 ps, T_FIX 540 ->
// 1188 ps). Expected: each code gives 491 / 317 / 194 MHz divided by 2.2
// (223 / 144 / 88 MHz) within 3 %, and frequency changes and gating keep
// the clock free of pulses shorter than the fastest half period.
module tb_dpcg_vscale;
  import dpcg_pkg::*;

  localparam int unsigned T_AND = 150;
  localparam int unsigned T_FIX = 1188;
  localparam real         SCALE = 2.2;
  localparam longint      MIN_PULSE = longint'(LEN_FAST * T_AND + T_FIX) - 20;

  logic       rst_n, req_f, req_g, ack_f, ack_g, clock;
  freq_code_t data_f;

  dpcg #(.T_AND_PS(T_AND), .T_FIX_PS(T_FIX)) dut (
    .rst_n(rst_n), .req_f(req_f), .ack_f(ack_f), .data_f(data_f),
    .req_g(req_g), .ack_g(ack_g), .clock(clock)
  );

  int checks = 0, failures = 0, n_glitch = 0;
  longint t_rise = 0, t_fall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic real paper_mhz(input freq_code_t c);
    case (c)
      CODE_FAST: return 491.0;
      CODE_MID:  return 317.0;
      default:   return 194.0;
    endcase
  endfunction

  always @(posedge clock) begin
    if (rst_n && t_fall != 0 && $time - t_fall < MIN_PULSE) n_glitch++;
    t_rise = $time;
  end
  always @(negedge clock) begin
    if (rst_n && t_rise != 0 && $time - t_rise < MIN_PULSE) n_glitch++;
    t_fall = $time;
  end

  task automatic measure(input freq_code_t c);
    longint t0;
    real mhz, want;
    @(posedge clock); @(posedge clock);
    t0 = $time;
    repeat (8) @(posedge clock);
    mhz  = 8.0e6 / real'($time - t0);
    want = paper_mhz(c) / SCALE;
    check(mhz > 0.97 * want && mhz < 1.03 * want,
          $sformatf("code %0d: %0.1f MHz, expected about %0.1f MHz", c, mhz, want));
  endtask

  task automatic change_freq(input freq_code_t c);
    data_f = c;
    #100 req_f = 1'b1;
    wait (ack_f);
    #50 req_f = 1'b0;
    wait (!ack_f);
    #1;
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; req_f = 1'b0; req_g = 1'b0; data_f = CODE_FAST;
    #1 rst_n = 1'b0;
    #40000 rst_n = 1'b1;
    measure(CODE_RESET);
    for (int i = 0; i < 6; i++) begin
      freq_code_t c = freq_code_t'(i % 3);
      change_freq(c);
      measure(c);
      if (i == 3) begin
        #1 req_g = 1'b1;
        wait (ack_g);
        #1 check(clock == 1'b0, "clock low while gated");
        #20000 check(clock == 1'b0, "clock stays low while gated");
        req_g = 1'b0;
        wait (!ack_g);
        #1;
        measure(c);
      end
    end
    check(n_glitch == 0, $sformatf("no glitch (%0d seen)", n_glitch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
