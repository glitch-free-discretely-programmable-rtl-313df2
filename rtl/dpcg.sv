`timescale 1ps/1ps
// dpcg: discretely programmable, glitch-free clock generator.
//
// Two identical programmable ring oscillators are used in turn: one drives
// the output clock at the current frequency while the other waits, stopped,
// with the next frequency code. A frequency change loads the new code into
// the idle ring, stops the running ring in its low phase and then releases
// the idle one, so the change appears on the output only as a longer low
// phase. Only one ring oscillates at a time.
//
// Interface, two four-phase channels and a reset:
//   req_f / ack_f / data_f : frequency channel. Put the code on data_f, raise
//     req_f; data_f is stored when ack_f rises; drop req_f; ack_f falls; the
//     new frequency is on clock shortly after (one new-ring half period).
//   req_g / ack_g          : gating channel. req_g+ stops the clock in its
//     low phase, then ack_g rises; req_g- lets it restart after ack_g falls.
//   clock                  : output clock.
//   rst_n                  : asynchronous active-low reset; ring 0 starts at
//     CODE_RESET when it is released. Hold it for at least one slow-ring
//     period so the stopped rings settle.
// The two channels are independent; the arbiter serialises them.
// The rings are behavioural delay models (T_AND_PS, T_FIX_PS); everything
// else is delay-insensitive latch/gate logic without a clock.
// Lint reports latches and combinational loops. Both are intended: the
// control is clockless handshake logic whose state is held in latches, and
// the handshake loops (gate -> gated -> gate of the other ring, the mutex,
// the f_mux toggle) are closed on purpose and settle after each input
// change. The rings themselves are loops through the delay models.
module dpcg
  import dpcg_pkg::*;
#(
  parameter int unsigned T_AND_PS = 68,
  parameter int unsigned T_FIX_PS = 540
) (
  input  logic       rst_n,
  input  logic       req_f,
  output logic       ack_f,
  input  freq_code_t data_f,
  input  logic       req_g,
  output logic       ack_g,
  output logic       clock
);

  logic new_f, ck_f, busy_f, f_mux;
  logic gate0, gate1, gated0, gated1;
  logic req_s, ack_s, r0, r1, a0, a1;
  logic s0, s1, del_s0, del_s1;
  freq_code_t code0, code1;

  arbiter u_arbiter (
    .req_f(req_f), .ack_f(ack_f), .req_g(req_g), .ack_g(ack_g),
    .new_f(new_f), .ck_f(ck_f), .busy_f(busy_f),
    .req_s(req_s), .ack_s(ack_s)
  );

  event_controller u_event_controller (
    .rst_n(rst_n), .new_f(new_f), .gated0(gated0), .gated1(gated1),
    .f_mux(f_mux), .ck_f(ck_f), .gate0(gate0), .gate1(gate1), .busy(busy_f)
  );

  switch_control u_switch_control (
    .sel(f_mux), .req(req_s), .ack(ack_s),
    .r0(r0), .r1(r1), .a0(a0), .a1(a1)
  );

  mux_flipflops u_mux_flipflops (
    .rst_n(rst_n), .ck_mux(ck_f), .sel_mux(f_mux), .data_f(data_f),
    .code0(code0), .code1(code1)
  );

  prog_ring_element #(.T_AND_PS(T_AND_PS), .T_FIX_PS(T_FIX_PS)) u_ring0 (
    .s(s0), .code(code0), .del_s(del_s0)
  );

  prog_ring_element #(.T_AND_PS(T_AND_PS), .T_FIX_PS(T_FIX_PS)) u_ring1 (
    .s(s1), .code(code1), .del_s(del_s1)
  );

  clock_switch u_clock_switch (
    .rst_n(rst_n),
    .del_s0(del_s0), .s0(s0), .gate0(gate0), .gated0(gated0), .r0(r0), .a0(a0),
    .del_s1(del_s1), .s1(s1), .gate1(gate1), .gated1(gated1), .r1(r1), .a1(a1),
    .clock(clock)
  );

endmodule
