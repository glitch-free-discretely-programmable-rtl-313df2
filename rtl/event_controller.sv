`timescale 1ps/1ps
// event_controller: sequences a frequency change between the two rings.
//
// It follows the signal transition graph of the design: on new_f+ it raises
// ck_f (the acknowledge of the frequency channel, which also clocks the new
// code into the register of the idle ring); after new_f- it drops ck_f and
// toggles f_mux, stops the running ring with its gate signal, waits until
// that ring reports gated (it has stopped in its low phase) and only then
// releases the gate of the other ring. The two halves of the graph alternate
// (ring 0 -> ring 1, then ring 1 -> ring 0).
//
// Implementation (this design's own logic, derived from the graph):
//   * ck_f is a C-element of new_f and "ready" (rings steady, no change
//     pending): set by new_f when the rings are steady, cleared by new_f low.
//   * f_mux toggles through a master/slave pair of latches controlled by ck_f:
//     next_mux takes ~f_mux while ck_f is high, f_mux takes next_mux while
//     ck_f is low, so f_mux changes just after ck_f-.
//   * gate0 = f_mux | ~gated1 and gate1 = ~f_mux | ~gated0: a ring is released
//     only after the other one has been seen gated.
//   * busy (an addition for the arbiter) is high from ck_f+ until the newly
//     selected ring runs and the old one is stopped.
// f_mux names the ring that drives the clock after the change in progress
// (0 after reset). rst_n (active low, asynchronous) clears the state.
// Lint reports latches and loops: the controller is clockless, so its state
// lives in latches, and ck_f -> next_mux -> f_mux -> ck_f is the intended
// two-phase toggle. The loop is never transparent end to end because
// next_mux and f_mux are open on opposite levels of ck_f.
module event_controller (
  input  logic rst_n,
  input  logic new_f,
  input  logic gated0,
  input  logic gated1,
  output logic f_mux,
  output logic ck_f,
  output logic gate0,
  output logic gate1,
  output logic busy
);

  logic next_mux;
  logic steady;

  // Ring f_mux runs, the other one is stopped.
  assign steady = f_mux ? (gated0 & ~gated1) : (~gated0 & gated1);

  // ck_f is a Muller C-element of the request and "ready": it rises once
  // both are high, and falls once both are low. ready drops as soon as
  // next_mux has taken ~f_mux, so new_f- alone then clears ck_f.
  logic ready, req_in;
  assign ready  = steady & (next_mux == f_mux);
  assign req_in = new_f & rst_n;

  c_element u_ck_f (
    .a(req_in),
    .b(ready),
    .y(ck_f)
  );

  always_latch begin
    if (!rst_n)    next_mux = 1'b0;
    else if (ck_f) next_mux = ~f_mux;
  end

  always_latch begin
    if (!rst_n)     f_mux = 1'b0;
    else if (!ck_f) f_mux = next_mux;
  end

  assign gate0 = f_mux | ~gated1;
  assign gate1 = ~f_mux | ~gated0;
  assign busy  = (next_mux ^ f_mux) | ~steady;

endmodule
