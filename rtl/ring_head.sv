`timescale 1ps/1ps
// ring_head: closes one ring oscillator and gates its clock with handshakes.
//
// The ring is s -> programmable delay line -> del_s -> ring head -> s. The
// ring head is the single inverting stage: s = ~(del_s & run), so the ring
// oscillates while run is high and parks with del_s high when run is low.
// The ring's clock phase is ndel = ~del_s.
//
// Two latch + AND gating structures are cascaded, as in the design:
//   1. gate (from the event controller) is sampled by a latch that is
//      transparent while ndel is low; clk1 = ndel & ~gate_l. gated = gate_l
//      tells the event controller the ring has stopped.
//   2. r (the gating request from the switch control) is sampled by a latch
//      that is transparent while clk1 is low; clock = clk1 & ~r_l, a = r_l.
// Because both latches only change during the low phase, the clock output is
// always stopped low and restarts with a full high phase: no glitch. Once
// either latch has gated, run drops and the ring stops, so a gated ring does
// not oscillate. After a release the first rising clock edge comes one ring
// half-period later (the stretched low phase of a frequency change).
//
// The two latch + AND stages and the NAND closing the ring follow the
// design; driving the NAND's stop input from both latches (run) is this
// implementation's choice. rst_n (active low, asynchronous; also this
// implementation's) forces the ring gated and stopped.
// Timing rule (from the design): gated and a must only rise after the clock
// is really gated; here that holds by construction (zero-delay latches).
// Lint reports latches: they are the two gating latches of the design.
// The loop s -> delay line -> del_s is the ring itself and is closed
// outside this module.
module ring_head (
  input  logic rst_n,
  input  logic del_s,
  output logic s,
  input  logic gate,
  output logic gated,
  input  logic r,
  output logic a,
  output logic clock
);

  logic ndel, gate_l, clk1, r_l, run;

  assign ndel = ~del_s;

  always_latch begin
    if (!rst_n)     gate_l = 1'b1;
    else if (!ndel) gate_l = gate;
  end

  assign clk1 = ndel & ~gate_l;

  always_latch begin
    if (!rst_n)     r_l = 1'b0;
    else if (!clk1) r_l = r;
  end

  assign clock = clk1 & ~r_l;
  assign run   = ~gate_l & ~r_l;
  assign s     = ~(del_s & run);
  assign gated = gate_l;
  assign a     = r_l;

endmodule
