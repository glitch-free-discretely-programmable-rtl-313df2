`timescale 1ps/1ps
// clock_switch: two ring heads and the output clock multiplexer.
//
// Each ring head closes one programmable ring and gates it (see ring_head).
// The event controller guarantees that at most one ring is released at a
// time, and that a ring is released only after the other has stopped in its
// low phase. The multiplexer takes ring 1 while ring 0 reports gated and
// ring 0 otherwise; it therefore only switches while both ring clocks are
// low, so the output is glitch-free. Ports mirror the two ring heads;
// rst_n (active low) stops both rings.
// Lint reports the ring heads' latches (intended, see ring_head).
module clock_switch (
  input  logic rst_n,
  // ring 0
  input  logic del_s0,
  output logic s0,
  input  logic gate0,
  output logic gated0,
  input  logic r0,
  output logic a0,
  // ring 1
  input  logic del_s1,
  output logic s1,
  input  logic gate1,
  output logic gated1,
  input  logic r1,
  output logic a1,
  // output clock
  output logic clock
);

  logic clock0, clock1;

  ring_head u_head0 (
    .rst_n(rst_n), .del_s(del_s0), .s(s0), .gate(gate0), .gated(gated0),
    .r(r0), .a(a0), .clock(clock0)
  );

  ring_head u_head1 (
    .rst_n(rst_n), .del_s(del_s1), .s(s1), .gate(gate1), .gated(gated1),
    .r(r1), .a(a1), .clock(clock1)
  );

  assign clock = gated0 ? clock1 : clock0;

endmodule
