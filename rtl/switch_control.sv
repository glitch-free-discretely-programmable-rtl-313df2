`timescale 1ps/1ps
// switch_control: multiplexer for a four-phase handshake.
//
// The gating request req is routed to the ring selected by sel (r0 when sel
// is 0, r1 when sel is 1), and the acknowledge a0/a1 of that ring is routed
// back. The acknowledge passes through a C-element whose other input is
// r0 | r1, so ack rises only once the request has gone out and the ring has
// answered, and falls only once both have returned to zero. sel must be
// stable while a handshake is in progress (the arbiter guarantees that).
// Structure as in the design's switch-control schematic; no clock.
module switch_control (
  input  logic sel,
  input  logic req,
  output logic ack,
  output logic r0,
  output logic r1,
  input  logic a0,
  input  logic a1
);

  logic a_sel, r_any;

  assign r0    = req & ~sel;
  assign r1    = req & sel;
  assign r_any = r0 | r1;
  assign a_sel = sel ? a1 : a0;

  c_element u_c (
    .a(a_sel),
    .b(r_any),
    .y(ack)
  );

endmodule
