`timescale 1ps/1ps
// arbiter: orders the frequency channel and the gating channel.
//
// Both external channels are four-phase handshakes: (req_f, ack_f) with the
// frequency code, and (req_g, ack_g) for clock gating. They are unrelated and
// may arrive together, so a mutex decides which one reaches the control
// blocks. The frequency side keeps the mutex from req_f+ until the event
// controller reports that the new ring is driving the clock (busy_f low);
// the gating side keeps it until its handshake has returned to zero
// (req_g and ack_s both low). A request that loses waits, its channel simply
// not acknowledged.
//
// Towards the event controller: new_f = req_f while granted, ack_f = ck_f.
// Towards the switch control:  req_s = req_g while granted, ack_g = ack_s.
// The design calls for a standard mutex-based arbiter; the two hold terms
// and the use of the event controller's busy are this implementation's.
// Purely asynchronous, no clock.
// The loop lint reports through the mutex is the mutex's own
// cross-coupling (see mutex).
module arbiter (
  // frequency channel
  input  logic req_f,
  output logic ack_f,
  // gating channel
  input  logic req_g,
  output logic ack_g,
  // event controller side
  output logic new_f,
  input  logic ck_f,
  input  logic busy_f,
  // switch control side
  output logic req_s,
  input  logic ack_s
);

  logic hold_f, hold_g, grant_f, grant_g;

  assign hold_f = req_f | busy_f;
  assign hold_g = req_g | ack_s;

  mutex u_mutex (
    .r_a(hold_f),
    .r_b(hold_g),
    .g_a(grant_f),
    .g_b(grant_g)
  );

  assign new_f = req_f & grant_f;
  assign ack_f = ck_f;
  assign req_s = req_g & grant_g;
  assign ack_g = ack_s;

endmodule
