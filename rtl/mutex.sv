`timescale 1ps/1ps
// mutex: two-input mutual-exclusion element for four-phase requests.
//
// A request r_a / r_b is granted (g_a / g_b high) only while the other grant
// is low, so the two grants are never high together. A grant is held until
// its own request falls; the waiting request is then granted. Both grants are
// latches; in a zero-delay model two requests that rise in the same instant
// would have no winner, so the tie is resolved in favour of r_a (a real
// mutex resolves it arbitrarily after a metastability filter). No clock, no
// reset: with both requests low both grants are low.
// Lint reports latches and a loop between g_a and g_b: that cross-coupling
// is what makes the element exclusive, and it settles in one pass because
// g_b can only be set while g_a is low and r_a is low.
module mutex (
  input  logic r_a,
  input  logic r_b,
  output logic g_a,
  output logic g_b
);

  always_latch begin
    if (!r_a)      g_a = 1'b0;
    else if (!g_b) g_a = 1'b1;
  end

  // r_b may only take the grant while r_a is not asking for it.
  always_latch begin
    if (!r_b)              g_b = 1'b0;
    else if (!g_a && !r_a) g_b = 1'b1;
  end

  always_comb begin
    assert (!(g_a && g_b)) else $error("mutex: both grants high");
  end

endmodule
