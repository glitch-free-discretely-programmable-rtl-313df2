`timescale 1ps/1ps
// c_element: two-input Muller C-element.
//
// The output copies the inputs when both agree and keeps its value while they
// differ, which makes it the basic state-holding gate of the four-phase
// handshake logic in this design. It is written as a level-sensitive latch
// whose enable is "inputs equal", so it synthesises to one latch plus an XNOR;
// in silicon it would be a dedicated standard cell. No clock, no reset: with
// both inputs low the output is low.
// Lint reports a latch here; it is the intended storage of the gate.
module c_element (
  input  logic a,
  input  logic b,
  output logic y
);

  always_latch begin
    if (a == b) y = a;
  end

endmodule
