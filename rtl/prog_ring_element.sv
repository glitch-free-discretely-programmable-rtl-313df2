`timescale 1ps/1ps
// prog_ring_element: BEHAVIOURAL MODEL of the programmable delay line of one
// ring oscillator (not synthesisable logic: its function is its delay).
//
// In silicon the line is a chain of concatenated AND gates used as delay
// elements, with multiplexers that close the ring after 7, 15 or 30 gates.
// This model keeps that structure: a chain of LEN_SLOW stages, each a delay
// of T_AND_PS, tapped after ring_length(code) stages, followed by T_FIX_PS
// that stands for the rest of the loop (multiplexers and ring head).
// del_s is s delayed; with the ring head's inversion the ring period is
// 2 * (len * T_AND_PS + T_FIX_PS).
//
// The default delays are fitted to the oscillation frequencies the design
// reaches at 1.2 V: 491, 317 and 194 MHz for 7, 15 and 30 stages. The model
// gives 492, 321 and 194 MHz. Supply voltage and well bias, which scale all
// delays in silicon, are represented only by these two parameters.
// code must only change while the ring is stopped (s held high).
module prog_ring_element
  import dpcg_pkg::*;
#(
  parameter int unsigned T_AND_PS = 68,
  parameter int unsigned T_FIX_PS = 540
) (
  input  logic       s,
  input  freq_code_t code,
  output logic       del_s
);

  logic [LEN_SLOW:0] chain;
  logic              tap;

  assign chain[0] = s;

  for (genvar i = 0; i < LEN_SLOW; i++) begin : g_stage
    assign #(T_AND_PS) chain[i+1] = chain[i];
  end

  always_comb begin
    case (code)
      CODE_FAST: tap = chain[LEN_FAST];
      CODE_MID:  tap = chain[LEN_MID];
      default:   tap = chain[LEN_SLOW];
    endcase
  end

  assign #(T_FIX_PS) del_s = tap;

endmodule
