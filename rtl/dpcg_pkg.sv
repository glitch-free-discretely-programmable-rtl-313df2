`timescale 1ps/1ps
// dpcg_pkg: types and constants shared by the discretely programmable clock
// generator (DPCG).
//
// The frequency code selects one of three ring lengths: 7, 15 or 30 AND-gate
// delay stages (these lengths are the design's; the 2-bit encoding below is
// this implementation's choice). Code 2'b11 is unused and maps to the longest
// (slowest) ring so that an illegal code can never make the clock faster.
package dpcg_pkg;

  localparam int unsigned CODE_W = 2;
  typedef logic [CODE_W-1:0] freq_code_t;

  // Ring lengths in AND-gate stages.
  localparam int unsigned LEN_FAST = 7;
  localparam int unsigned LEN_MID  = 15;
  localparam int unsigned LEN_SLOW = 30;

  localparam freq_code_t CODE_FAST = 2'd0;
  localparam freq_code_t CODE_MID  = 2'd1;
  localparam freq_code_t CODE_SLOW = 2'd2;

  // Code loaded into both ring registers at reset.
  localparam freq_code_t CODE_RESET = CODE_SLOW;

  function automatic int unsigned ring_length(freq_code_t code);
    case (code)
      CODE_FAST: return LEN_FAST;
      CODE_MID:  return LEN_MID;
      default:   return LEN_SLOW;
    endcase
  endfunction

endpackage
