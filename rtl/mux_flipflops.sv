`timescale 1ps/1ps
// mux_flipflops: the frequency-code registers of the two rings.
//
// On the rising edge of ck_mux (the frequency-channel acknowledge) data_f is
// stored in the register of the ring that is NOT selected by sel_mux, i.e.
// the idle ring that is about to take over: sel_mux = 0 loads code1,
// sel_mux = 1 loads code0. The other register keeps the code of the running
// ring. Each register drives the length select of its programmable ring.
// rst_n (active low, asynchronous) loads CODE_RESET into both registers;
// the reset value is this design's choice.
module mux_flipflops
  import dpcg_pkg::*;
(
  input  logic       rst_n,
  input  logic       ck_mux,
  input  logic       sel_mux,
  input  freq_code_t data_f,
  output freq_code_t code0,
  output freq_code_t code1
);

  always_ff @(posedge ck_mux or negedge rst_n) begin
    if (!rst_n) begin
      code0 <= CODE_RESET;
      code1 <= CODE_RESET;
    end else if (sel_mux) begin
      code0 <= data_f;
    end else begin
      code1 <= data_f;
    end
  end

endmodule
