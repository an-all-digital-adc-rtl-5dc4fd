`timescale 1ps/1ps
// Behavioural model (not synthesizable) of the tapped clock delay line.
//
// In silicon this is a chain of inverter delay cells. Each stage delays a
// rising edge by TDR_PS and a falling edge by TDF_PS; tap[k] is the input
// delayed by k stages. The defaults are the typical-corner (TT, 25 C) delays
// of the design's delay cell, 2.84 ns rising and 3.03 ns falling. The number of
// taps (TAPS = 5) is this implementation's choice, set by the sampling
// sequence that window_gen builds from them.
//
// Transport delay: pulses much shorter than a stage delay are not filtered.
module delay_line #(
  parameter int unsigned TAPS   = 5,
  parameter int unsigned TDR_PS = 2840,
  parameter int unsigned TDF_PS = 3030
) (
  input  logic          clk_in,
  output logic [TAPS:1] tap
);
  logic [TAPS:0] stage;

  assign stage[0] = clk_in;

  initial stage[TAPS:1] = '0;

  for (genvar k = 1; k <= TAPS; k++) begin : g_stage
    int unsigned dly;
    always @(stage[k-1]) begin
      dly = stage[k-1] ? TDR_PS : TDF_PS;
      stage[k] <= #(dly) stage[k-1];
    end
  end

  assign tap = stage[TAPS:1];
endmodule
