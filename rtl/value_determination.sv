`timescale 1ps/1ps
// Value determination circuit for the double-sampled asynchronous counter.
//
// The counter is sampled twice: sp by the sampling clock and sp_d by a copy
// delayed by more than the counter's carry ripple time, so at most one of the
// two samples can be caught mid-ripple. A ripple first clears low bits before
// setting the higher one, so a mid-ripple value is always smaller than a
// settled one. The rule is therefore:
//   sp_d <  sp : sp_d was caught rippling, take sp
//   otherwise  : take sp_d - 1
// This is the design's own decision rule, implemented as printed. When both
// samples are settled and equal it returns one less than the count; because
// both halves of the differential converter take the same branch in that case,
// the offset cancels in the subtraction that follows.
//
// Purely combinational. The result is signed and one bit wider than the
// samples so that an idle counter (both samples 0) gives -1, not a wrap.
module value_determination #(
  parameter int unsigned WIDTH = adc_pkg::CNT_W
) (
  input  logic [WIDTH-1:0] sp,
  input  logic [WIDTH-1:0] sp_d,
  output logic signed [WIDTH:0] value,
  output logic             took_sp   // 1 when the regular sample was chosen
);
  always_comb begin
    took_sp = (sp_d < sp);
    value   = took_sp ? $signed({1'b0, sp}) : ($signed({1'b0, sp_d}) - $signed((WIDTH+1)'(1)));
  end
endmodule
