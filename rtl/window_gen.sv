`timescale 1ps/1ps
// Window generator: derives every timing pulse of one sampling event from the
// sampling clock and its delayed copies d[1..5] (one delay-line stage apart).
//
// A window is the intersection of an earlier clock copy with the inverse of a
// later one, so it opens at the earlier rising edge and closes at the later.
// For the gated flip-flops this follows the design: the window runs from the
// first to the last of three consecutive clock copies and the flip-flop is
// clocked by the middle one. The sequence after each sampling-clock edge t0:
//
//   t0      DISABLE rises: both VCOs stop, the counters freeze
//   d1      regular sample (FF_SP)   inside EN window t0..d2
//   d2      delayed sample (FF_SP_D) inside EN window d1..d3
//   d3      result register (out_cal); counter clear pulse d3..d4
//   d4      control clock for the sequencer / dynamic-sampling controller
//   d5      DISABLE falls: the VCOs resume (if enabled)
//
// Stopping the counters before they are sampled is the metastability
// protection of the design; the exact tap assignment is this implementation's
// choice. Pure AND / AND-NOT logic.
module window_gen (
  input  logic       clk,      // sampling clock (t0)
  input  logic [5:1] d,        // delayed copies of clk
  output logic       dis,      // DISABLE window for the VCOs
  output logic       en_sp,    // EN window of FF_SP
  output logic       clk_sp,   // sampling clock of FF_SP
  output logic       en_spd,   // EN window of FF_SP_D
  output logic       clk_spd,  // sampling clock of FF_SP_D
  output logic       clk_res,  // result register clock
  output logic       clr,      // counter clear pulse
  output logic       clk_ctl   // control clock
);
  always_comb begin
    dis     = clk  & ~d[5];
    en_sp   = clk  & ~d[2];
    clk_sp  = d[1];
    en_spd  = d[1] & ~d[3];
    clk_spd = d[2];
    clk_res = d[3];
    clr     = d[3] & ~d[4];
    clk_ctl = d[4];
  end
endmodule
