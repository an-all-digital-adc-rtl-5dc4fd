`timescale 1ps/1ps
// Input-gated sampling flip-flop bank (G-FF).
//
// An AND gate in front of each D input passes the counter bits only while the
// enable window `en` is high, so the fast counter toggling does not reach the
// flip-flops (and does not burn power in them) outside a short window around
// the sampling edge. The window is built from the sampling clock and its
// delayed copies so that it opens before and closes after `clk` rises.
//
// Timing: q <= d & en on the rising edge of clk. The asynchronous active-low
// reset is this implementation's addition so that simulation starts known.
module gated_ff #(
  parameter int unsigned WIDTH = adc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] d_gated;

  assign d_gated = d & {WIDTH{en}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d_gated;
  end
endmodule
