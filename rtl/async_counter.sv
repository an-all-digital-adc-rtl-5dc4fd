`timescale 1ps/1ps
// Asynchronous (ripple) counter that quantises the VCO phase.
//
// Only the LSB is clocked by the VCO output (rising edge); every higher bit
// toggles on the falling edge of the bit below it, so no adder is needed and
// the upper bits switch rarely. This is the low-power counter structure of the
// design. The count ripples from the LSB upward, so right after a VCO edge the
// value can briefly read lower than before; the double sampling and the value
// determination downstream deal with that.
//
// `clr` is an asynchronous clear, pulsed once per sampling edge while the VCO
// is stopped (the counter restarts from zero each sampling interval).
// WIDTH = 17 covers the fastest VCO over one sampling period.
module async_counter #(
  parameter int unsigned WIDTH = adc_pkg::CNT_W
) (
  input  logic             cnt_clk,   // VCO output
  input  logic             clr,       // asynchronous clear, active high
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] tick;   // clock of each stage: VCO, then the inverted bit below

  assign tick[0] = cnt_clk;

  // Each stage is its own flip-flop with its own clock, so each lives in its
  // own generate scope.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic b;
    always_ff @(posedge tick[i] or posedge clr) begin
      if (clr) b <= 1'b0;
      else     b <= ~b;
    end
    assign q[i]      = b;
    if (i < WIDTH - 1) begin : g_next
      assign tick[i+1] = ~b;   // next stage toggles on this bit's falling edge
    end
  end
endmodule
