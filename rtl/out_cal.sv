`timescale 1ps/1ps
// Output calculation: the differential result of the converter.
//
// Subtracts the count of the positive-input VCO from the count of the
// negative-input VCO, as in the design's block diagram (minus on the Vin+
// path, plus on the Vin- path). Because the VCO frequency falls as its control
// voltage rises, the result grows with Vin+ - Vin-.
//
// Registered on the rising edge of clk (one result per sampling event);
// signed, as wide as the sign-extended counts. Asynchronous active-low reset.
module out_cal #(
  parameter int unsigned WIDTH = adc_pkg::CNT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [WIDTH:0]   cnt_p,   // determined count, Vin+ side
  input  logic signed [WIDTH:0]   cnt_n,   // determined count, Vin- side
  output logic signed [WIDTH:0]   diff
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) diff <= '0;
    else        diff <= cnt_n - cnt_p;
  end
endmodule
