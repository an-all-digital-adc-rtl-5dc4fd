`timescale 1ps/1ps
// Behavioural model (not synthesizable) of the analog input multiplexer.
//
// In silicon this is a bank of analog switches in front of the converter that
// connects one channel's amplified lead to the VCO input. Here each "voltage"
// is a microvolt code; the selected channel appears at vout SETTLE_PS after
// sel or the input changes. A select beyond the last channel gives channel 0.
module analog_mux #(
  parameter int unsigned NCH      = adc_pkg::NCH,
  parameter int unsigned VIN_W    = adc_pkg::VIN_W,
  parameter int unsigned CHW      = (NCH > 1) ? $clog2(NCH) : 1,
  parameter int unsigned SETTLE_PS = 100
) (
  input  logic [VIN_W-1:0] vin [NCH],
  input  logic [CHW-1:0]   sel,
  output logic [VIN_W-1:0] vout
);
  logic [VIN_W-1:0] picked;

  always_comb picked = (int'(sel) < NCH) ? vin[sel] : vin[0];

  initial vout = '0;

  always @(picked) vout <= #(SETTLE_PS) picked;
endmodule
