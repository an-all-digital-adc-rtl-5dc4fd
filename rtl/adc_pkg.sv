`timescale 1ps/1ps
// Shared constants of the VCO-based ECG converter.
//
// CNT_W is the width of each asynchronous counter. It is sized so that the
// fastest VCO (39.52 MHz) cannot overflow it within one sampling period; the
// 17-bit figure follows the design, the rest are this implementation's choices.
// Input voltages are carried as unsigned microvolt codes: VFS_UV (100 mV) is the
// top of the VCO control range, so VIN_W = 17 bits is enough.
package adc_pkg;
  localparam int unsigned CNT_W  = 17;      // counter width
  localparam int unsigned VIN_W  = 17;      // width of a microvolt input code
  localparam int unsigned VFS_UV = 100_000; // VCO control range, 0 .. 100 mV
  localparam int unsigned NCH    = 8;       // channels in multi-channel mode
  localparam int unsigned REST   = 2;       // idle slots per multi-channel frame
  localparam int unsigned DS_N   = 4;       // estimation region = 1/DS_N period
endpackage
