`timescale 1ps/1ps
// ECG acquisition converter: VCO-based differential ADC with a multi-channel
// sequencer and PDS dynamic sampling.
//
// Structure: analog input MUX (one per input polarity) -> differential
// VCO-based ADC (vco_adc) -> either the PDS controller (single-channel mode)
// or the channel sequencer (multi-channel mode). The controller in charge
// decides, interval by interval, whether the VCOs run (vco_on), and the MUX
// select in multi-channel mode.
//
// Single-channel mode (multi_ch = 0): clk_sp is the DEL-SP clock at 2*DS_N
// times the output rate (8 kHz for 1 kHz ECG samples). Channel 0 is converted.
// One result per 2*DS_N clocks; dout_low_info marks periods that the
// dynamic-sampling decision converted at reduced resolution. With ds_en = 0
// every period is converted at full resolution.
//
// Multi-channel mode (multi_ch = 1): clk_sp is the channel clock (10 kHz for
// 8 channels at 1 kHz each). Each frame converts channels 0..NCH-1 in turn and
// then rests for 2 clocks with the VCOs off. One result per channel slot,
// tagged with dout_ch.
//
// Results are signed counts that grow with vin_p - vin_n. Outputs change on
// the rising edge of clk_out, a copy of clk_sp delayed by four delay-line
// stages; dout_valid is high for one clk_out period. The front-end amplifier
// and filter are outside this block: vin_*_uv are the converter input
// voltages of each channel in microvolts (0..100 mV). The two modes, their
// rates and the frame follow the design; the port encoding is this
// implementation's choice.
module ecg_adc_top #(
  parameter int unsigned NCH   = adc_pkg::NCH,
  parameter int unsigned CNT_W = adc_pkg::CNT_W,
  parameter int unsigned DS_N  = adc_pkg::DS_N,
  parameter int unsigned VIN_W = adc_pkg::VIN_W,
  parameter int unsigned OUT_W = CNT_W + 2 + $clog2(2 * DS_N),
  parameter int unsigned CHW   = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                    clk_sp,
  input  logic                    rst_n,
  input  logic                    multi_ch,
  input  logic                    ds_en,
  input  logic        [CNT_W-1:0] ds_threshold,
  input  logic        [VIN_W-1:0] vin_p_uv [NCH],
  input  logic        [VIN_W-1:0] vin_n_uv [NCH],
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid,
  output logic        [CHW-1:0]   dout_ch,
  output logic                    dout_low_info,
  output logic                    clk_out
);
  logic [CHW-1:0] sel, seq_sel;
  logic [VIN_W-1:0] adc_vin_p, adc_vin_n;
  logic vco_on, seq_vco_on, pds_vco_on;
  logic signed [CNT_W:0] diff, seq_dout;
  logic clk_ctl;
  logic [CHW-1:0] seq_ch;
  logic seq_valid;
  logic signed [OUT_W-1:0] pds_dout;
  logic pds_valid, pds_low;

  assign sel    = multi_ch ? seq_sel : '0;
  assign vco_on = multi_ch ? seq_vco_on : pds_vco_on;

  analog_mux #(.NCH(NCH), .VIN_W(VIN_W)) u_mux_p (.vin(vin_p_uv), .sel(sel), .vout(adc_vin_p));
  analog_mux #(.NCH(NCH), .VIN_W(VIN_W)) u_mux_n (.vin(vin_n_uv), .sel(sel), .vout(adc_vin_n));

  vco_adc #(.CNT_W(CNT_W), .VIN_W(VIN_W)) u_adc (
    .clk(clk_sp), .rst_n(rst_n), .vco_on(vco_on),
    .vin_p_uv(adc_vin_p), .vin_n_uv(adc_vin_n),
    .diff(diff), .cnt_p(), .cnt_n(), .took_sp(),
    .clk_res(), .clk_ctl(clk_ctl));

  channel_sequencer #(.NCH(NCH), .REST(adc_pkg::REST), .CNT_W(CNT_W)) u_seq (
    .clk(clk_ctl), .rst_n(rst_n), .active(multi_ch), .diff(diff),
    .sel(seq_sel), .vco_on(seq_vco_on), .dout(seq_dout), .dout_ch(seq_ch),
    .dout_valid(seq_valid), .rest_slot());

  pds_controller #(.DS_N(DS_N), .CNT_W(CNT_W), .OUT_W(OUT_W)) u_pds (
    .clk(clk_ctl), .rst_n(rst_n), .active(!multi_ch), .ds_en(ds_en),
    .threshold(ds_threshold), .diff(diff), .vco_on(pds_vco_on),
    .dout(pds_dout), .dout_valid(pds_valid), .low_info(pds_low));

  always_comb begin
    if (multi_ch) begin
      dout          = OUT_W'(seq_dout);
      dout_valid    = seq_valid;
      dout_ch       = seq_ch;
      dout_low_info = 1'b0;
    end else begin
      dout          = pds_dout;
      dout_valid    = pds_valid;
      dout_ch       = '0;
      dout_low_info = pds_low;
    end
  end

  assign clk_out = clk_ctl;
endmodule
