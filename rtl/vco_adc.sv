`timescale 1ps/1ps
// Differential VCO-based ADC: one signed count per rising edge of clk.
//
// Each input drives its own ring VCO; an asynchronous counter counts the VCO's
// rising edges. On every sampling edge the DISABLE window first stops both
// VCOs (so the counters are frozen while they are read), then each counter is
// captured twice by input-gated flip-flops, at d1 (FF_SP) and d2 (FF_SP_D). A
// value determination circuit per side picks the settled value, out_cal
// subtracts the two sides and registers the result at d3, and the counters are
// cleared before the VCOs restart at d5. The VCOs keep their phase while
// stopped, so the quantisation residue of one interval carries into the next
// (first-order noise shaping).
//
// The result `diff` is the count over the interval that ended at the last
// edge; it is valid from d3 (about 8.5 ns after the edge with the default
// delays) until d3 of the next edge. clk_ctl (d4) is brought out for the
// control logic that decides, through vco_on, whether the VCOs run during the
// next interval. Block structure follows the design's converter diagram; the
// tap timing, the clear and the reset are this implementation's choices.
module vco_adc #(
  parameter int unsigned CNT_W  = adc_pkg::CNT_W,
  parameter int unsigned VIN_W  = adc_pkg::VIN_W,
  parameter int unsigned TDR_PS = 2840,
  parameter int unsigned TDF_PS = 3030
) (
  input  logic                    clk,        // sampling clock
  input  logic                    rst_n,
  input  logic                    vco_on,     // run the VCOs in the next interval
  input  logic        [VIN_W-1:0] vin_p_uv,
  input  logic        [VIN_W-1:0] vin_n_uv,
  output logic signed [CNT_W:0]   diff,
  output logic signed [CNT_W:0]   cnt_p,      // determined count, Vin+ side
  output logic signed [CNT_W:0]   cnt_n,      // determined count, Vin- side
  output logic                    took_sp,    // either side chose FF_SP
  output logic                    clk_res,    // diff updates on its rising edge
  output logic                    clk_ctl     // control clock (after clk_res)
);
  logic [5:1] d;
  logic dis, en_sp, clk_sp, en_spd, clk_spd, clr_win, clr;
  logic vco_en, osc_p, osc_n;
  logic [CNT_W-1:0] q_p, q_n, sp_p, spd_p, sp_n, spd_n;
  logic took_p, took_n;

  delay_line #(.TAPS(5), .TDR_PS(TDR_PS), .TDF_PS(TDF_PS)) u_dly (
    .clk_in(clk), .tap(d));

  window_gen u_win (
    .clk(clk), .d(d), .dis(dis), .en_sp(en_sp), .clk_sp(clk_sp),
    .en_spd(en_spd), .clk_spd(clk_spd), .clk_res(clk_res), .clr(clr_win),
    .clk_ctl(clk_ctl));

  assign vco_en = vco_on & ~dis & rst_n;
  assign clr    = clr_win | ~rst_n;

  ring_vco #(.VIN_W(VIN_W)) u_vco_p (.en(vco_en), .vctrl_uv(vin_p_uv), .vco_out(osc_p));
  ring_vco #(.VIN_W(VIN_W)) u_vco_n (.en(vco_en), .vctrl_uv(vin_n_uv), .vco_out(osc_n));

  async_counter #(.WIDTH(CNT_W)) u_cnt_p (.cnt_clk(osc_p), .clr(clr), .q(q_p));
  async_counter #(.WIDTH(CNT_W)) u_cnt_n (.cnt_clk(osc_n), .clr(clr), .q(q_n));

  gated_ff #(.WIDTH(CNT_W)) u_ff_sp_p  (.clk(clk_sp),  .rst_n(rst_n), .en(en_sp),  .d(q_p), .q(sp_p));
  gated_ff #(.WIDTH(CNT_W)) u_ff_spd_p (.clk(clk_spd), .rst_n(rst_n), .en(en_spd), .d(q_p), .q(spd_p));
  gated_ff #(.WIDTH(CNT_W)) u_ff_sp_n  (.clk(clk_sp),  .rst_n(rst_n), .en(en_sp),  .d(q_n), .q(sp_n));
  gated_ff #(.WIDTH(CNT_W)) u_ff_spd_n (.clk(clk_spd), .rst_n(rst_n), .en(en_spd), .d(q_n), .q(spd_n));

  value_determination #(.WIDTH(CNT_W)) u_vd_p (.sp(sp_p), .sp_d(spd_p), .value(cnt_p), .took_sp(took_p));
  value_determination #(.WIDTH(CNT_W)) u_vd_n (.sp(sp_n), .sp_d(spd_n), .value(cnt_n), .took_sp(took_n));

  assign took_sp = took_p | took_n;

  out_cal #(.WIDTH(CNT_W)) u_out (.clk(clk_res), .rst_n(rst_n), .cnt_p(cnt_p), .cnt_n(cnt_n), .diff(diff));
endmodule
