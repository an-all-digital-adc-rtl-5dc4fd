`timescale 1ps/1ps
// Partial dynamic sampling (PDS) controller, low-distortion mode.
//
// One output period is split into 2*DS_N equal intervals of the sampling
// clock (the DEL-SP clock, 2*DS_N times the output rate). The converter gives
// one signed count per interval. The first two intervals, 1/DS_N of the period,
// form the estimation region: their counts OUT1 and OUT2 are the input
// integrated over two adjacent windows of equal length, so |OUT2 - OUT1| is a
// measure of the input slope. If it is above `threshold` the period carries
// information: the VCOs keep running and the output is the sum of all
// intervals, i.e. the full-resolution count. Otherwise the VCOs are switched
// off for the rest of the period and the output is the estimation-region sum
// multiplied by DS_N: same scale, lower resolution, much less VCO power.
// ds_en = 0 treats every period as high-information.
//
// The estimation/decision/scaling scheme follows the design; equality with the
// threshold counting as low information, and the interval bookkeeping, are
// this implementation's choices.
//
// Timing: clocked by the converter's control clock, which rises shortly after
// each sampling edge, once `diff` holds the count of the interval that just
// ended. vco_on changes on that edge and takes effect for the next interval.
// dout/low_info update, with dout_valid high for one clock, at the end of
// every period.
module pds_controller #(
  parameter int unsigned DS_N  = adc_pkg::DS_N,
  parameter int unsigned CNT_W = adc_pkg::CNT_W,
  parameter int unsigned SLOTS = 2 * DS_N,
  parameter int unsigned OUT_W = CNT_W + 2 + $clog2(SLOTS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    active,      // single-channel mode selected
  input  logic                    ds_en,
  input  logic        [CNT_W-1:0] threshold,
  input  logic signed [CNT_W:0]   diff,        // count of the interval just ended
  output logic                    vco_on,      // VCOs run in the next interval
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid,
  output logic                    low_info     // dout came from a low-information period
);
  localparam int unsigned SW = (SLOTS > 2) ? $clog2(SLOTS) : 1;

  logic        [SW-1:0]    slot;   // interval that has just ended
  logic signed [OUT_W-1:0] acc;
  logic signed [OUT_W-1:0] out1;   // OUT1, count of the first interval
  logic signed [OUT_W-1:0] est;    // estimation-region sum
  logic signed [OUT_W-1:0] diff_x;
  logic signed [OUT_W-1:0] slope;
  logic                    low;    // decision for the current period
  logic                    low_now;

  assign diff_x  = OUT_W'(diff);
  assign slope   = (diff_x >= out1) ? (diff_x - out1) : (out1 - diff_x);
  assign low_now = ds_en && (slope <= $signed({{(OUT_W-CNT_W){1'b0}}, threshold}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot       <= '0;
      acc        <= '0;
      out1       <= '0;
      est        <= '0;
      low        <= 1'b0;
      vco_on     <= 1'b1;
      dout       <= '0;
      dout_valid <= 1'b0;
      low_info   <= 1'b0;
    end else if (!active) begin
      slot       <= '0;
      low        <= 1'b0;
      vco_on     <= 1'b1;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (slot == '0) begin
        out1 <= diff_x;
        acc  <= diff_x;
      end else begin
        acc <= acc + diff_x;
      end
      if (slot == SW'(1)) begin
        est    <= acc + diff_x;
        low    <= low_now;
        vco_on <= !low_now;
      end
      if (slot == SW'(SLOTS - 1)) begin
        dout       <= low ? est * $signed(OUT_W'(DS_N)) : acc + diff_x;
        low_info   <= low;
        dout_valid <= 1'b1;
        vco_on     <= 1'b1;
        low        <= 1'b0;
        slot       <= '0;
      end else begin
        slot <= slot + SW'(1);
      end
    end
  end

  initial begin
    assert (DS_N >= 2) else $error("pds_controller: DS_N must be at least 2");
  end
endmodule
