`timescale 1ps/1ps
// Multi-channel sequencer.
//
// In multi-channel mode the converter runs at NCH+REST times the per-channel
// rate (10 kHz for 8 channels at 1 kHz each). A frame has NCH + REST slots of
// one sampling-clock interval: in slot k < NCH the input multiplexer selects
// channel k and the VCOs run; in the REST idle slots the VCOs are off, which
// saves their power. The count of each channel slot is passed out tagged with
// its channel number. The 8 + 2 frame follows the design; the slot bookkeeping
// is this implementation's.
//
// Timing: clocked by the converter's control clock (shortly after each
// sampling edge, when `diff` holds the count of the interval that just ended).
// sel and vco_on are decoded from the slot register and so change on that
// edge, before the VCOs restart for the next interval. dout_valid is high for
// one clock after each channel slot.
module channel_sequencer #(
  parameter int unsigned NCH   = adc_pkg::NCH,
  parameter int unsigned REST  = adc_pkg::REST,
  parameter int unsigned CNT_W = adc_pkg::CNT_W,
  parameter int unsigned CHW   = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    active,     // multi-channel mode selected
  input  logic signed [CNT_W:0]   diff,       // count of the interval just ended
  output logic        [CHW-1:0]   sel,        // channel converted in the next interval
  output logic                    vco_on,     // VCOs run in the next interval
  output logic signed [CNT_W:0]   dout,
  output logic        [CHW-1:0]   dout_ch,
  output logic                    dout_valid,
  output logic                    rest_slot   // the interval that just ended was idle
);
  localparam int unsigned FRAME = NCH + REST;
  localparam int unsigned SW    = (FRAME > 1) ? $clog2(FRAME) : 1;

  logic [SW-1:0] slot;   // slot of the interval now being converted

  always_comb begin
    vco_on = active && (slot < SW'(NCH));
    sel    = (slot < SW'(NCH)) ? CHW'(slot) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot       <= '0;
      dout       <= '0;
      dout_ch    <= '0;
      dout_valid <= 1'b0;
      rest_slot  <= 1'b0;
    end else if (!active) begin
      slot       <= '0;
      dout_valid <= 1'b0;
      rest_slot  <= 1'b0;
    end else begin
      dout_valid <= (slot < SW'(NCH));
      rest_slot  <= (slot >= SW'(NCH));
      if (slot < SW'(NCH)) begin
        dout    <= diff;
        dout_ch <= CHW'(slot);
      end
      slot <= (slot == SW'(FRAME - 1)) ? '0 : slot + SW'(1);
    end
  end
endmodule
