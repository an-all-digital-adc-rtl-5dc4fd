`timescale 1ps/1ps
// Self-checking testbench for channel_sequencer: over several frames, checks
// the select and VCO enable of every slot, that each channel slot's count is
// passed out with its channel number, and that the two rest slots produce no
// output and keep the VCOs off.
module tb_channel_sequencer;
  localparam int NCH = 8, REST = 2, W = 17;
  logic clk = 1'b0, rst_n = 1'b1, active = 1'b0;
  logic signed [W:0] diff = '0, dout;
  logic [2:0] sel, dout_ch;
  logic vco_on, dout_valid, rest_slot;
  int checks = 0, failures = 0, rests = 0;

  channel_sequencer #(.NCH(NCH), .REST(REST), .CNT_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .active(active), .diff(diff), .sel(sel), .vco_on(vco_on),
    .dout(dout), .dout_ch(dout_ch), .dout_valid(dout_valid), .rest_slot(rest_slot));

  task automatic tick();
    #5 clk = 1'b1; #5 clk = 1'b0;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #9 rst_n = 1'b1;
    checks++;
    if (vco_on) begin failures++; $display("FAIL: VCO on while inactive"); end
    active = 1'b1;
    #1;
    for (int f = 0; f < 4; f++) begin
      for (int s = 0; s < NCH + REST; s++) begin
        int v;
        // before the edge: slot s is being converted
        checks++;
        if (s < NCH) begin
          if (!vco_on || sel != 3'(s)) begin
            failures++; $display("FAIL frame %0d slot %0d: vco_on=%0b sel=%0d", f, s, vco_on, sel);
          end
        end else if (vco_on) begin
          failures++; $display("FAIL frame %0d rest slot %0d: VCO on", f, s);
        end
        v = int'($urandom_range(4000)) - 2000;
        diff = (W+1)'(v);
        tick();
        checks++;
        if (s < NCH) begin
          if (!dout_valid || int'(dout) != v || dout_ch != 3'(s)) begin
            failures++;
            $display("FAIL frame %0d slot %0d: valid=%0b dout=%0d ch=%0d", f, s, dout_valid, int'(dout), dout_ch);
          end
        end else begin
          if (dout_valid || !rest_slot) begin failures++; $display("FAIL rest slot %0d produced output", s); end
          rests++;
        end
      end
    end
    checks++;
    if (rests != 4 * REST) begin failures++; $display("FAIL rest count %0d", rests); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
