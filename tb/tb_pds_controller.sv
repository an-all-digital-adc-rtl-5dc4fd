`timescale 1ps/1ps
// Self-checking testbench for pds_controller (DS_N = 4, 8 intervals per
// output). Feeds interval counts period by period and checks against a model
// written here: the slope |OUT2 - OUT1| of the first two intervals against the
// threshold, the VCO enable over the rest of the period, and the output
// (full sum, or estimation-region sum times 4 for low-information periods).
module tb_pds_controller;
  localparam int N = 4, W = 17, SLOTS = 2 * N;
  localparam int OUT_W = W + 2 + $clog2(SLOTS);
  logic clk = 1'b0, rst_n = 1'b1, active = 1'b1, ds_en = 1'b1;
  logic [W-1:0] threshold = 17'd20;
  logic signed [W:0] diff = '0;
  logic vco_on, dout_valid, low_info;
  logic signed [OUT_W-1:0] dout;
  int checks = 0, failures = 0, n_low = 0, n_high = 0;

  pds_controller #(.DS_N(N), .CNT_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .active(active), .ds_en(ds_en), .threshold(threshold),
    .diff(diff), .vco_on(vco_on), .dout(dout), .dout_valid(dout_valid), .low_info(low_info));

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
    for (int p = 0; p < 200; p++) begin
      int d [SLOTS];
      int slope, sum, expect_out;
      bit low;
      if (p == 150) ds_en = 1'b0;            // dynamic sampling switched off
      threshold = 17'($urandom_range(60));
      d[0] = int'($urandom_range(2000)) - 1000;
      d[1] = d[0] + int'($urandom_range(100)) - 50;
      slope = (d[1] > d[0]) ? d[1] - d[0] : d[0] - d[1];
      low = ds_en && (slope <= int'(threshold));
      for (int s = 2; s < SLOTS; s++) d[s] = low ? 0 : int'($urandom_range(2000)) - 1000;
      sum = 0;
      for (int s = 0; s < SLOTS; s++) sum += d[s];
      expect_out = low ? (d[0] + d[1]) * N : sum;
      for (int s = 0; s < SLOTS; s++) begin
        diff = (W+1)'(d[s]);
        tick();
        if (s == 1) begin
          checks++;
          if (vco_on != !low) begin
            failures++; $display("FAIL period %0d: vco_on=%0b after estimation, slope=%0d th=%0d", p, vco_on, slope, threshold);
          end
        end
        if (s >= 2 && s < SLOTS - 1 && vco_on != !low) begin
          checks++; failures++; $display("FAIL period %0d slot %0d: vco_on changed", p, s);
        end
        if (s < SLOTS - 1 && dout_valid) begin
          checks++; failures++; $display("FAIL period %0d: early dout_valid", p);
        end
      end
      checks++;
      if (!dout_valid || int'(dout) != expect_out || low_info != low || !vco_on) begin
        failures++;
        $display("FAIL period %0d: valid=%0b dout=%0d expected %0d low=%0b/%0b vco_on=%0b",
                 p, dout_valid, int'(dout), expect_out, low_info, low, vco_on);
      end
      if (low) n_low++; else n_high++;
    end
    checks++;
    if (n_low == 0 || n_high == 0) begin failures++; $display("FAIL: only one decision seen"); end
    $display("low-information periods %0d, high-information periods %0d", n_low, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
