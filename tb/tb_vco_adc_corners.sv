`timescale 1ps/1ps
// The converter core at every delay-line corner: five copies of vco_adc run
// side by side at 8 kHz sampling, each with the rise / fall stage delays of
// one corner (TT-25 2.84 / 3.03 ns, SS-0 5.10 / 5.84, SS-45 5.00 / 5.60,
// FF-0 1.85 / 1.92, FF-45 1.95 / 2.03). The sampling sequence is built from
// these delays, so the stop time of the oscillators (5 stages) and the result
// latency (3 stages) move with the corner.
//
// For three differential inputs, each copy's counts are checked over four
// intervals: cnt_p + 1 and cnt_n + 1 within 1.25 edges of f * (T - 5 * Tdr),
// diff within 2 counts of the difference, the result register clocked exactly
// 3 * Tdr after the sampling edge, and the delayed sample always settled
// (took_sp low). f falls linearly from 39.52 MHz at 0 V to 26.99 MHz at 100 mV.
// A count can be either neighbour of the ideal value; the extra quarter edge
// covers the oscillator model, which rounds each half period to a whole
// picosecond and so runs up to 4e-5 off its nominal rate (0.2 counts per
// interval).
module tb_vco_adc_corners;
  localparam int W = 17;
  localparam int NC = 5;
  localparam real F0 = 39.52e6, F1 = 26.99e6;
  localparam real T_PS = 125.0e6;
  localparam int TDR [NC] = '{2840, 5100, 5000, 1850, 1950};
  localparam int TDF [NC] = '{3030, 5840, 5600, 1920, 2030};

  int  checks = 0, failures = 0;
  bit  done [NC];

  function automatic real freq(input int uv);
    return F0 + (F1 - F0) * real'(uv) / 100000.0;
  endfunction

  function automatic bit near(input real got, input real exp_v, input real tol);
    return (got >= exp_v - tol) && (got <= exp_v + tol);
  endfunction

  for (genvar g = 0; g < NC; g++) begin : g_corner
    logic clk = 1'b0, rst_n = 1'b1;
    logic [16:0] vin_p = 17'(50000), vin_n = 17'(50000);
    logic signed [W:0] diff, cnt_p, cnt_n;
    logic took_sp, clk_res, clk_ctl;
    realtime t_edge;

    vco_adc #(.TDR_PS(TDR[g]), .TDF_PS(TDF[g])) dut (
      .clk(clk), .rst_n(rst_n), .vco_on(1'b1), .vin_p_uv(vin_p), .vin_n_uv(vin_n),
      .diff(diff), .cnt_p(cnt_p), .cnt_n(cnt_n), .took_sp(took_sp),
      .clk_res(clk_res), .clk_ctl(clk_ctl));

    task automatic interval();
      #(T_PS / 2.0) clk = 1'b1;
      t_edge = $realtime;
      @(posedge clk_res);
      checks++;
      if ($realtime - t_edge != 3.0 * real'(TDR[g])) begin
        failures++; $display("FAIL corner %0d: result latency %0t", g, $realtime - t_edge);
      end
      #(T_PS / 2.0 - ($realtime - t_edge)) clk = 1'b0;
    endtask

    initial begin
      static int vp [3] = '{70000, 20000, 100000};
      static int vn [3] = '{30000, 90000, 0};
      #1 rst_n = 1'b0;
      #1000 rst_n = 1'b1;
      interval();
      for (int c = 0; c < 3; c++) begin
        real fp, fn, teff;
        vin_p = 17'(vp[c]); vin_n = 17'(vn[c]);
        interval();
        fp = freq(vp[c]); fn = freq(vn[c]);
        teff = (T_PS - 5.0 * real'(TDR[g])) * 1.0e-12;
        for (int k = 0; k < 4; k++) begin
          interval();
          checks += 4;
          if (!near(real'(cnt_p) + 1.0, fp * teff, 1.25)) begin
            failures++; $display("FAIL corner %0d: cnt_p=%0d expected %f", g, cnt_p + 1, fp * teff);
          end
          if (!near(real'(cnt_n) + 1.0, fn * teff, 1.25)) begin
            failures++; $display("FAIL corner %0d: cnt_n=%0d expected %f", g, cnt_n + 1, fn * teff);
          end
          if (!near(real'(diff), (fn - fp) * teff, 2.0)) begin
            failures++; $display("FAIL corner %0d: diff=%0d expected %f", g, diff, (fn - fp) * teff);
          end
          if (took_sp) begin
            failures++; $display("FAIL corner %0d: counter not settled at the delayed sample", g);
          end
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NC; g++) done[g] = 1'b0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
