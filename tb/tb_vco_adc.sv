`timescale 1ps/1ps
// Self-checking testbench for vco_adc at 8 kHz sampling (125 us intervals).
// For several constant differential inputs, each interval's counts are checked
// against the VCO characteristic: a VCO at f counts f*(T - Toff) edges, where
// Toff = 5 delay stages is the DISABLE window, and the value determination
// returns one less. The running sum of counts over many intervals must stay
// within one edge of the ideal (the phase residue is carried over), the result
// must appear 3 delay stages after the sampling edge, and with vco_on low the
// counts must stop.
module tb_vco_adc;
  localparam int W = 17;
  localparam real F0 = 39.52e6, F1 = 26.99e6;
  localparam real T_PS = 125.0e6;             // 8 kHz
  localparam real TOFF_PS = 5.0 * 2840.0;
  logic clk = 1'b0, rst_n = 1'b1, vco_on = 1'b1;
  logic [16:0] vin_p = '0, vin_n = '0;
  logic signed [W:0] diff, cnt_p, cnt_n;
  logic took_sp, clk_res, clk_ctl;
  realtime t_edge;
  int checks = 0, failures = 0;

  vco_adc dut (.clk(clk), .rst_n(rst_n), .vco_on(vco_on), .vin_p_uv(vin_p), .vin_n_uv(vin_n),
               .diff(diff), .cnt_p(cnt_p), .cnt_n(cnt_n), .took_sp(took_sp),
               .clk_res(clk_res), .clk_ctl(clk_ctl));

  function automatic real freq(input int uv);
    return F0 + (F1 - F0) * real'(uv) / 100000.0;
  endfunction

  // one sampling interval: rising edge, then wait for the result register
  task automatic interval();
    #(T_PS / 2.0) clk = 1'b1;
    t_edge = $realtime;
    @(posedge clk_res);
    checks++;
    if ($realtime - t_edge != 3.0 * 2840.0) begin
      failures++; $display("FAIL result latency %0t", $realtime - t_edge);
    end
    #(T_PS / 2.0 - ($realtime - t_edge)) clk = 1'b0;
  endtask

  function automatic bit near(input real got, input real exp_v, input real tol);
    return (got >= exp_v - tol) && (got <= exp_v + tol);
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vp [5] = '{50000, 60000, 40000, 100000, 0};
    int vn [5] = '{50000, 40000, 60000, 0, 100000};
    #1 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    interval();                                  // first interval is partial
    for (int c = 0; c < 5; c++) begin
      real fp, fn, teff, sum_p, sum_n, ideal_p, ideal_n;
      vin_p = 17'(vp[c]); vin_n = 17'(vn[c]);
      interval();                                // settle on the new input
      fp = freq(vp[c]); fn = freq(vn[c]);
      teff = (T_PS - TOFF_PS) * 1.0e-12;
      sum_p = 0; sum_n = 0;
      for (int k = 0; k < 4; k++) begin
        interval();
        sum_p += real'(cnt_p) + 1.0;
        sum_n += real'(cnt_n) + 1.0;
        checks += 3;
        if (!near(real'(cnt_p) + 1.0, fp * teff, 1.0)) begin
          failures++; $display("FAIL cnt_p=%0d expected %f", cnt_p + 1, fp * teff);
        end
        if (!near(real'(cnt_n) + 1.0, fn * teff, 1.0)) begin
          failures++; $display("FAIL cnt_n=%0d expected %f", cnt_n + 1, fn * teff);
        end
        if (!near(real'(diff), (fn - fp) * teff, 2.0)) begin
          failures++; $display("FAIL diff=%0d expected %f (vp=%0d vn=%0d)", diff, (fn - fp) * teff, vp[c], vn[c]);
        end
        checks++;
        if (took_sp) begin failures++; $display("FAIL: counter not settled at the delayed sample"); end
      end
      // carried phase: the 4-interval sums are within about one edge of ideal
      ideal_p = fp * teff * 4.0; ideal_n = fn * teff * 4.0;
      checks += 2;
      if (!near(sum_p, ideal_p, 1.5)) begin failures++; $display("FAIL sum_p=%f ideal %f", sum_p, ideal_p); end
      if (!near(sum_n, ideal_n, 1.5)) begin failures++; $display("FAIL sum_n=%f ideal %f", sum_n, ideal_n); end
    end
    // VCOs off: no counts
    vco_on = 1'b0;
    interval();
    interval();
    checks++;
    if (diff != 0 || cnt_p != -1 || cnt_n != -1) begin
      failures++; $display("FAIL VCO off: diff=%0d cnt_p=%0d cnt_n=%0d", diff, cnt_p, cnt_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
