`timescale 1ps/1ps
// Dynamic sampling at other interval rates: the synthetic ECG beat of
// tb_ecg_workload (0.8 s, P / QRS / T as Gaussians, 3 mV of 60 Hz
// interference) is converted by two copies of ecg_adc_top at 1 kHz output,
// one with DS_N = 8 (16 kHz sampling clock, estimation over 1/8 of the
// period) and one with DS_N = 2 (4 kHz, estimation over 1/2 of the period).
// The default DS_N = 4 (8 kHz) is covered by tb_ecg_workload with a slope
// threshold of 4 counts. A count difference between two adjacent intervals
// grows with the square of the interval length, so the same signal slope
// gives a threshold of 4 * (4 / DS_N)^2: 1 count for DS_N = 8, 16 for DS_N = 2.
//
// Each copy has its own sampling clock. Its input is held constant over each
// interval, so every ideal interval count is exact:
// (f(vin_n) - f(vin_p)) * (T - 5 delay stages). Checks per result:
// full-resolution results within 4 counts of the sum of the 2*DS_N ideal
// interval counts; low-information results within 3*DS_N counts of
// DS_N x (first two interval counts); the low/high decision wherever the ideal
// slope is at least 3 counts from the threshold. Per copy the testbench
// reports PRD against the ideal full-resolution output and the fraction of
// time the oscillators ran. It requires both kinds of period to occur, PRD
// below 10 %, and the oscillators to run less with the shorter estimation
// (DS_N = 8) than with the longer one (DS_N = 2).
module tb_ecg_pds_rows;
  localparam int NCH = 8;
  localparam real F0 = 39.52e6, F1 = 26.99e6;
  localparam real TOFF_PS = 5.0 * 2840.0;
  localparam real PI = 3.14159265358979;
  localparam int NROW = 2;

  int  checks = 0, failures = 0;
  real prd [NROW];
  real on_frac [NROW];
  int  n_low [NROW];
  int  n_high [NROW];
  bit  done [NROW];

  function automatic real freq(input int uv);
    return F0 + (F1 - F0) * real'(uv) / 100000.0;
  endfunction

  function automatic int clip_uv(input real v);
    if (v < 0.0) return 0;
    if (v > 100000.0) return 100000;
    return int'(v);
  endfunction

  function automatic real gauss(input real t, input real mu, input real sigma);
    return $exp(-((t - mu) * (t - mu)) / (2.0 * sigma * sigma));
  endfunction

  function automatic real ecg_uv(input real t);
    real s;
    s =   8000.0 * gauss(t, 0.20, 0.025)
        - 6000.0 * gauss(t, 0.37, 0.008)
        + 60000.0 * gauss(t, 0.40, 0.010)
        - 12000.0 * gauss(t, 0.43, 0.008)
        + 16000.0 * gauss(t, 0.65, 0.040);
    return s + 3000.0 * $sin(2.0 * PI * 60.0 * t);
  endfunction

  task automatic check_near(input real got, input real exp_v, input real tol, input string what);
    checks++;
    if (got < exp_v - tol || got > exp_v + tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %f", what, int'(got), exp_v);
    end
  endtask

  for (genvar g = 0; g < NROW; g++) begin : g_row
    localparam int N = (g == 0) ? 8 : 2;
    localparam int SLOTS = 2 * N;
    localparam int OUT_W = 17 + 2 + $clog2(SLOTS);
    localparam real TP_PS = 1.0e9 / real'(SLOTS);
    localparam int THRESH = 64 / (N * N);

    logic clk_sp = 1'b0, rst_n = 1'b1, ds_en = 1'b1;
    logic [16:0] vin_p_uv [NCH];
    logic [16:0] vin_n_uv [NCH];
    logic signed [OUT_W-1:0] dout;
    logic dout_valid, dout_low_info, clk_out;
    logic [2:0] dout_ch;
    real e_int [int];
    int  edge_no = 0;
    bit  measuring = 1'b0;
    real err2 = 0.0, sig2 = 0.0;
    int  on_iv = 0, all_iv = 0;

    ecg_adc_top #(.DS_N(N)) dut (
      .clk_sp(clk_sp), .rst_n(rst_n), .multi_ch(1'b0), .ds_en(ds_en),
      .ds_threshold(17'(THRESH)), .vin_p_uv(vin_p_uv), .vin_n_uv(vin_n_uv),
      .dout(dout), .dout_valid(dout_valid), .dout_ch(dout_ch),
      .dout_low_info(dout_low_info), .clk_out(clk_out));

    task automatic edge_sp();
      clk_sp = 1'b1;
      e_int[edge_no] = (freq(int'(vin_n_uv[0])) - freq(int'(vin_p_uv[0]))) * (TP_PS - TOFF_PS) * 1.0e-12;
      edge_no++;
      #(TP_PS / 2.0) clk_sp = 1'b0;
      #(TP_PS / 2.0);
    endtask

    always @(negedge clk_out) begin
      if (measuring && dout_valid) begin
        real c0, c1, sum, slope;
        int j;
        j   = edge_no - 1;
        c0  = e_int[j - SLOTS];
        c1  = e_int[j - SLOTS + 1];
        sum = 0.0;
        for (int k = j - SLOTS; k < j; k++) sum += e_int[k];
        slope = c1 > c0 ? c1 - c0 : c0 - c1;
        if (slope < real'(THRESH) - 3.0 || slope > real'(THRESH) + 3.0) begin
          checks++;
          if (dout_low_info != (slope <= real'(THRESH))) begin
            failures++;
            $display("FAIL DS_N=%0d decision: low_info=%0b, slope %f", N, dout_low_info, slope);
          end
        end
        if (dout_low_info) begin
          check_near(real'(dout), real'(N) * (c0 + c1), 3.0 * real'(N),
                     $sformatf("DS_N=%0d low information", N));
          n_low[g]++;
          on_iv += 2;
        end else begin
          check_near(real'(dout), sum, 4.0, $sformatf("DS_N=%0d full resolution", N));
          n_high[g]++;
          on_iv += SLOTS;
        end
        all_iv += SLOTS;
        err2 += (real'(dout) - sum) * (real'(dout) - sum);
        sig2 += sum * sum;
      end
    end

    initial begin
      for (int c = 0; c < NCH; c++) begin
        vin_p_uv[c] = 17'(40000);
        vin_n_uv[c] = 17'(40000);
      end
      #1 rst_n = 1'b0;
      #1000 rst_n = 1'b1;
      #1000;
      repeat (2 * SLOTS) edge_sp();
      measuring = 1'b1;
      for (int i = 0; i < 800 * SLOTS; i++) begin
        real s;
        s = ecg_uv(real'(i) * TP_PS * 1.0e-12);
        vin_p_uv[0] = 17'(clip_uv(40000.0 + s / 2.0));
        vin_n_uv[0] = 17'(clip_uv(40000.0 - s / 2.0));
        edge_sp();
      end
      // the last result appears at the edge after the final interval
      vin_p_uv[0] = 17'(40000);
      vin_n_uv[0] = 17'(40000);
      edge_sp();
      measuring = 1'b0;
      prd[g] = sig2 > 0.0 ? 100.0 * $sqrt(err2 / sig2) : 100.0;
      on_frac[g] = all_iv > 0 ? real'(on_iv) / real'(all_iv) : 1.0;
      done[g] = 1'b1;
    end
  end

  initial begin
    #2s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NROW; g++) begin
      n_low[g] = 0; n_high[g] = 0; done[g] = 1'b0;
    end
    wait (done[0] && done[1]);
    $display("DS_N=8 (16 kHz): %0d low, %0d high, PRD %0.2f %%, oscillators on %0.1f %%",
             n_low[0], n_high[0], prd[0], 100.0 * on_frac[0]);
    $display("DS_N=2 (4 kHz):  %0d low, %0d high, PRD %0.2f %%, oscillators on %0.1f %%",
             n_low[1], n_high[1], prd[1], 100.0 * on_frac[1]);
    for (int g = 0; g < NROW; g++) begin
      checks++;
      if (n_low[g] == 0 || n_high[g] == 0 || n_low[g] + n_high[g] < 790 || prd[g] >= 10.0) begin
        failures++; $display("FAIL row %0d: results or PRD out of range", g);
      end
    end
    checks++;
    if (on_frac[0] >= on_frac[1]) begin
      failures++; $display("FAIL: DS_N=8 did not save more oscillator time than DS_N=2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
