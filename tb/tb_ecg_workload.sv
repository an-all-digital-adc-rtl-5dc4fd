`timescale 1ps/1ps
// Workload testbench of ecg_adc_top at its default parameters: the converter
// is fed the kinds of signal it is meant for, and every result is compared
// with the ideal count.
//
//   1  150 Hz sine, full scale (0..100 mV), the two inputs in opposite phase,
//      single-channel mode at 1 kHz output, dynamic sampling off.
//   2  The same sine on all 8 channels (a different phase on each), in
//      multi-channel mode at 10 kHz.
//   3  One synthetic ECG beat (0.8 s, 75 beats/min: P wave, QRS complex,
//      T wave, each shaped as a Gaussian) with 60 Hz power-line interference,
//      single-channel mode with dynamic sampling on (N = 4).
//
// The inputs are held constant over each sampling interval and change at
// the sampling edges, when the oscillators are stopped. That makes the ideal
// count of every interval exact: (f(vin_n) - f(vin_p)) * (T - 5 delay stages),
// with f falling linearly from 39.52 MHz at 0 V to 26.99 MHz at 100 mV.
// Full-resolution results must lie within 4 counts of the sum of their 8
// ideal interval counts. Channel results must lie within 2 counts of their
// interval. Low-information results must lie within 12 counts of 4 x (the
// first two interval counts). The low/high decision is checked wherever the
// ideal slope is at least 3 counts away from the threshold.
//
// For the ECG it reports the distortion of the dynamic-sampling output
// against the ideal full-resolution output,
// PRD = 100 * sqrt(sum (x - y)^2 / sum x^2), and the fraction of time the
// oscillators ran. It requires PRD below 5 % with the oscillators off for
// part of the beat. The waveform and the 5 % limit are this testbench's
// choice of a typical case.
module tb_ecg_workload;
  localparam int NCH = 8;
  localparam real F0 = 39.52e6, F1 = 26.99e6;
  localparam real TOFF_PS = 5.0 * 2840.0;
  localparam real PI = 3.14159265358979;
  localparam int THRESH = 4;

  logic clk_sp = 1'b0, rst_n = 1'b1, multi_ch = 1'b0, ds_en = 1'b0;
  logic [16:0] ds_threshold = 17'(THRESH);
  logic [16:0] vin_p_uv [NCH];
  logic [16:0] vin_n_uv [NCH];
  logic signed [21:0] dout;
  logic dout_valid, dout_low_info, clk_out;
  logic [2:0] dout_ch;

  int checks = 0, failures = 0;
  int n_sine = 0, n_mc = 0, n_low = 0, n_high = 0;
  real t_ps = 125.0e6;            // current sampling period
  real t_now = 0.0;               // signal time in seconds at the current edge
  real e_int [int];               // expected count of interval j, channel 0
  real e_mc  [int];               // expected count of interval j, channel c: key j*NCH+c
  int  edge_no = 0;
  int  mc_start = 1 << 30;
  bit  ecg_phase = 1'b0;
  real err2 = 0.0, sig2 = 0.0;
  int  ecg_results = 0, ecg_on_intervals = 0, ecg_intervals = 0;

  ecg_adc_top dut (
    .clk_sp(clk_sp), .rst_n(rst_n), .multi_ch(multi_ch), .ds_en(ds_en),
    .ds_threshold(ds_threshold), .vin_p_uv(vin_p_uv), .vin_n_uv(vin_n_uv),
    .dout(dout), .dout_valid(dout_valid), .dout_ch(dout_ch),
    .dout_low_info(dout_low_info), .clk_out(clk_out));

  function automatic real freq(input int uv);
    return F0 + (F1 - F0) * real'(uv) / 100000.0;
  endfunction

  function automatic real expect_diff(input int vp, input int vn);
    return (freq(vn) - freq(vp)) * (t_ps - TOFF_PS) * 1.0e-12;
  endfunction

  function automatic int clip_uv(input real v);
    if (v < 0.0) return 0;
    if (v > 100000.0) return 100000;
    return int'(v);
  endfunction

  function automatic real gauss(input real t, input real mu, input real sigma);
    return $exp(-((t - mu) * (t - mu)) / (2.0 * sigma * sigma));
  endfunction

  // Differential ECG in microvolts at the converter input, one beat of 0.8 s,
  // plus 60 Hz interference.
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

  // One sampling edge: record the expected counts of the interval it starts,
  // then run the interval.
  task automatic edge_sp();
    clk_sp = 1'b1;
    e_int[edge_no] = expect_diff(int'(vin_p_uv[0]), int'(vin_n_uv[0]));
    for (int c = 0; c < NCH; c++)
      e_mc[edge_no * NCH + c] = expect_diff(int'(vin_p_uv[c]), int'(vin_n_uv[c]));
    edge_no++;
    #(t_ps / 2.0) clk_sp = 1'b0;
    #(t_ps / 2.0);
    t_now += t_ps * 1.0e-12;
  endtask

  // Single-channel results (sine and ECG): checked after the result edge.
  // The result after edge j covers intervals j-8 .. j-1.
  always @(negedge clk_out) begin
    if (!multi_ch && rst_n && dout_valid && edge_no > 16) begin
      real c0, c1, sum, slope;
      bit low;
      int j;
      j   = edge_no - 1;
      c0  = e_int[j - 8];
      c1  = e_int[j - 7];
      sum = 0.0;
      for (int k = j - 8; k < j; k++) sum += e_int[k];
      if (!ds_en) begin
        check_near(real'(dout), sum, 4.0, "sine, full resolution");
        n_sine++;
      end else begin
        slope = c1 > c0 ? c1 - c0 : c0 - c1;
        low = slope <= real'(THRESH);
        if (slope < real'(THRESH) - 3.0 || slope > real'(THRESH) + 3.0) begin
          checks++;
          if (dout_low_info != low) begin
            failures++;
            $display("FAIL ECG decision: low_info=%0b, slope %f", dout_low_info, slope);
          end
        end
        if (dout_low_info) begin
          check_near(real'(dout), 4.0 * (c0 + c1), 12.0, "ECG, low information");
          n_low++;
          ecg_on_intervals += 2;
        end else begin
          check_near(real'(dout), sum, 4.0, "ECG, full resolution");
          n_high++;
          ecg_on_intervals += 8;
        end
        ecg_intervals += 8;
        err2 += (real'(dout) - sum) * (real'(dout) - sum);
        sig2 += sum * sum;
        ecg_results++;
      end
    end
  end

  // Multi-channel results: the result after edge j covers interval j-1.
  int last_ch = -1;
  always @(negedge clk_out) begin
    if (multi_ch && dout_valid && edge_no > 12 + mc_start) begin
      check_near(real'(dout), e_mc[(edge_no - 2) * NCH + int'(dout_ch)], 2.0,
                 $sformatf("sine, channel %0d", dout_ch));
      checks++;
      if (last_ch >= 0 && int'(dout_ch) != (last_ch + 1) % NCH) begin
        failures++; $display("FAIL channel order: %0d after %0d", dout_ch, last_ch);
      end
      last_ch = int'(dout_ch);
      n_mc++;
    end
  end

  initial begin
    #2s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real prd, on_frac;
    for (int c = 0; c < NCH; c++) begin
      vin_p_uv[c] = 17'(50000);
      vin_n_uv[c] = 17'(50000);
    end
    #1 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    #1000;

    // 1: 150 Hz opposite-phase sine, single channel, 1 kHz output, 30 ms
    t_now = 0.0;
    repeat (8 * 30) begin
      real s;
      s = 50000.0 * $sin(2.0 * PI * 150.0 * t_now);
      vin_p_uv[0] = 17'(clip_uv(50000.0 + s));
      vin_n_uv[0] = 17'(clip_uv(50000.0 - s));
      edge_sp();
    end

    // 2: the same sine on 8 channels, 10 kHz, 20 ms
    t_ps = 100.0e6;
    multi_ch = 1'b1;
    mc_start = edge_no;
    repeat (10 * 20) begin
      for (int c = 0; c < NCH; c++) begin
        real s;
        s = 50000.0 * $sin(2.0 * PI * 150.0 * t_now + PI * real'(c) / 4.0);
        vin_p_uv[c] = 17'(clip_uv(50000.0 + s));
        vin_n_uv[c] = 17'(clip_uv(50000.0 - s));
      end
      edge_sp();
    end

    // 3: one ECG beat with 60 Hz interference, dynamic sampling on
    t_ps = 125.0e6;
    multi_ch = 1'b0;
    ds_en = 1'b1;
    for (int c = 0; c < NCH; c++) begin
      vin_p_uv[c] = 17'(50000);
      vin_n_uv[c] = 17'(50000);
    end
    repeat (16) edge_sp();        // let the period in progress finish
    t_now = 0.0;
    err2 = 0.0; sig2 = 0.0;
    ecg_results = 0; ecg_on_intervals = 0; ecg_intervals = 0;
    n_low = 0; n_high = 0;
    repeat (8 * 800) begin
      real s;
      s = ecg_uv(t_now);
      vin_p_uv[0] = 17'(clip_uv(40000.0 + s / 2.0));
      vin_n_uv[0] = 17'(clip_uv(40000.0 - s / 2.0));
      edge_sp();
    end

    prd = sig2 > 0.0 ? 100.0 * $sqrt(err2 / sig2) : 100.0;
    on_frac = ecg_intervals > 0 ? real'(ecg_on_intervals) / real'(ecg_intervals) : 1.0;
    $display("sine results %0d (single channel), %0d (8 channels)", n_sine, n_mc);
    $display("ECG: %0d results, %0d low-information, %0d high-information", ecg_results, n_low, n_high);
    $display("ECG: PRD %0.2f %%, oscillators on %0.1f %% of the time", prd, 100.0 * on_frac);
    checks++;
    if (n_sine < 20 || n_mc < 100 || n_low == 0 || n_high == 0) begin
      failures++; $display("FAIL: a workload produced too few results");
    end
    checks++;
    if (prd >= 5.0 || on_frac >= 1.0) begin
      failures++; $display("FAIL: ECG PRD %f %% or oscillator use %f", prd, on_frac);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
