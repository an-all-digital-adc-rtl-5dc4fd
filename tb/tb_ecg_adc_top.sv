`timescale 1ps/1ps
// End-to-end testbench of ecg_adc_top at its default parameters (8 channels,
// 17-bit counters, DS_N = 4).
//
// Single-channel mode, 8 kHz sampling clock (1 kHz output):
//   A  constant input, dynamic sampling on  -> low-information periods,
//      output = 4 x (first two interval counts)
//   B  triangle input, dynamic sampling on  -> high-information periods,
//      output = sum of the 8 interval counts
//   C  constant input, dynamic sampling off -> full-resolution periods
// Multi-channel mode, 10 kHz sampling clock:
//   D  8 channels with different inputs; each frame gives 8 tagged results
//      followed by 2 idle slots.
// Expected values come from the VCO characteristic (39.52 MHz at 0 V to
// 26.99 MHz at 100 mV, linear): an interval of length T converts
// (f(vin_n) - f(vin_p)) * (T - 5 delay stages) counts. Every mechanism
// (low / high information, dynamic sampling off, channel results, rest slots,
// mode switch) is counted and must occur.
module tb_ecg_adc_top;
  localparam int NCH = 8;
  localparam real F0 = 39.52e6, F1 = 26.99e6;
  localparam real TOFF_PS = 5.0 * 2840.0;
  localparam int THRESH = 12;

  logic clk_sp = 1'b0, rst_n = 1'b1, multi_ch = 1'b0, ds_en = 1'b1;
  logic [16:0] ds_threshold = 17'(THRESH);
  logic [16:0] vin_p_uv [NCH];
  logic [16:0] vin_n_uv [NCH];
  logic signed [21:0] dout;
  logic dout_valid, dout_low_info, clk_out;
  logic [2:0] dout_ch;

  int checks = 0, failures = 0;
  int n_low = 0, n_high = 0, n_ds_off = 0, n_ch = 0, n_rest = 0, n_switch = 0;
  real t_ps = 125.0e6;            // current sampling period
  real e_int [int];               // expected count of interval j (started by edge j)
  int  edge_no = 0;

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

  // One sampling edge: record the expected count of the interval it starts
  // (channel 0 in single mode), then run the interval.
  task automatic edge_sp();
    clk_sp = 1'b1;
    e_int[edge_no] = expect_diff(int'(vin_p_uv[0]), int'(vin_n_uv[0]));
    edge_no++;
    #(t_ps / 2.0) clk_sp = 1'b0;
    #(t_ps / 2.0);
  endtask

  task automatic check_near(input real got, input real exp_v, input real tol, input string what);
    checks++;
    if (got < exp_v - tol || got > exp_v + tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %f", what, int'(got), exp_v);
    end
  endtask

  // Single-mode results: checked mid-interval, after the result edge.
  // The valid result after edge j covers intervals j-8 .. j-1.
  always @(negedge clk_out) begin
    if (!multi_ch && rst_n && dout_valid && edge_no > 16) begin
      real c0, c1, sum;
      bit low;
      int j;
      j   = edge_no - 1;      // last edge seen: ended interval j-1
      c0  = e_int[j - 8];
      c1  = e_int[j - 7];
      sum = 0.0;
      for (int k = j - 8; k < j; k++) sum += e_int[k];
      low = ds_en && ((c1 > c0 ? c1 - c0 : c0 - c1) <= real'(THRESH) - 4.0);
      checks++;
      if (dout_low_info != low) begin
        failures++;
        $display("FAIL decision: low_info=%0b expected %0b (slope %f)", dout_low_info, low, c1 - c0);
      end
      if (low) begin
        check_near(real'(dout), 4.0 * (c0 + c1), 12.0, "low-information output");
        n_low++;
      end else begin
        check_near(real'(dout), sum, 4.0, "full-resolution output");
        if (ds_en) n_high++; else n_ds_off++;
      end
    end
  end

  // Multi-channel results.
  int last_ch = -1;            // -1 until the first checked result
  int mc_start = 1 << 30;      // edge at which multi-channel mode began
  always @(negedge clk_out) begin
    if (multi_ch && edge_no > 12 + mc_start) begin
      if (dout_valid) begin
        check_near(real'(dout), expect_diff(int'(vin_p_uv[dout_ch]), int'(vin_n_uv[dout_ch])),
                   2.0, $sformatf("channel %0d", dout_ch));
        checks++;
        if (last_ch >= 0 && int'(dout_ch) != (last_ch + 1) % NCH) begin
          failures++; $display("FAIL channel order: %0d after %0d", dout_ch, last_ch);
        end
        last_ch = int'(dout_ch);
        n_ch++;
      end else begin
        checks++;
        if (last_ch >= 0 && last_ch != NCH - 1) begin failures++; $display("FAIL idle slot after channel %0d", last_ch); end
        n_rest++;
      end
    end
  end
  initial begin
    #60ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin
      vin_p_uv[c] = 17'(50000);
      vin_n_uv[c] = 17'(50000);
    end
    #1 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    #1000;

    // A: constant input, dynamic sampling on
    vin_p_uv[0] = 17'(62000); vin_n_uv[0] = 17'(41000);
    repeat (8 * 8) edge_sp();

    // B: triangle input, dynamic sampling on
    begin
      int v = 62000, step = 3000;
      repeat (8 * 8) begin
        vin_p_uv[0] = 17'(v);
        edge_sp();
        if (v + step > 95000 || v + step < 5000) step = -step;
        v += step;
      end
    end

    // C: constant input, dynamic sampling off
    vin_p_uv[0] = 17'(30000); vin_n_uv[0] = 17'(70000);
    ds_en = 1'b0;
    repeat (8 * 6) edge_sp();

    // D: multi-channel mode at 10 kHz
    for (int c = 0; c < NCH; c++) begin
      vin_p_uv[c] = 17'(10000 + 10000 * c);
      vin_n_uv[c] = 17'(90000 - 9000 * c);
    end
    t_ps = 100.0e6;
    multi_ch = 1'b1;
    n_switch++;
    mc_start = edge_no;
    repeat (10 * 5) edge_sp();

    $display("low-information periods %0d, high-information periods %0d, dynamic sampling off %0d",
             n_low, n_high, n_ds_off);
    $display("channel results %0d, idle slots %0d, mode switches %0d", n_ch, n_rest, n_switch);
    checks++;
    if (n_low == 0 || n_high == 0 || n_ds_off == 0 || n_ch == 0 || n_rest == 0 || n_switch == 0) begin
      failures++; $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
