`timescale 1ps/1ps
// Self-checking testbench for the ring VCO model: counts rising edges over a
// fixed window for several control voltages and compares them with the linear
// 39.52 MHz (0 V) .. 26.99 MHz (100 mV) characteristic; then checks that a
// stopped VCO produces no edges and that the phase is kept across a stop.
module tb_ring_vco;
  localparam real F0 = 39.52e6, F1 = 26.99e6;
  logic en = 1'b0;
  logic [16:0] v = '0;
  logic out;
  int edges = 0;
  int checks = 0, failures = 0;

  ring_vco dut (.en(en), .vctrl_uv(v), .vco_out(out));

  always @(posedge out) edges++;

  function automatic real freq(input int uv);
    return F0 + (F1 - F0) * real'(uv) / 100000.0;
  endfunction

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes [6] = '{0, 20000, 50000, 75000, 100000, 120000};
    for (int i = 0; i < 6; i++) begin
      real expect_n, f;
      int e0;
      v = 17'(codes[i]);
      en = 1'b1;
      #1000;
      e0 = edges;
      #10_000_000;          // 10 us window
      f = freq(codes[i] > 100000 ? 100000 : codes[i]);
      expect_n = f * 10.0e-6;
      checks++;
      if (real'(edges - e0) < expect_n - 1.0 || real'(edges - e0) > expect_n + 1.0) begin
        failures++;
        $display("FAIL v=%0d uV: %0d edges in 10 us, expected %f", codes[i], edges - e0, expect_n);
      end
    end
    // stopped: no edges
    begin
      int e0;
      en = 1'b0;
      e0 = edges;
      #2_000_000;
      checks++;
      if (edges != e0) begin failures++; $display("FAIL: edges while disabled"); end
    end
    // phase memory: 40 short bursts of 1/4 half period must add up
    begin
      real half;
      int e0;
      v = '0;
      half = 0.5e12 / F0;
      e0 = edges;
      for (int k = 0; k < 400; k++) begin
        en = 1'b1; #(half / 4.0);
        en = 1'b0; #1000;
      end
      // 400 quarter half-periods = 50 periods
      checks++;
      if (edges - e0 < 49 || edges - e0 > 51) begin
        failures++; $display("FAIL phase memory: %0d edges, expected 50", edges - e0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
