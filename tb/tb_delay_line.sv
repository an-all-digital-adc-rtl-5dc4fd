`timescale 1ps/1ps
// Self-checking testbench for delay_line: each tap k must rise k*TDR_PS after
// the input rises and fall k*TDF_PS after it falls.
module tb_delay_line;
  localparam int TAPS = 5, TDR = 2840, TDF = 3030;
  logic clk_in = 1'b0;
  logic [TAPS:1] tap;
  realtime t_rise_in, t_fall_in;
  realtime t_rise [TAPS:1];
  realtime t_fall [TAPS:1];
  int checks = 0, failures = 0;

  delay_line #(.TAPS(TAPS), .TDR_PS(TDR), .TDF_PS(TDF)) dut (.clk_in(clk_in), .tap(tap));

  for (genvar k = 1; k <= TAPS; k++) begin : g_mon
    always @(posedge tap[k]) t_rise[k] = $realtime;
    always @(negedge tap[k]) t_fall[k] = $realtime;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000;
    for (int r = 0; r < 4; r++) begin
      t_rise_in = $realtime; clk_in = 1'b1;
      #100_000;
      t_fall_in = $realtime; clk_in = 1'b0;
      #100_000;
      for (int k = 1; k <= TAPS; k++) begin
        checks += 2;
        if (t_rise[k] - t_rise_in != k * TDR) begin
          failures++; $display("FAIL tap %0d rise delay %0t", k, t_rise[k] - t_rise_in);
        end
        if (t_fall[k] - t_fall_in != k * TDF) begin
          failures++; $display("FAIL tap %0d fall delay %0t", k, t_fall[k] - t_fall_in);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
