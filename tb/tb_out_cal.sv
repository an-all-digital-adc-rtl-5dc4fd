`timescale 1ps/1ps
// Self-checking testbench for out_cal: registered difference cnt_n - cnt_p.
module tb_out_cal;
  localparam int W = 17;
  logic clk = 1'b0, rst_n = 1'b1;
  logic signed [W:0] cnt_p = '0, cnt_n = '0, diff;
  int checks = 0, failures = 0;
  int prev = 0;

  out_cal #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .cnt_p(cnt_p), .cnt_n(cnt_n), .diff(diff));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #4;
    checks++;
    if (diff !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      int a, b;
      a = int'($urandom_range(70000)) - 1;
      b = int'($urandom_range(70000)) - 1;
      cnt_p = (W+1)'(a); cnt_n = (W+1)'(b);
      #5;
      checks++;
      // registered: the output still holds the previous result
      if (int'(diff) != prev) begin failures++; $display("FAIL: output changed before the clock"); end
      checks++;
      clk = 1'b1; #5 clk = 1'b0;
      if (int'(diff) != b - a) begin
        failures++; $display("FAIL: %0d - %0d = %0d", b, a, int'(diff));
      end
      prev = b - a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
