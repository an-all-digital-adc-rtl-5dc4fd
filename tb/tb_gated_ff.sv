`timescale 1ps/1ps
// Self-checking testbench for gated_ff: q must take d only where the enable
// window is open at the clock edge, and zero where it is closed.
module tb_gated_ff;
  localparam int W = 17;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  gated_ff #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #2;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: q=%0h", q); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] dv;
      logic ev;
      dv = W'($urandom);
      ev = 1'($urandom_range(1));
      #10 d = dv; en = ev;
      #10 clk = 1'b1;
      #1;
      checks++;
      if (q !== (ev ? dv : '0)) begin
        failures++;
        $display("FAIL: d=%0h en=%0b q=%0h", dv, ev, q);
      end
      // data changing after the edge must not reach q
      d = ~dv;
      #9 clk = 1'b0;
      checks++;
      if (q !== (ev ? dv : '0)) begin failures++; $display("FAIL hold: q=%0h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
