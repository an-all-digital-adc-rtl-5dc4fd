`timescale 1ps/1ps
// Self-checking testbench for window_gen: walks a sampling edge through its
// delayed copies one step at a time and checks every window against the
// expected sequence (DISABLE t0..d5, EN windows t0..d2 and d1..d3, clear
// d3..d4), then the falling half of the clock where all windows are closed.
module tb_window_gen;
  logic clk;
  logic [5:1] d;
  logic dis, en_sp, clk_sp, en_spd, clk_spd, clk_res, clr, clk_ctl;
  int checks = 0, failures = 0;

  window_gen dut (.clk(clk), .d(d), .dis(dis), .en_sp(en_sp), .clk_sp(clk_sp),
                  .en_spd(en_spd), .clk_spd(clk_spd), .clk_res(clk_res), .clr(clr),
                  .clk_ctl(clk_ctl));

  // step k: clk and the first k copies are high (k = 0..5 after the edge)
  task automatic step(input int k, input bit rising);
    clk = rising ? 1'b1 : 1'b0;
    for (int i = 1; i <= 5; i++) d[i] = rising ? (i <= k) : (i > k);
    #1;
    checks++;
    if (rising) begin
      // expected values for each step after the rising edge
      if (dis     !== (k < 5))            begin failures++; $display("FAIL dis k=%0d", k); end
      if (en_sp   !== (k < 2))            begin failures++; $display("FAIL en_sp k=%0d", k); end
      if (en_spd  !== (k >= 1 && k < 3))  begin failures++; $display("FAIL en_spd k=%0d", k); end
      if (clr     !== (k == 3))           begin failures++; $display("FAIL clr k=%0d", k); end
      if (clk_sp  !== (k >= 1))           begin failures++; $display("FAIL clk_sp k=%0d", k); end
      if (clk_spd !== (k >= 2))           begin failures++; $display("FAIL clk_spd k=%0d", k); end
      if (clk_res !== (k >= 3))           begin failures++; $display("FAIL clk_res k=%0d", k); end
      if (clk_ctl !== (k >= 4))           begin failures++; $display("FAIL clk_ctl k=%0d", k); end
    end else begin
      if (dis || en_sp || en_spd || clr) begin
        failures++; $display("FAIL window open after falling edge, k=%0d", k);
      end
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k <= 5; k++) step(k, 1'b1);
      for (int k = 0; k <= 5; k++) step(k, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
