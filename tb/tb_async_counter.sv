`timescale 1ps/1ps
// Self-checking testbench for async_counter: counts bursts of random length,
// checks the settled value after each burst, the asynchronous clear and the
// wrap at 2**WIDTH.
module tb_async_counter;
  localparam int W = 17;
  logic clk = 1'b0, clr = 1'b0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  async_counter #(.WIDTH(W)) dut (.cnt_clk(clk), .clr(clr), .q(q));

  task automatic pulses(input int n);
    repeat (n) begin
      #10 clk = 1'b1;
      #10 clk = 1'b0;
    end
    #10;
  endtask

  task automatic expect_q(input longint exp_q, input string what);
    checks++;
    if (q !== W'(exp_q)) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, W'(exp_q));
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr = 1'b1;
    #4 clr = 1'b0;
    #5 expect_q(0, "after clear");
    for (int i = 0; i < 20; i++) begin
      int n;
      n = int'($urandom_range(1, 3000));
      pulses(n);
      expect_q(n, "burst");
      clr = 1'b1; #5 clr = 1'b0; #5;
      expect_q(0, "clear");
    end
    // running total without clears
    begin
      longint total = 0;
      for (int i = 0; i < 10; i++) begin
        int n;
        n = int'($urandom_range(1, 500));
        pulses(n);
        total += n;
        expect_q(total, "accumulate");
      end
    end
    // wrap around
    clr = 1'b1; #5 clr = 1'b0; #5;
    pulses((1 << W) + 7);
    expect_q(7, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
