`timescale 1ps/1ps
// Self-checking testbench for value_determination: the three sampling cases of
// the double-sampled ripple counter, then random pairs against an integer model.
module tb_value_determination;
  localparam int W = 17;
  logic [W-1:0] sp, sp_d;
  logic signed [W:0] value;
  logic took_sp;
  int checks = 0, failures = 0;

  value_determination #(.WIDTH(W)) dut (.sp(sp), .sp_d(sp_d), .value(value), .took_sp(took_sp));

  task automatic check(input int a, input int b, input int exp_v, input bit exp_took, input string what);
    sp = W'(a); sp_d = W'(b);
    #1;
    checks++;
    if (int'(value) != exp_v || took_sp != exp_took) begin
      failures++;
      $display("FAIL %s: sp=%0d sp_d=%0d -> %0d (took_sp=%0b), expected %0d (%0b)",
               what, a, b, int'(value), took_sp, exp_v, exp_took);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // counter 3 -> 4: regular sample 3 before the ripple, delayed sample 4 after
    check(3, 4, 3, 1'b0, "case A");
    // counter 3 -> 4: delayed sample caught mid-ripple (3 -> 2 -> 0 -> 4)
    check(3, 2, 3, 1'b1, "case B");
    // counter 1 -> 2: regular sample caught mid-ripple (1 -> 0 -> 2)
    check(0, 2, 1, 1'b0, "case C");
    // idle counter: both samples zero
    check(0, 0, -1, 1'b0, "idle");
    // largest count
    check((1 << W) - 1, (1 << W) - 1, (1 << W) - 2, 1'b0, "full");
    for (int i = 0; i < 2000; i++) begin
      int a, b;
      a = int'($urandom_range((1 << W) - 1));
      b = (i % 2 == 0) ? int'($urandom_range((1 << W) - 1)) : a + int'($urandom_range(1)) - int'($urandom_range(1));
      if (b < 0) b = 0;
      if (b > (1 << W) - 1) b = (1 << W) - 1;
      if (b < a) check(a, b, a, 1'b1, "random");
      else       check(a, b, b - 1, 1'b0, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
