`timescale 1ps/1ps
// Self-checking testbench for the analog MUX model: every select value must
// bring its channel to the output after the settling delay.
module tb_analog_mux;
  localparam int NCH = 8;
  logic [16:0] vin [NCH];
  logic [2:0] sel = '0;
  logic [16:0] vout;
  int checks = 0, failures = 0;

  analog_mux #(.NCH(NCH), .VIN_W(17)) dut (.vin(vin), .sel(sel), .vout(vout));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NCH; i++) vin[i] = 17'(1000 * (i + 1) + 7 * i);
    for (int r = 0; r < 50; r++) begin
      int s;
      s = int'($urandom_range(NCH - 1));
      sel = 3'(s);
      #1000;
      checks++;
      if (vout !== vin[s]) begin
        failures++; $display("FAIL sel=%0d vout=%0d expected %0d", s, vout, vin[s]);
      end
      // input change on the selected channel follows
      vin[s] = 17'($urandom_range(100000));
      #1000;
      checks++;
      if (vout !== vin[s]) begin failures++; $display("FAIL follow sel=%0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
