// tb_carrier_nco: steps the NCO with several frequency words and checks
// the phase accumulation, the sine and cosine outputs against
// round(3 sin/cos) evaluated with real math, hold when not stepping, and
// clear.
module tb_carrier_nco;
  import gps_pkg::*;
  import gps_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, step = 0;
  logic [31:0] fw = '0;
  carr_t sin_o, cos_o;
  logic [31:0] phase;
  int checks = 0, failures = 0;

  carrier_nco dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [31:0] ref_ph;
    logic [31:0] words [4] = '{CARR_FW_NOMINAL, CARR_FW_NOMINAL + 32'd343597, 32'h1000_0000, 32'hF000_0001};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (words[w]) begin
      @(negedge clk); clear = 1; fw = words[w];
      @(negedge clk); clear = 0;
      ref_ph = '0;
      for (int i = 0; i < 500; i++) begin
        step = ($urandom_range(0, 4) != 0);
        checks += 3;
        if (phase != ref_ph) begin failures++; $display("FAIL: phase %h exp %h", phase, ref_ph); end
        if (int'(sin_o) != carr_sin(ref_ph)) begin
          failures++; $display("FAIL: sin %0d exp %0d at %h", sin_o, carr_sin(ref_ph), ref_ph);
        end
        if (int'(cos_o) != carr_cos(ref_ph)) begin
          failures++; $display("FAIL: cos %0d exp %0d at %h", cos_o, carr_cos(ref_ph), ref_ph);
        end
        @(negedge clk);
        if (step) ref_ph += fw;
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
