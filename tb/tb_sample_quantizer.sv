// tb_sample_quantizer: random ADC words and shift settings; checks the
// 4-bit result against a saturating divide-by-power-of-two reference and
// the one-clock latency.
module tb_sample_quantizer;
  import gps_pkg::*;
  localparam int ADC_W = 14;
  logic clk = 0, rst_n = 0;
  logic [3:0] shift = '0;
  logic in_valid = 0;
  logic signed [ADC_W-1:0] in_data = '0;
  logic out_valid;
  sample_t out_data;
  int checks = 0, failures = 0;

  sample_quantizer #(.ADC_W(ADC_W)) dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_q(int v, int s);
    int q = (v >= 0) ? (v >> s) : -((-v + (1 << s) - 1) >> s);  // floor division
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    return q;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      automatic int v = $signed(ADC_W'($urandom));
      automatic int s = (i < 200) ? 10 : $urandom_range(0, 13);
      @(negedge clk);
      in_valid = 1; in_data = ADC_W'(v); shift = 4'(s);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || int'(out_data) != ref_q(v, s)) begin
        failures++;
        $display("FAIL: v=%0d s=%0d got %0d exp %0d", v, s, out_data, ref_q(v, s));
      end
      in_valid = 0;
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: valid without input"); end
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
