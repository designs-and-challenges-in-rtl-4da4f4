// tb_adc_decimator: feeds random ADC samples with gaps in the valid strobe
// and checks that exactly every sixth accepted sample comes out, one clock
// later, and nothing else.
module tb_adc_decimator;
  localparam int ADC_W = 14;
  localparam int DECIM = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [ADC_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [ADC_W-1:0] out_data;
  int checks = 0, failures = 0;

  adc_decimator #(.ADC_W(ADC_W), .DECIM(DECIM)) dut (.*);

  always #5 clk = ~clk;

  logic signed [ADC_W-1:0] expq [$];
  int accepted = 0, outs = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_data  <= ADC_W'($urandom);
    end
    @(posedge clk); in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || outs != accepted / DECIM + ((accepted % DECIM) ? 1 : 0)) begin
      failures++;
      $display("FAIL: outputs %0d for %0d accepted samples", outs, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: every DECIM-th accepted sample, starting with the first
  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      if (accepted % DECIM == 0) expq.push_back(in_data);
      accepted++;
    end
    if (out_valid) begin
      outs++;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        automatic logic signed [ADC_W-1:0] e = expq.pop_front();
        if (e != out_data) begin
          failures++; $display("FAIL: got %0d exp %0d", out_data, e);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
