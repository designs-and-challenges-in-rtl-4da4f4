// tb_gps_parity: words encoded by the mask-form reference encoder must
// pass, with both values of D29*/D30*; the same words inverted as a whole
// (with inverted D29*/D30*) must pass and decode to the same data; any
// single flipped bit must fail.
module tb_gps_parity;
  import gps_tb_pkg::*;
  logic [29:0] word;
  logic d29s, d30s, ok;
  logic [23:0] data;
  logic [5:0] parity_calc;
  int checks = 0, failures = 0;

  gps_parity dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      bit [23:0] d;
      bit s29, s30;
      bit [29:0] w;
      d   = 24'($urandom);
      s29 = 1'($urandom);
      s30 = 1'($urandom);
      w   = encode_word(d, s29, s30);
      word = w; d29s = s29; d30s = s30; #1;
      checks += 2;
      if (!ok) begin failures++; $display("FAIL: valid word rejected"); end
      if (data != d) begin failures++; $display("FAIL: data %h exp %h", data, d); end
      word = ~w; d29s = ~s29; d30s = ~s30; #1;
      checks += 2;
      if (!ok) begin failures++; $display("FAIL: inverted word rejected"); end
      if (data != d) begin failures++; $display("FAIL: inverted data"); end
      for (int b = 0; b < 30; b += 1 + (i % 3)) begin
        word = w ^ (30'd1 << b); d29s = s29; d30s = s30; #1;
        checks++;
        if (ok) begin failures++; $display("FAIL: bit %0d error not caught", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
