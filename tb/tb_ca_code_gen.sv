// tb_ca_code_gen: for all 32 satellites, checks the generated code chip by
// chip over two full periods against the delay-form reference code, the
// first ten chips against the octal values published for the GPS codes,
// the chip counter wrap, and the Gold code balance (512 ones).
module tb_ca_code_gen;
  import gps_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0;
  logic [5:0] prn = 6'd1;
  logic chip;
  logic [9:0] chip_idx;
  int checks = 0, failures = 0;

  ca_code_gen dut (.*);
  always #5 clk = ~clk;

  // first 10 chips, octal, satellites 1..32
  int first10 [32] = '{'o1440, 'o1620, 'o1710, 'o1744, 'o1133, 'o1455, 'o1131, 'o1454,
                       'o1626, 'o1504, 'o1642, 'o1750, 'o1764, 'o1772, 'o1775, 'o1776,
                       'o1156, 'o1467, 'o1633, 'o1715, 'o1746, 'o1763, 'o1063, 'o1706,
                       'o1743, 'o1761, 'o1770, 'o1774, 'o1127, 'o1453, 'o1625, 'o1712};

  initial begin
    code_t ref_c;
    int ones, f10;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 1; p <= 32; p++) begin
      ref_c = ca_code(p);
      @(negedge clk); prn = 6'(p); load = 1;
      @(negedge clk); load = 0; step = 1;
      ones = 0; f10 = 0;
      for (int i = 0; i < 2046; i++) begin
        // chip i is on the output before the clock edge that steps it
        if (chip !== ref_c[i % 1023]) begin
          failures++;
          if (failures < 10) $display("FAIL: prn %0d chip %0d", p, i);
        end
        if (chip_idx != 10'(i % 1023)) begin
          failures++;
          if (failures < 10) $display("FAIL: prn %0d idx %0d got %0d", p, i, chip_idx);
        end
        checks += 2;
        if (i < 1023) ones += chip;
        if (i < 10) f10 = (f10 << 1) | chip;
        @(negedge clk);
      end
      step = 0;
      checks += 2;
      if (ones != 512) begin failures++; $display("FAIL: prn %0d has %0d ones", p, ones); end
      if (f10 != first10[p - 1]) begin
        failures++; $display("FAIL: prn %0d first chips %o exp %o", p, f10, first10[p - 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
