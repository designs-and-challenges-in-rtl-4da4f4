// tb_nav_bit_sync: a prompt-I stream of random data bits, 20 dumps each,
// starting in the middle of a bit, with noise and occasional one-dump sign
// glitches. Checks that the block locks to the true boundary, that every
// bit it outputs equals the bit sent (positive -> 1) despite the glitches,
// that bits come exactly 20 dumps apart, and that clear restarts the
// search (a second run with a different offset).
module tb_nav_bit_sync;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, in_valid = 0;
  acc_t ip = '0;
  logic locked;
  logic [4:0] boundary;
  logic bit_valid, bit_o;
  logic [7:0] transitions;
  int checks = 0, failures = 0;

  nav_bit_sync dut (.*);
  always #5 clk = ~clk;

  bit sent [200];
  int n_out;

  task automatic run(input int offset);
    int dump_i, last_out;
    for (int k = 0; k < 200; k++) sent[k] = 1'($urandom);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    n_out = 0; last_out = -1;
    // dump j belongs to bit (j + 20 - offset) / 20 - 1 when j >= offset... use index shift
    for (dump_i = 0; dump_i < 20 * 150; dump_i++) begin
      int k, v;
      k = (dump_i + 20 - offset) / 20;       // bit index, bit 0 is the partial one
      v = (sent[k] ? 3000 : -3000) + $signed($urandom_range(0, 1600)) - 800;
      if ($urandom_range(0, 60) == 0) v = -v / 4;       // glitch
      @(negedge clk); in_valid = 1; ip = acc_t'(v);
      @(negedge clk); in_valid = 0;
      if (bit_valid) begin
        int kk;
        kk = (dump_i + 20 - offset) / 20;
        checks++;
        if ((dump_i + 20 - offset) % 20 != 19) begin
          failures++; $display("FAIL: bit output at dump %0d, off boundary", dump_i);
        end else if (bit_o != sent[kk]) begin
          failures++; $display("FAIL: bit %0d got %0d exp %0d", kk, bit_o, sent[kk]);
        end
        if (last_out >= 0 && dump_i - last_out != 20) begin
          failures++; $display("FAIL: bit spacing %0d", dump_i - last_out);
        end
        last_out = dump_i;
        n_out++;
      end
    end
    checks += 3;
    if (!locked) begin failures++; $display("FAIL: never locked"); end
    if (int'(boundary) != offset % 20) begin failures++; $display("FAIL: boundary %0d exp %0d", boundary, offset % 20); end
    if (n_out < 100) begin failures++; $display("FAIL: only %0d bits", n_out); end
    $display("offset %0d: %0d bits out, %0d transitions seen", offset, n_out, transitions);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(7);
    run(19);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
