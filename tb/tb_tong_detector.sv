// tb_tong_detector: drives sequences of acquisition values and compares
// counter, acquired, failed, retry and decided with a reference counter
// (start 2, +1 above 9,000,000, -1 otherwise, 6 acquires, 0 fails).
// Includes the boundary values 9,000,000 (not above) and 9,000,001, and
// checks that a decided cell ignores further values until cleared.
module tb_tong_detector;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, mag_valid = 0;
  mag_t mag = '0;
  logic [3:0] count;
  logic acquired, failed, retry, decided, above;
  int checks = 0, failures = 0;

  tong_detector dut (.*);
  always #5 clk = ~clk;

  int rc; bit racq, rfail;
  int n_acq = 0, n_fail = 0;

  task automatic feed(input longint v);
    bit hit, was_active;
    @(negedge clk); mag_valid = 1; mag = mag_t'(v);
    @(negedge clk); mag_valid = 0;
    hit = (v > 9_000_000);
    was_active = !racq && !rfail;
    if (was_active) begin
      rc += hit ? 1 : -1;
      if (rc == 6) racq = 1;
      if (rc == 0) rfail = 1;
    end
    checks += 4;
    if (int'(count) != rc || acquired != racq || failed != rfail) begin
      failures++;
      $display("FAIL: v=%0d count %0d/%0d acq %0d/%0d fail %0d/%0d", v, count, rc, acquired, racq, failed, rfail);
    end
    if (retry != (was_active && !racq && !rfail)) begin failures++; $display("FAIL: retry"); end
    if (decided != (was_active && (racq || rfail))) begin failures++; $display("FAIL: decided"); end
    if (was_active && above != hit) begin failures++; $display("FAIL: above"); end
    if (decided && racq) n_acq++;
    if (decided && rfail) n_fail++;
  endtask

  task automatic new_cell();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    rc = 2; racq = 0; rfail = 0;
    checks++;
    if (count != 4'd2 || acquired || failed) begin failures++; $display("FAIL: clear"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    new_cell();
    // four hits in a row: acquired at the fourth
    repeat (4) feed(20_000_000);
    feed(1);                                // ignored after the decision
    new_cell();
    feed(9_000_000); feed(9_000_000);       // equal is not above: 2 -> 0, failed
    new_cell();
    feed(9_000_001); feed(5); feed(9_000_001); feed(9_000_001); feed(1); feed(30_000_000); feed(30_000_000);
    new_cell();
    for (int i = 0; i < 300; i++) begin
      if (racq || rfail) new_cell();
      feed(($urandom_range(0, 1) != 0) ? longint'($urandom_range(9_000_001, 40_000_000)) : longint'($urandom_range(0, 9_000_000)));
    end
    checks += 2;
    if (n_acq == 0 || n_fail == 0) begin failures++; $display("FAIL: outcomes %0d %0d", n_acq, n_fail); end
    $display("acquired %0d times, failed %0d times", n_acq, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
