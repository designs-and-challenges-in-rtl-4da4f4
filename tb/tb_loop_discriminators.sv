// tb_loop_discriminators: random and edge-case accumulator sets; checks the
// early-minus-late power, the Costas product, the cross-product FLL error
// with the sign of the dot product (zero on the first dump after clear),
// and the carrier error following the FLL/PLL mode, against 64/128-bit
// integer arithmetic in the testbench.
module tb_loop_discriminators;
  import gps_pkg::*;
  localparam int ERR_W = 2 * ACC_W + 2;
  logic clk = 0, rst_n = 0;
  logic clear = 0, mode = 0, in_valid = 0;
  epl_t acc = '0;
  logic out_valid;
  logic signed [ERR_W-1:0] dll_err, pll_err, fll_err, carr_err;
  int checks = 0, failures = 0;

  loop_discriminators dut (.*);
  always #5 clk = ~clk;

  typedef logic signed [127:0] big_t;
  big_t pip, pqp;
  bit have;
  int n_fll = 0, n_pll = 0;

  function automatic acc_t rnd();
    case ($urandom_range(0, 5))
      0: return acc_t'(-(1 <<< 23));
      1: return acc_t'((1 <<< 23) - 1);
      default: return acc_t'($signed($urandom_range(0, 2 * 400000)) - 400000);
    endcase
  endfunction

  task automatic one(input bit m);
    big_t ie, qe, il, ql, ip, qp, dll, pll, x, d, fll;
    acc.ie = rnd(); acc.ip = rnd(); acc.il = rnd(); acc.qe = rnd(); acc.qp = rnd(); acc.ql = rnd();
    ie = acc.ie; qe = acc.qe; il = acc.il; ql = acc.ql; ip = acc.ip; qp = acc.qp;
    dll = ie * ie + qe * qe - il * il - ql * ql;
    pll = ip * qp;
    x   = pip * qp - pqp * ip;
    d   = pip * ip + pqp * qp;
    fll = !have ? 0 : (d < 0 ? -x : x);
    @(negedge clk); mode = m; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks += 5;
    if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
    if (big_t'(dll_err) != dll) begin failures++; $display("FAIL: dll %0d exp %0d", dll_err, dll); end
    if (big_t'(pll_err) != pll) begin failures++; $display("FAIL: pll"); end
    if (big_t'(fll_err) != fll) begin failures++; $display("FAIL: fll %0d exp %0d", fll_err, fll); end
    if (big_t'(carr_err) != (m ? pll : fll)) begin failures++; $display("FAIL: carr_err mode %0d", m); end
    if (m) n_pll++; else n_fll++;
    pip = ip; pqp = qp; have = 1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    have = 0; pip = 0; pqp = 0;
    for (int i = 0; i < 400; i++) begin
      if (i % 50 == 0) begin
        @(negedge clk); clear = 1;
        @(negedge clk); clear = 0;
        have = 0; pip = 0; pqp = 0;
      end
      one(i >= 200);      // FLL first, then PLL
    end
    checks++;
    if (n_fll == 0 || n_pll == 0) begin failures++; $display("FAIL: modes"); end
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
