// tb_tracking_channel: streams 4-bit samples (a PRN 7 signal aligned with
// the commanded code phase, plus noise) into the channel at one sample per
// three clocks and recomputes every 1 ms dump independently: half-chip
// position from a 64-bit running sum of the code word, early/prompt/late
// chip indices from it, carrier from real math. All six accumulators are
// compared at every dump, including after the processor changes the
// carrier and code words on the fly and after a restart at the half-chip
// wrap. Also checked: a dump every 6250 +-1 samples at the nominal code
// rate (the 1 kHz loop update), the prompt arm dominating early and late
// when aligned, and that nothing is accumulated before the sync pulse.
module tb_tracking_channel;
  import gps_pkg::*;
  import gps_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, stop = 0, sync = 0;
  logic [5:0] prn = 6'd7;
  logic [10:0] start_phase = '0;
  logic [31:0] carr_fw = CARR_FW_NOMINAL;
  logic [31:0] code_fw = CODE_FW_NOMINAL;
  logic sample_valid = 0;
  sample_t sample = '0;
  logic armed, running, dump;
  epl_t acc;
  logic [31:0] dump_count;
  int checks = 0, failures = 0;

  tracking_channel dut (.*);
  always #5 clk = ~clk;

  code_t code7;
  // reference state
  longint code_tot, carr_tot;
  int start_hc;
  longint r_ie, r_ip, r_il, r_qe, r_qp, r_ql;
  int samples_in_dump, n_dumps;
  int aligned_checks;

  function automatic int hc_of(longint tot);
    return int'((longint'(start_hc) + (tot >>> 32)) % 2046);
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  // drive one sample and update the reference
  task automatic one_sample(input bit expect_live);
    int hc, pi, ei, li, q, s_, sn, cs;
    real x;
    logic [31:0] ph;
    hc = hc_of(code_tot);
    pi = hc / 2;
    ei = ((hc + 1) / 2) % 1023;
    li = ((hc + 2045) % 2046) / 2;
    ph = 32'(carr_tot);
    x  = 2.0 * real'(chip_val(code7[pi])) * $sin(2.0 * 3.14159265358979 * real'(ph) / 4294967296.0 + 0.2)
         + 1.5 * gauss();
    q  = $rtoi(x < 0.0 ? x - 0.5 : x + 0.5);
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    @(negedge clk); sample_valid = 1; sample = sample_t'(q);
    @(negedge clk); sample_valid = 0;
    @(negedge clk);
    if (!expect_live) return;
    s_ = q; sn = carr_sin(ph); cs = carr_cos(ph);
    r_ie += s_ * sn * chip_val(code7[ei]);
    r_ip += s_ * sn * chip_val(code7[pi]);
    r_il += s_ * sn * chip_val(code7[li]);
    r_qe += s_ * cs * chip_val(code7[ei]);
    r_qp += s_ * cs * chip_val(code7[pi]);
    r_ql += s_ * cs * chip_val(code7[li]);
    samples_in_dump++;
    carr_tot += carr_fw;
    code_tot += code_fw;
    if (hc_of(code_tot) < hc) begin   // prompt wrapped: a dump is due
      checks += 2;
      if (!dump_seen) begin failures++; $display("FAIL: no dump at epoch"); end
      else if (acc.ie != ACC_W'(r_ie) || acc.ip != ACC_W'(r_ip) || acc.il != ACC_W'(r_il) ||
               acc.qe != ACC_W'(r_qe) || acc.qp != ACC_W'(r_qp) || acc.ql != ACC_W'(r_ql)) begin
        failures++;
        $display("FAIL: dump %0d: got %0d %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d %0d", n_dumps,
                 acc.ie, acc.ip, acc.il, acc.qe, acc.qp, acc.ql, r_ie, r_ip, r_il, r_qe, r_qp, r_ql);
      end
      if (code_fw == CODE_FW_NOMINAL && n_dumps > 0 && (samples_in_dump < 6249 || samples_in_dump > 6251)) begin
        failures++; $display("FAIL: dump after %0d samples", samples_in_dump);
      end
      if (n_dumps > 0 && code_fw == CODE_FW_NOMINAL) begin
        aligned_checks++;
        checks++;
        if (r_ip * r_ip + r_qp * r_qp <= r_ie * r_ie + r_qe * r_qe ||
            r_ip * r_ip + r_qp * r_qp <= r_il * r_il + r_ql * r_ql) begin
          failures++; $display("FAIL: prompt not strongest");
        end
      end
      dump_seen = 0;
      n_dumps++;
      samples_in_dump = 0;
      r_ie = 0; r_ip = 0; r_il = 0; r_qe = 0; r_qp = 0; r_ql = 0;
    end else if (dump_seen) begin
      failures++; $display("FAIL: early dump");
    end
  endtask

  bit dump_seen = 0;
  always @(posedge clk) if (dump) dump_seen <= 1;

  task automatic begin_track(input int hc0);
    @(negedge clk); start = 1; start_phase = 11'(hc0);
    @(negedge clk); start = 0;
    start_hc = hc0; code_tot = 0; carr_tot = 0;
    r_ie = 0; r_ip = 0; r_il = 0; r_qe = 0; r_qp = 0; r_ql = 0;
    samples_in_dump = 0; n_dumps = 0; dump_seen = 0;
    // samples before the channel is synchronised are ignored
    repeat (400) one_sample(0);
    wait (armed);
    repeat (5) one_sample(0);
    checks++;
    if (running || dump_count != 0) begin failures++; $display("FAIL: ran before sync"); end
    @(negedge clk); sync = 1;
    @(negedge clk); sync = 0;
  endtask

  initial begin
    code7 = ca_code(7);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    begin_track(777);
    repeat (3 * 6250 + 100) one_sample(1);
    // processor steers the NCOs
    carr_fw = CARR_FW_NOMINAL + 32'd200000;
    code_fw = CODE_FW_NOMINAL + 32'd3000000;
    repeat (2 * 6250) one_sample(1);
    carr_fw = CARR_FW_NOMINAL; code_fw = CODE_FW_NOMINAL;
    // restart at the half-chip wrap and at zero
    begin_track(2045);
    repeat (2 * 6250 + 10) one_sample(1);
    begin_track(0);
    repeat (2 * 6250 + 10) one_sample(1);
    checks++;
    if (dump_count != 32'(n_dumps)) begin failures++; $display("FAIL: dump_count %0d vs %0d", dump_count, n_dumps); end
    @(negedge clk); stop = 1;
    @(negedge clk); stop = 0;
    checks++;
    if (running) begin failures++; $display("FAIL: stop"); end
    checks++;
    if (aligned_checks < 5) begin failures++; $display("FAIL: few aligned dumps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
