// gps_top_scenario: end-to-end run of the receiver, with the testbench
// playing the antenna-to-ADC chain and the processor.
//
// Signal: PRN 19 at +1500 Hz Doppler on the 1.65 MHz aliased IF, 4-bit
// level placed in the upper bits of a 14-bit ADC word, Gaussian noise,
// BPSK data bits (a random lead-in, then correctly encoded subframes) with
// bit edges on code epochs every 20 code periods. Only every sixth ADC
// sample carries the signal, the others are pure noise, so a wrong
// decimation phase would lose the satellite.
//
// FULL = 1: ADC valid every second clock (37.5 of 75 MHz) and the nominal
// code rate (6250 samples per code period). FULL = 0: ADC valid every
// clock and a code rate of 2500 samples per period, so a 12500-sample
// buffer still holds a whole number of periods; the receiver parameters
// are the same in both.
//
// Processor steps: search a wrong code phase (the Tong detector must fail
// it), then the right one (it must acquire after repeated searches); start
// tracking at the acquired phase; run a software carrier loop on the read
// prompt values (the loop filters live in the processor), first with the
// FLL discriminator selected, then the PLL; read and check both
// discriminator registers every dump; stop once the frame is confirmed
// (FULL = 0) or once 30 bits have been recovered (FULL = 1, which would
// otherwise need over 500 million clocks for a whole subframe).
// Each mechanism is counted and a failure is counted for one that never
// happened. The HOW word reported must be the transmitted one.
//
// SWEEP = 1 replaces all of this with a cold-start search: Doppler bins of
// 500 Hz from -5 kHz upward, and in each a window of 16 half-chip phases,
// until the Tong detector acquires a cell. That cell must be within a bin
// and a half chip of the truth. The signal is weaker in this mode.
module gps_top_scenario
  import gps_pkg::*;
  import gps_tb_pkg::*;
#(
  parameter bit FULL  = 1'b0,
  parameter bit SWEEP = 1'b0
) ();
  localparam int  ADC_W   = 14;
  localparam int  DEPTH   = 12500;
  localparam int  P       = FULL ? 6250 : 2500;            // samples per code period
  localparam logic [31:0] CFW = FULL ? CODE_FW_NOMINAL : 32'd3515001236;  // 2046/2500 * 2^32
  localparam int  DOP_TRUE = 1500;                         // Hz
  localparam real HZ_TO_FW = 4294967296.0 / 6.25e6;        // carrier word per Hz
  localparam logic [31:0] FW_TRUE = CARR_FW_NOMINAL + 32'd1030791;        // +1500 Hz
  // signal amplitude in quantiser steps: strong for the tracking runs; weaker
  // for the sweep, where the true cell then gives about 3.5 times the
  // acquisition threshold and Doppler side lobes stay below it
  localparam real AMP        = SWEEP ? 0.6 : 2.0;
  localparam int  SWEEP_SPAN = 5000;                       // Hz, search range +-5 kHz
  localparam int  SWEEP_STEP = 500;                        // Hz, Doppler bin width
  localparam int  SWEEP_WIN  = 16;                         // code phases searched per bin
  localparam int  HC0     = 1500;                          // code phase at sample 0, half chips
  localparam int  LEAD    = 40;                            // lead-in bits
  localparam int  NSUB    = 3;
  localparam int  NBITS   = LEAD + 300 * NSUB;
  localparam int  PRN     = 19;
  localparam int  ERR_W   = 2 * ACC_W + 2;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic signed [ADC_W-1:0] adc_data = '0;
  logic [4:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid, irq, acquired, trk_dump, nav_bit_valid, nav_bit, frame_locked;
  int checks = 0, failures = 0;

  gps_receiver_top dut (.*);
  always #5 clk = ~clk;

  // ---------------- signal source ----------------
  code_t code;
  bit    navbits [NBITS];
  bit [23:0] how_sent [NSUB];
  real   sin_tab [1024];
  longint adc_count = 0;

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 6; k++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return (s - 3.0) * 1.41421356;
  endfunction

  function automatic int signal_sample(longint m);
    longint cc;
    int hc, pc, bi, q;
    logic [31:0] ph;
    real x;
    cc = longint'(HC0) + ((m * longint'(CFW)) >>> 32);
    hc = int'(cc % 2046);
    pc = int'(cc / 2046);
    bi = pc / 20;
    if (bi >= NBITS) bi = NBITS - 1;
    ph = 32'(m * longint'(FW_TRUE)) + 32'h1234_5678;
    x  = AMP * real'(chip_val(code[hc / 2])) * real'(navbits[bi] ? -1 : 1) * sin_tab[ph[31:22]]
         + 1.5 * gauss();
    q  = $rtoi(x < 0.0 ? x - 0.5 : x + 0.5);
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    return q;
  endfunction

  initial begin
    bit s29, s30;
    bit bits [300];
    code = ca_code(PRN);
    for (int i = 0; i < 1024; i++) sin_tab[i] = $sin(2.0 * 3.14159265358979 * (real'(i) + 0.5) / 1024.0);
    for (int i = 0; i < LEAD; i++) navbits[i] = (i >= LEAD - 2) ? 1'b0 : 1'($urandom);
    s29 = 0; s30 = 0;
    for (int s = 0; s < NSUB; s++) begin
      make_subframe(17'(4000 + s), s29, s30, bits, how_sent[s]);
      for (int b = 0; b < 300; b++) navbits[LEAD + 300 * s + b] = bits[b];
    end
  end

  // ADC: every clock (FULL = 0) or every second clock (FULL = 1)
  bit adc_phase = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      adc_valid <= 0;
    end else begin
      adc_phase <= ~adc_phase;
      if (!FULL || adc_phase) begin
        int q;
        q = (adc_count % 6 == 0) ? signal_sample(adc_count / 6) : $urandom_range(0, 4) - 2;
        if (q > 7) q = 7;
        if (q < -8) q = -8;
        adc_valid <= 1;
        adc_data  <= ADC_W'(q * 1024 + $urandom_range(0, 1023));
        adc_count <= adc_count + 1;
      end else begin
        adc_valid <= 0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_swap = 0, n_pass = 0, n_retry = 0, n_acq = 0, n_fail = 0, n_dump = 0;
  int n_fll = 0, n_pll = 0, n_bits = 0, n_pre = 0, n_cand = 0, n_sub = 0, n_irq = 0;
  int n_bitlock = 0;
  bit irq_q = 0;
  bit rx_bits [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.buf_swap)        n_swap++;
    if (dut.search_done)     n_pass++;
    if (dut.tong_retry)      n_retry++;
    if (dut.tong_decided && dut.acquired)    n_acq++;
    if (dut.tong_decided && dut.tong_failed) n_fail++;
    if (trk_dump)            n_dump++;
    if (nav_bit_valid) begin n_bits++; rx_bits.push_back(nav_bit); end
    if (dut.preamble_hit)    n_pre++;
    if (dut.frame_candidate) n_cand++;
    if (dut.frame_subframe)  n_sub++;
    if (irq && !irq_q)       n_irq++;
    irq_q <= irq;
  end

  // ---------------- processor ----------------
  logic [31:0] ctrl_base;

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0;
    d = bus_rdata;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // search one cell until the Tong detector decides
  task automatic search_cell(input int hc, output bit ok, output int passes);
    logic [31:0] st;
    int p0;
    p0 = n_pass;
    wr(REG_ACQ_PHASE, 32'(hc));
    wr(REG_CTRL, ctrl_base | 32'd1);
    do begin
      @(posedge irq);
      rd(REG_STATUS, st);
    end while (!st[1] && !st[2]);
    wr(REG_IRQ_CLR, 32'h7);
    ok = st[1];
    passes = n_pass - p0;
  endtask

  function automatic longint sx(input logic [31:0] v);
    return longint'($signed(v));
  endfunction

  initial begin
    bit ok;
    int passes;
    logic [31:0] v, ie, ip, il, qe, qp, ql, dll_r, carr_r, nav;
    longint pip, pqp;
    bit have_prev;
    real err, fw;
    int dumps_seen;

    ctrl_base = 32'(10) << 10;    // quantiser shift 10, FLL mode
    repeat (5) @(posedge clk);
    rst_n <= 1;
    wr(REG_CTRL, ctrl_base);
    wr(REG_PRN, PRN);
    wr(REG_ACQ_CARR_FW, FW_TRUE);
    wr(REG_ACQ_CODE_FW, CFW);

    // ---- cold-start sweep (SWEEP = 1): Doppler bins outer, code phases inner ----
    if (SWEEP) begin
      int cells, n_bins, hc_found, dop_found;
      longint fw_bin;
      cells = 0; n_bins = 0; ok = 0;
      hc_found = -1; dop_found = 0;
      for (int dop = -SWEEP_SPAN; dop <= SWEEP_SPAN && !ok; dop += SWEEP_STEP) begin
        fw_bin = longint'(CARR_FW_NOMINAL) + longint'($rtoi(real'(dop) * HZ_TO_FW + (dop < 0 ? -0.5 : 0.5)));
        wr(REG_ACQ_CARR_FW, 32'(fw_bin));
        n_bins++;
        for (int k = 0; k < SWEEP_WIN && !ok; k++) begin
          int hc;
          hc = (HC0 - SWEEP_WIN + 4 + k + 2046) % 2046;
          search_cell(hc, ok, passes);
          cells++;
          if (ok) begin hc_found = hc; dop_found = dop; end
        end
      end
      $display("sweep: %0d Doppler bins, %0d cells, acquired %0d at %0d half chips, %0d Hz (true %0d, %0d Hz)",
               n_bins, cells, ok, hc_found, dop_found, HC0, DOP_TRUE);
      check(ok, "sweep found nothing");
      check(hc_found >= HC0 - 1 && hc_found <= HC0 + 1, "sweep stopped more than a half chip from the true phase");
      check(dop_found >= DOP_TRUE - SWEEP_STEP && dop_found <= DOP_TRUE + SWEEP_STEP,
            "sweep stopped more than one bin from the true Doppler");
      check(n_fail == cells - 1, $sformatf("%0d failed cells, expected %0d", n_fail, cells - 1));
      check(n_retry > 0, "no Tong retry happened");
      check(n_swap >= 2 * (cells - 1), "fewer buffers than searched cells need");
      $display("swaps %0d, searches %0d, retries %0d, acquired %0d, failed %0d",
               n_swap, n_pass, n_retry, n_acq, n_fail);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end

    // ---- acquisition ----
    search_cell((HC0 + 600) % 2046, ok, passes);
    check(!ok, "wrong code phase acquired");
    check(passes == 2, $sformatf("failure took %0d searches, expected 2", passes));
    search_cell(HC0, ok, passes);
    check(ok, "true code phase not acquired");
    check(passes == 4, $sformatf("acquisition took %0d searches, expected 4", passes));
    rd(REG_ACQ_MAG_LO, v);
    check(v > 32'd9_000_000, "acquisition value not above threshold");
    $display("acquired after %0d searches, last value %0d", passes, v);
    if (!ok) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end

    // ---- tracking ----
    wr(REG_TRK_PHASE, HC0);
    wr(REG_TRK_CODE_FW, CFW);
    wr(REG_TRK_CARR_FW, FW_TRUE);
    wr(REG_CTRL, ctrl_base | 32'd2);
    have_prev = 0;
    dumps_seen = 0;
    // FULL stops after 30 bits following bit sync; otherwise at frame lock
    while (dumps_seen < 20 * (LEAD + 300 * NSUB) && !frame_locked && !(FULL && n_bits >= 30)) begin
      @(posedge trk_dump);
      dumps_seen++;
      rd(REG_IE, ie); rd(REG_IP, ip); rd(REG_IL, il);
      rd(REG_QE, qe); rd(REG_QP, qp); rd(REG_QL, ql);
      rd(REG_DLL_ERR, dll_r); rd(REG_CARR_ERR, carr_r);
      // discriminator registers hold the upper 32 of ERR_W bits
      check(sx(dll_r) == ((sx(ie) * sx(ie) + sx(qe) * sx(qe) - sx(il) * sx(il) - sx(ql) * sx(ql)) >>> (ERR_W - 32)),
            "DLL discriminator");
      if (ctrl_base[8]) begin
        check(sx(carr_r) == ((sx(ip) * sx(qp)) >>> (ERR_W - 32)), "PLL discriminator");
        n_pll++;
      end else begin
        longint xp, dt;
        xp = pip * sx(qp) - pqp * sx(ip);
        dt = pip * sx(ip) + pqp * sx(qp);
        if (have_prev) check(sx(carr_r) == (((dt < 0) ? -xp : xp) >>> (ERR_W - 32)), "FLL discriminator");
        n_fll++;
      end
      pip = sx(ip); pqp = sx(qp); have_prev = 1;
      // processor carrier loop: proportional on the Costas phase error
      err = (sx(ip) == 0) ? 0.0 : $atan(real'(sx(qp)) / real'(sx(ip)));
      fw  = real'(FW_TRUE) + 0.3 * err / (2.0 * 3.14159265358979) * 4294967296.0 / real'(P);
      wr(REG_TRK_CARR_FW, 32'($rtoi(fw)));
      if (dumps_seen == 100) begin
        ctrl_base[8] = 1'b1;             // hand over from FLL to PLL
        wr(REG_CTRL, ctrl_base);
      end
    end
    rd(REG_NAV_STATUS, nav);
    check(nav[0], "bit sync never locked");
    rd(REG_DUMP_COUNT, v);
    check(v == 32'(n_dump), "dump count register");
    if (!FULL) begin
      check(nav[8], "frame never confirmed");
      rd(REG_HOW, v);
      check(v[23:0] == how_sent[1], $sformatf("HOW %h is not the second subframe's", v[23:0]));
    end

    // the received bits must be a run of the transmitted ones, upright or inverted
    begin
      bit found, up, inv;
      found = 0;
      check(rx_bits.size() >= 30, "too few bits received");
      for (int off = 0; off + rx_bits.size() <= NBITS && !found; off++) begin
        up  = 1;
        inv = 1;
        foreach (rx_bits[b]) begin
          if (rx_bits[b] != navbits[off + b]) up = 0;
          if (rx_bits[b] == navbits[off + b]) inv = 0;
        end
        found = up || inv;
      end
      check(found, "received bits are not the transmitted ones");
    end

    // every mechanism must have happened
    check(n_swap > 0, "no buffer swap");
    check(n_pass > 0, "no search pass");
    check(n_retry > 0, "no Tong retry");
    check(n_acq > 0, "no acquisition");
    check(n_fail > 0, "no failed cell");
    check(n_dump > 0, "no tracking dump");
    check(n_fll > 0, "FLL mode never used");
    check(n_pll > 0, "PLL mode never used");
    check(n_bits > 0, "no navigation bit");
    if (!FULL) begin
      check(n_pre > 0, "no preamble");
      check(n_cand > 0, "no parity-checked TLM/HOW");
      check(n_sub > 0, "no confirmed subframe");
    end
    check(n_irq > 0, "no interrupt");
    $display("swaps %0d, searches %0d, retries %0d, acquired %0d, failed %0d, dumps %0d (FLL %0d, PLL %0d)",
             n_swap, n_pass, n_retry, n_acq, n_fail, n_dump, n_fll, n_pll);
    $display("bits %0d, preambles %0d, TLM/HOW parity ok %0d, subframes %0d, interrupts %0d",
             n_bits, n_pre, n_cand, n_sub, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: acquisition (about 12 buffers) plus all the navigation bits
  initial begin
    longint limit;
    limit = (FULL ? 12 : 6) * (longint'(DEPTH) * 14 + longint'(P) * 20 * (NBITS + 40));
    while (limit > 0) begin
      @(posedge clk);
      limit--;
    end
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
