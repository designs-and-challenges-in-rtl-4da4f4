// tb_serial_search: one satellite signal (C/A code, IF carrier, data bits)
// buried in noise and quantised to 4 bits is placed in a playback buffer
// model; the correlator then searches several cells.
// Checks, for every pass: both half-buffer values and the reported value
// equal an independent reference (code from the delay-form generator,
// carrier from real math, code and carrier phases from 64-bit products);
// the true cell exceeds the 9,000,000 threshold and far or wrong-Doppler
// cells stay below it; a data bit flip inside one half spoils that half
// only; and a pass takes one clock per sample (playback at the system
// clock) from the buffer swap.
module tb_serial_search;
  import gps_pkg::*;
  import gps_tb_pkg::*;
  localparam int DEPTH = 12500;
  localparam int N = DEPTH / 2;
  localparam int AW = $clog2(DEPTH);
  localparam longint THRESHOLD = 9_000_000;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [5:0] prn = 6'd19;
  logic [10:0] code_phase = '0;
  logic [31:0] carr_fw = CARR_FW_NOMINAL;
  logic [31:0] code_fw = CODE_FW_NOMINAL;
  logic buf_swap = 0;
  logic [AW-1:0] rd_addr;
  sample_t rd_data;
  logic busy, done;
  mag_t mag, mag_half0, mag_half1;
  int checks = 0, failures = 0;

  serial_search #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  // playback buffer model with registered read
  sample_t buffer [DEPTH];
  always_ff @(posedge clk) rd_data <= buffer[rd_addr];

  code_t code19;

  // true signal: code phase TRUE_HC half chips at sample 0, Doppler +1500 Hz
  localparam int TRUE_HC = 1234;
  localparam real FS = 6.25e6;
  localparam real DOPPLER = 1500.0;
  logic [31:0] true_fw;

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  task automatic make_signal(input real amp, input real noise, input int flip_at);
    for (int n = 0; n < DEPTH; n++) begin
      real t, x;
      int ci, q;
      t  = real'(n) / FS;
      ci = int'((longint'(TRUE_HC) + ((longint'(n) * longint'(CODE_FW_NOMINAL)) >>> 32)) % 2046) / 2;
      x  = amp * real'(chip_val(code19[ci])) * $cos(2.0 * 3.14159265358979 * (1.65e6 + DOPPLER) * t + 0.7);
      if (flip_at >= 0 && n >= flip_at) x = -x;
      x  = x + noise * gauss();
      q  = $rtoi(x < 0.0 ? x - 0.5 : x + 0.5);
      if (q > 7) q = 7;
      if (q < -8) q = -8;
      buffer[n] = sample_t'(q);
    end
  endtask

  // reference correlation of one half
  function automatic longint ref_half(int h, int hc0, logic [31:0] cfw);
    longint si = 0, sq = 0;
    for (int n = h * N; n < (h + 1) * N; n++) begin
      int ci;
      logic [31:0] ph;
      ci = int'((longint'(hc0) + ((longint'(n) * longint'(CODE_FW_NOMINAL)) >>> 32)) % 2046) / 2;
      ph = 32'(longint'(n) * longint'(cfw));
      si += longint'(buffer[n]) * chip_val(code19[ci]) * carr_sin(ph);
      sq += longint'(buffer[n]) * chip_val(code19[ci]) * carr_cos(ph);
    end
    return si * si + sq * sq;
  endfunction

  int cycles_to_done;

  task automatic run_cell(input int hc, input logic [31:0] cfw, output longint m);
    longint r0, r1, rm;
    r0 = ref_half(0, hc, cfw);
    r1 = ref_half(1, hc, cfw);
    rm = (r0 > r1) ? r0 : r1;
    @(negedge clk);
    code_phase = 11'(hc); carr_fw = cfw; start = 1;
    @(negedge clk); start = 0;
    repeat (1100) @(negedge clk);        // generator preload
    buf_swap = 1;
    @(negedge clk); buf_swap = 0;
    cycles_to_done = 1;
    while (!done) begin @(negedge clk); cycles_to_done++; end
    checks += 4;
    if (longint'(mag_half0) != r0 || longint'(mag_half1) != r1 || longint'(mag) != rm) begin
      failures++;
      $display("FAIL: hc %0d: halves %0d %0d max %0d, exp %0d %0d %0d", hc,
               mag_half0, mag_half1, mag, r0, r1, rm);
    end
    if (cycles_to_done > DEPTH + 8 || cycles_to_done < DEPTH) begin
      failures++;
      $display("FAIL: pass took %0d clocks for %0d samples", cycles_to_done, DEPTH);
    end
    m = rm;
    $display("cell hc=%0d fw=%0d: mag=%0d (%0d clocks)", hc, cfw, mag, cycles_to_done);
  endtask

  initial begin
    longint m;
    code19  = ca_code(19);
    true_fw = 32'($rtoi((1.65e6 + DOPPLER) / FS * 4294967296.0));
    make_signal(0.6, 2.0, -1);
    repeat (2) @(posedge clk);
    rst_n <= 1;

    run_cell(TRUE_HC, true_fw, m);
    checks++; if (m <= THRESHOLD) begin failures++; $display("FAIL: true cell below threshold"); end
    run_cell(TRUE_HC + 1, true_fw, m);
    run_cell(TRUE_HC + 40, true_fw, m);
    checks++; if (m > THRESHOLD) begin failures++; $display("FAIL: far cell above threshold"); end
    run_cell(2045, true_fw, m);             // wrap of the half-chip counter
    run_cell(0, true_fw, m);
    run_cell(TRUE_HC, true_fw + 32'd3435974, m);   // 5 kHz off
    checks++; if (m > THRESHOLD) begin failures++; $display("FAIL: wrong Doppler above threshold"); end

    // a data bit flip in the middle of the first half
    make_signal(0.6, 2.0, N / 2);
    run_cell(TRUE_HC, true_fw, m);
    checks += 2;
    if (!(mag_half1 > mag_half0)) begin failures++; $display("FAIL: clean half not larger"); end
    if (mag != mag_half1) begin failures++; $display("FAIL: max not taken"); end

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
