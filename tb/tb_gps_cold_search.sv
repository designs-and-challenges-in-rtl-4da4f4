// tb_gps_cold_search: cold-start acquisition sweep through the whole
// receiver, with the testbench acting as the processor.
//
// No code phase or Doppler is known in advance. The processor sweeps
// Doppler bins from -5 kHz upward in 500 Hz steps. In each bin it searches
// a 16-phase window of half-chip code phases. The window holds the true
// phase near its end, which keeps the run short. Every cell goes to the
// top through the register port; the hardware Tong detector then searches
// it on successive 2 ms buffers until it fails the cell or acquires.
// The sweep stops at the first acquired cell. That cell must lie within
// one half chip and one Doppler bin of the truth (PRN 19, +1500 Hz). Every
// cell before it must have failed, and at least one Tong retry must have
// happened.
//
// The +-5 kHz range and the 0.5-chip phase step are the receiver's search
// grid. The 500 Hz bin width and the reduced phase window are this
// testbench's choices. The top runs at its default parameters. The
// stimulus is the sped-up one of tb_gps_receiver_top: an ADC sample every
// clock and 2500 samples per code period. The scenario prints the result
// line and ends the run; the watchdog below is a second guard.
module tb_gps_cold_search;
  gps_top_scenario #(.FULL(1'b0), .SWEEP(1'b1)) scenario ();

  // watchdog: the full 21 bins x 16 phases at 2 buffers per cell take
  // about 50 million clocks; stop at twice that
  initial begin
    repeat (100_000_000) @(posedge scenario.clk);
    $display("FAIL: sweep watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", scenario.checks, scenario.failures + 1);
    $finish;
  end
endmodule
