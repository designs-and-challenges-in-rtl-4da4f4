// tb_gps_receiver_full: the end-to-end scenario in real-time proportions:
// 37.5 MHz ADC strobe on the 75 MHz clock, 6250 samples per 1 ms code
// period, every receiver parameter at its default.
module tb_gps_receiver_full;
  gps_top_scenario #(.FULL(1'b1)) scenario ();
endmodule
