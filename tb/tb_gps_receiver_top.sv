// tb_gps_receiver_top: the end-to-end scenario with the ADC strobe on every
// clock and 2500 samples per code period, six times faster to simulate
// than real time; the receiver itself is at its default parameters.
module tb_gps_receiver_top;
  gps_top_scenario #(.FULL(1'b0)) scenario ();
endmodule
