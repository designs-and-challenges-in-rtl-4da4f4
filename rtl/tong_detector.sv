// tong_detector: confirms one acquisition cell (code phase and Doppler)
// with an up/down counter, as in the Tong detector.
//
// The counter starts at INIT (2). Each acquisition value above THRESHOLD
// (9,000,000, found experimentally for this front end) adds one, any other
// value subtracts one. Reaching ACQ_COUNT (6) declares the satellite
// acquired; reaching 0 declares the cell a failure. Until one of the two,
// retry asks for the same cell to be searched again. These numbers and the
// rule are the receiver's; the receiver ran this loop in processor
// software, here it is a small piece of hardware so that acquisition of a
// cell needs a single command.
//
// Interface: clear starts a new cell. mag_valid/mag is one acquisition
// value. One clock later the counter has moved and either acquired,
// failed (both sticky until clear) or retry (one-clock pulse) is set;
// decided pulses with acquired/failed.
module tong_detector
  import gps_pkg::*;
#(
  parameter longint THRESHOLD = 9_000_000,
  parameter int     INIT      = 2,
  parameter int     ACQ_COUNT = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       mag_valid,
  input  mag_t       mag,
  output logic [3:0] count,
  output logic       acquired,
  output logic       failed,
  output logic       retry,
  output logic       decided,
  output logic       above      // last value was above the threshold
);
  wire hit = (mag > mag_t'(THRESHOLD));
  wire active = !acquired && !failed;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      count    <= 4'(INIT);
      acquired <= 1'b0;
      failed   <= 1'b0;
      retry    <= 1'b0;
      decided  <= 1'b0;
      above    <= 1'b0;
    end else begin
      retry   <= 1'b0;
      decided <= 1'b0;
      if (mag_valid && active) begin
        above <= hit;
        if (hit) begin
          count <= count + 1'b1;
          if (count + 1'b1 == 4'(ACQ_COUNT)) begin
            acquired <= 1'b1;
            decided  <= 1'b1;
          end else retry <= 1'b1;
        end else begin
          count <= count - 1'b1;
          if (count == 4'd1) begin
            failed  <= 1'b1;
            decided <= 1'b1;
          end else retry <= 1'b1;
        end
      end
    end
  end

  // the counter never leaves 0..ACQ_COUNT
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= 4'(ACQ_COUNT))
    else $error("Tong counter out of range: %0d", count);
endmodule
