// sample_quantizer: reduces a decimated ADC sample to a 4-bit signed sample.
//
// Samples are kept as 4-bit values throughout the receiver (buffers,
// acquisition and tracking). How the ADC word becomes 4 bits is this
// design's choice: an arithmetic right shift by a programmable amount
// (set by the processor to match the signal level), then saturation to
// -8..+7. Registered: out_valid/out_data follow in_valid by one clock.
module sample_quantizer
  import gps_pkg::*;
#(
  parameter int ADC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0]              shift,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] in_data,
  output logic                    out_valid,
  output sample_t                 out_data
);
  logic signed [31:0] wide, shifted;

  always_comb begin
    wide    = 32'(in_data);            // sign-extended
    shifted = wide >>> shift;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= sat_sample(shifted);
    end
  end
endmodule
