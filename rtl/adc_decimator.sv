// adc_decimator: keeps one ADC sample in DECIM.
//
// The ADC runs at 37.5 MHz because the FPGA clock modules cannot make the
// wanted 6.25 MHz sample clock from the 40 MHz reference; dropping five of
// every six samples restores 6.25 MHz. The factor 6 is the receiver's own
// number; like the receiver, this block applies no anti-alias filter, it
// only keeps the first sample of every group of DECIM.
//
// Interface: in_valid/in_data carry ADC samples (in_valid is high every
// second 75 MHz clock in the receiver); out_valid pulses for one clock with
// out_data one clock after every DECIM-th accepted sample.
module adc_decimator #(
  parameter int ADC_W = 14,
  parameter int DECIM = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] in_data,
  output logic                    out_valid,
  output logic signed [ADC_W-1:0] out_data
);
  localparam int CW = (DECIM > 1) ? $clog2(DECIM) : 1;
  logic [CW-1:0] phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (phase == '0) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end
        phase <= (phase == CW'(DECIM - 1)) ? '0 : phase + 1'b1;
      end
    end
  end
endmodule
