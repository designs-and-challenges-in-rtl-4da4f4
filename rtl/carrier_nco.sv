// carrier_nco: local carrier generator giving in-phase (sine) and
// quadrature (cosine) replicas, as used by the serial search (I arm
// multiplied by SINE, Q arm by COSINE) and by the tracking Costas loop.
//
// A 32-bit phase accumulator advances by fw on every step (one step per
// sample, so fw = f / 6.25 MHz * 2^32). Its top 4 bits address a 16-entry
// table of round(3 * sin(2*pi*(k + 0.5)/16)); the cosine reads the entry a
// quarter turn ahead. Accumulator width and the 3-bit, 16-phase table are
// this design's choices. Outputs are combinational from the phase register.
module carrier_nco
  import gps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,   // phase back to 0
  input  logic        step,    // advance by fw
  input  logic [31:0] fw,
  output carr_t       sin_o,
  output carr_t       cos_o,
  output logic [31:0] phase
);
  function automatic carr_t sin_lut(input logic [3:0] k);
    unique case (k)
      4'd0, 4'd7:            return  3'sd1;
      4'd1, 4'd2, 4'd5, 4'd6: return  3'sd2;
      4'd3, 4'd4:            return  3'sd3;
      4'd8, 4'd15:           return -3'sd1;
      4'd9, 4'd10, 4'd13, 4'd14: return -3'sd2;
      default:               return -3'sd3;   // 11, 12
    endcase
  endfunction

  assign sin_o = sin_lut(phase[31:28]);
  assign cos_o = sin_lut(phase[31:28] + 4'd4);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) phase <= '0;
    else if (step)       phase <= phase + fw;
  end
endmodule
