// ca_code_gen: GPS C/A (Gold) code generator for satellites 1..32.
//
// Each satellite spreads its data with its own 1023-chip code at
// 1.023 Mchip/s, repeating every millisecond. The code itself is the GPS
// standard Gold code, not spelled out by the receiver description: two
// 10-stage shift registers, G1 = 1 + x^3 + x^10 and
// G2 = 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10, both loaded with all ones;
// the chip is G1 stage 10 xor the xor of two G2 stages chosen per satellite.
//
// Interface: load (re)starts the code at chip 0 for prn; step advances one
// chip. chip is the current chip (1/0; correlators map 0 to +1, 1 to -1),
// valid combinationally from the register state. chip_idx counts 0..1022.
module ca_code_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [5:0] prn,
  input  logic       step,
  output logic       chip,
  output logic [9:0] chip_idx
);
  logic [10:1] g1, g2;
  logic [3:0]  tap_a, tap_b;

  // G2 phase selector taps, per satellite (GPS interface specification).
  always_comb begin
    unique case (prn)
      6'd1:  {tap_a, tap_b} = {4'd2, 4'd6};
      6'd2:  {tap_a, tap_b} = {4'd3, 4'd7};
      6'd3:  {tap_a, tap_b} = {4'd4, 4'd8};
      6'd4:  {tap_a, tap_b} = {4'd5, 4'd9};
      6'd5:  {tap_a, tap_b} = {4'd1, 4'd9};
      6'd6:  {tap_a, tap_b} = {4'd2, 4'd10};
      6'd7:  {tap_a, tap_b} = {4'd1, 4'd8};
      6'd8:  {tap_a, tap_b} = {4'd2, 4'd9};
      6'd9:  {tap_a, tap_b} = {4'd3, 4'd10};
      6'd10: {tap_a, tap_b} = {4'd2, 4'd3};
      6'd11: {tap_a, tap_b} = {4'd3, 4'd4};
      6'd12: {tap_a, tap_b} = {4'd5, 4'd6};
      6'd13: {tap_a, tap_b} = {4'd6, 4'd7};
      6'd14: {tap_a, tap_b} = {4'd7, 4'd8};
      6'd15: {tap_a, tap_b} = {4'd8, 4'd9};
      6'd16: {tap_a, tap_b} = {4'd9, 4'd10};
      6'd17: {tap_a, tap_b} = {4'd1, 4'd4};
      6'd18: {tap_a, tap_b} = {4'd2, 4'd5};
      6'd19: {tap_a, tap_b} = {4'd3, 4'd6};
      6'd20: {tap_a, tap_b} = {4'd4, 4'd7};
      6'd21: {tap_a, tap_b} = {4'd5, 4'd8};
      6'd22: {tap_a, tap_b} = {4'd6, 4'd9};
      6'd23: {tap_a, tap_b} = {4'd1, 4'd3};
      6'd24: {tap_a, tap_b} = {4'd4, 4'd6};
      6'd25: {tap_a, tap_b} = {4'd5, 4'd7};
      6'd26: {tap_a, tap_b} = {4'd6, 4'd8};
      6'd27: {tap_a, tap_b} = {4'd7, 4'd9};
      6'd28: {tap_a, tap_b} = {4'd8, 4'd10};
      6'd29: {tap_a, tap_b} = {4'd1, 4'd6};
      6'd30: {tap_a, tap_b} = {4'd2, 4'd7};
      6'd31: {tap_a, tap_b} = {4'd3, 4'd8};
      6'd32: {tap_a, tap_b} = {4'd4, 4'd9};
      default: {tap_a, tap_b} = {4'd2, 4'd6};  // out of range: PRN 1
    endcase
  end

  assign chip = g1[10] ^ g2[tap_a] ^ g2[tap_b];

  always_ff @(posedge clk) begin
    if (!rst_n || load) begin
      g1       <= '1;
      g2       <= '1;
      chip_idx <= '0;
    end else if (step) begin
      g1       <= {g1[9:1], g1[3] ^ g1[10]};
      g2       <= {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
      chip_idx <= (chip_idx == 10'd1022) ? '0 : chip_idx + 1'b1;
    end
  end
endmodule
