// gps_parity: checks the six parity bits of one 30-bit GPS navigation word.
//
// Every word carries 24 data bits and 6 parity bits; parity also depends on
// the last two bits of the previous word (D29*, D30*), and the transmitted
// data bits are the source bits xor D30*. The equations are the standard
// ones of the GPS signal specification, written out below with d1..d24 the
// source data bits:
//   D25 = D29* ^ d1^d2^d3^d5^d6^d10^d11^d12^d13^d14^d17^d18^d20^d23
//   D26 = D30* ^ d2^d3^d4^d6^d7^d11^d12^d13^d14^d15^d18^d19^d21^d24
//   D27 = D29* ^ d1^d3^d4^d5^d7^d8^d12^d13^d14^d15^d16^d19^d20^d22
//   D28 = D30* ^ d2^d4^d5^d6^d8^d9^d13^d14^d15^d16^d17^d20^d21^d23
//   D29 = D30* ^ d1^d3^d5^d6^d7^d9^d10^d14^d15^d16^d17^d18^d21^d22^d24
//   D30 = D29* ^ d3^d5^d6^d8^d9^d10^d11^d13^d15^d19^d22^d23^d24
// A wholly inverted bit stream (a Costas loop locked 180 degrees off)
// passes too, because D29*/D30* invert with it.
//
// Interface (combinational): word[29] is D1, the first bit received,
// word[0] is D30. ok = all six match; data = d1..d24 with d1 in data[23].
module gps_parity (
  input  logic [29:0] word,
  input  logic        d29s,
  input  logic        d30s,
  output logic        ok,
  output logic [23:0] data,
  output logic [5:0]  parity_calc
);
  logic [24:1] d;

  always_comb begin
    for (int i = 1; i <= 24; i++) d[i] = word[30 - i] ^ d30s;
    parity_calc[5] = d29s ^ d[1]^d[2]^d[3]^d[5]^d[6]^d[10]^d[11]^d[12]^d[13]^d[14]^d[17]^d[18]^d[20]^d[23];
    parity_calc[4] = d30s ^ d[2]^d[3]^d[4]^d[6]^d[7]^d[11]^d[12]^d[13]^d[14]^d[15]^d[18]^d[19]^d[21]^d[24];
    parity_calc[3] = d29s ^ d[1]^d[3]^d[4]^d[5]^d[7]^d[8]^d[12]^d[13]^d[14]^d[15]^d[16]^d[19]^d[20]^d[22];
    parity_calc[2] = d30s ^ d[2]^d[4]^d[5]^d[6]^d[8]^d[9]^d[13]^d[14]^d[15]^d[16]^d[17]^d[20]^d[21]^d[23];
    parity_calc[1] = d30s ^ d[1]^d[3]^d[5]^d[6]^d[7]^d[9]^d[10]^d[14]^d[15]^d[16]^d[17]^d[18]^d[21]^d[22]^d[24];
    parity_calc[0] = d29s ^ d[3]^d[5]^d[6]^d[8]^d[9]^d[10]^d[11]^d[13]^d[15]^d[19]^d[22]^d[23]^d[24];
    ok   = (parity_calc == word[5:0]);
    for (int i = 1; i <= 24; i++) data[24 - i] = d[i];
  end
endmodule
