// gps_tb_pkg: reference models shared by the receiver testbenches.
//
// They are written differently from the RTL on purpose:
//  - C/A code: G1 and G2 sequences generated once, and each satellite's
//    code formed as G1 xor G2 delayed by the satellite's code delay (the
//    delay form of the GPS Gold code), instead of two-tap phase selection.
//  - Carrier: round(3 * sin(2*pi*(k + 0.5)/16)) evaluated with real math.
//  - Parity: computed from bit masks over the 24 data bits.
package gps_tb_pkg;

  typedef bit code_t [1023];

  // G2 delay in chips for satellites 1..32
  function automatic int g2_delay(int prn);
    int d [32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
                   469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860, 861, 862};
    return d[prn - 1];
  endfunction

  function automatic code_t ca_code(int prn);
    bit g1 [1023];
    bit g2 [1023];
    bit [10:1] r1, r2;
    code_t c;
    r1 = '1; r2 = '1;
    for (int i = 0; i < 1023; i++) begin
      g1[i] = r1[10];
      g2[i] = r2[10];
      r1 = {r1[9:1], r1[3] ^ r1[10]};
      r2 = {r2[9:1], r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10]};
    end
    for (int i = 0; i < 1023; i++)
      c[i] = g1[i] ^ g2[(i - g2_delay(prn) + 1023) % 1023];
    return c;
  endfunction

  // +1 for chip 0, -1 for chip 1
  function automatic int chip_val(bit c);
    return c ? -1 : 1;
  endfunction

  function automatic int carr_sin(bit [31:0] phase);
    real a;
    a = 3.0 * $sin(2.0 * 3.14159265358979 * (real'(phase[31:28]) + 0.5) / 16.0);
    return $rtoi(a < 0.0 ? a - 0.5 : a + 0.5);
  endfunction

  function automatic int carr_cos(bit [31:0] phase);
    real a;
    a = 3.0 * $cos(2.0 * 3.14159265358979 * (real'(phase[31:28]) + 0.5) / 16.0);
    return $rtoi(a < 0.0 ? a - 0.5 : a + 0.5);
  endfunction

  // parity masks over d1..d24 (bit 23 = d1), then which star bit enters
  function automatic bit [23:0] pmask(int j);
    int idx [6][16] = '{
      '{1,2,3,5,6,10,11,12,13,14,17,18,20,23,0,0},
      '{2,3,4,6,7,11,12,13,14,15,18,19,21,24,0,0},
      '{1,3,4,5,7,8,12,13,14,15,16,19,20,22,0,0},
      '{2,4,5,6,8,9,13,14,15,16,17,20,21,23,0,0},
      '{1,3,5,6,7,9,10,14,15,16,17,18,21,22,24,0},
      '{3,5,6,8,9,10,11,13,15,19,22,23,24,0,0,0}};
    bit [23:0] m = '0;
    for (int k = 0; k < 16; k++) if (idx[j][k] != 0) m[24 - idx[j][k]] = 1'b1;
    return m;
  endfunction

  // encode 24 source bits into a transmitted 30-bit word (word[29] = D1)
  function automatic bit [29:0] encode_word(bit [23:0] d, bit d29s, bit d30s);
    bit [5:0] p;
    bit star [6] = '{d29s, d30s, d29s, d30s, d30s, d29s};
    for (int j = 0; j < 6; j++) p[5 - j] = star[j] ^ (^(d & pmask(j)));
    return {d ^ {24{d30s}}, p};
  endfunction

  // One 300-bit subframe as transmitted (bits[0] first). Word 1 is the TLM
  // (preamble then random bits), word 2 the HOW (tow in its first 17
  // bits); in words 2 and 10 the last two data bits are chosen so that the
  // word ends in 00, as the GPS message does. d29s/d30s carry the last two
  // bits of the previous word in and out. how_d returns the HOW data bits.
  function automatic void make_subframe(input bit [16:0] tow, inout bit d29s, inout bit d30s,
                                        output bit bits [300], output bit [23:0] how_d);
    for (int w = 0; w < 10; w++) begin
      bit [23:0] d;
      bit [29:0] cw;
      d = 24'($urandom);
      if (w == 0) d[23:16] = 8'b1000_1011;
      if (w == 1) d[23:7] = tow;
      cw = encode_word(d, d29s, d30s);
      if (w == 1 || w == 9) begin
        for (int k = 0; k < 4; k++) begin
          d[1:0] = 2'(k);
          cw = encode_word(d, d29s, d30s);
          if (cw[1:0] == 2'b00) break;
        end
      end
      if (w == 1) how_d = d;
      for (int b = 0; b < 30; b++) bits[w * 30 + b] = cw[29 - b];
      d29s = cw[1];
      d30s = cw[0];
    end
  endfunction

endpackage
