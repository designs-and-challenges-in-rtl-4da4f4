// gps_pkg: types and constants shared by the GPS L1 C/A baseband receiver.
//
// The receiver works on 4-bit signed samples at 6.25 MHz (a 37.5 MHz ADC
// decimated by 6) and runs all logic on one 75 MHz system clock, 12 clocks
// per sample. The C/A code length (1023 chips), the 50 Hz data rate, the
// 1 ms loop update, the subframe length (10 words of 30 bits) and the
// preamble 10001011 are GPS facts; the 4-bit sample, 6.25 MHz rate, 2 ms
// buffer (12500 samples) and the acquisition threshold 9,000,000 are the
// receiver's own numbers. Accumulator width and the frequency-word scaling
// below are this implementation's choices.
package gps_pkg;

  // ---- sample and accumulator types ----
  localparam int SAMPLE_W = 4;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // 24 bits hold 12500 products of |sample * carrier| <= 8*3 with margin.
  localparam int ACC_W = 24;
  typedef logic signed [ACC_W-1:0] acc_t;

  // I^2 + Q^2 of two ACC_W-bit values.
  localparam int MAG_W = 2 * ACC_W + 1;
  typedef logic [MAG_W-1:0] mag_t;

  // Carrier replica amplitude: 3-bit signed, values -3..3.
  typedef logic signed [2:0] carr_t;

  // The six tracking accumulators (early/prompt/late on I and Q).
  typedef struct packed {
    acc_t ie;
    acc_t ip;
    acc_t il;
    acc_t qe;
    acc_t qp;
    acc_t ql;
  } epl_t;

  // ---- GPS signal constants ----
  localparam int CA_LEN            = 1023;   // chips per code period (1 ms)
  localparam int CA_HALF_CHIPS     = 2 * CA_LEN;
  localparam int MS_PER_BIT        = 20;     // 50 Hz data over 1 kHz code
  localparam int WORD_BITS         = 30;
  localparam int BITS_PER_SUBFRAME = 300;    // 10 words x 30 bits = 6 s
  localparam logic [7:0] PREAMBLE  = 8'b1000_1011;

  // ---- frequency words (32-bit phase accumulators, updated once per sample) ----
  // Code NCO counts half chips: word = 2 * 1.023 MHz / 6.25 MHz * 2^32.
  localparam logic [31:0] CODE_FW_NOMINAL = 32'd1406000494;
  // 20.4 MHz IF sampled at 6.25 MHz aliases to 20.4 - 3*6.25 = 1.65 MHz:
  // word = 1.65 MHz / 6.25 MHz * 2^32.
  localparam logic [31:0] CARR_FW_NOMINAL = 32'd1133871366;

  // ---- register map of the processor bus (word addresses) ----
  typedef enum logic [4:0] {
    REG_CTRL        = 5'h00, // W: [0] acq_start, [1] trk_start, [2] trk_stop (pulses)
                             // RW: [8] carrier mode (0 FLL, 1 PLL), [13:10] quantiser shift
    REG_STATUS      = 5'h01, // R: see receiver_regs
    REG_PRN         = 5'h02, // RW: satellite number 1..32
    REG_ACQ_PHASE   = 5'h03, // RW: code phase to search, half chips 0..2045
    REG_ACQ_CARR_FW = 5'h04, // RW: acquisition carrier word (IF + Doppler)
    REG_ACQ_MAG_LO  = 5'h05, // R : last acquisition value, bits 31:0
    REG_ACQ_MAG_HI  = 5'h06, // R : last acquisition value, upper bits
    REG_TRK_CARR_FW = 5'h07, // RW: tracking carrier word
    REG_TRK_CODE_FW = 5'h08, // RW: tracking code word (half chips per sample)
    REG_TRK_PHASE   = 5'h09, // RW: tracking start code phase, half chips
    REG_IE          = 5'h0A, // R : accumulators of the last 1 ms dump
    REG_IP          = 5'h0B,
    REG_IL          = 5'h0C,
    REG_QE          = 5'h0D,
    REG_QP          = 5'h0E,
    REG_QL          = 5'h0F,
    REG_DLL_ERR     = 5'h10, // R : code discriminator (upper 32 bits)
    REG_CARR_ERR    = 5'h11, // R : carrier discriminator (upper 32 bits)
    REG_NAV_STATUS  = 5'h12, // R : bit sync / frame sync status
    REG_NAV_WORDS   = 5'h13, // R : preamble, parity and subframe counters
    REG_DUMP_COUNT  = 5'h14, // R : 1 ms dumps since tracking start
    REG_IRQ_CLR     = 5'h15, // W : write 1s to clear irq causes
    REG_HOW         = 5'h16, // R : data bits of the last verified HOW word
    REG_ACQ_CODE_FW = 5'h17  // RW: acquisition code word (half chips per sample)
  } reg_addr_e;

  // Sign-extending saturating helper used by the quantiser.
  function automatic sample_t sat_sample(input logic signed [31:0] v);
    if (v > 32'sd7)       return sample_t'(7);
    else if (v < -32'sd8) return sample_t'(-8);
    else                  return sample_t'(v);
  endfunction

endpackage
