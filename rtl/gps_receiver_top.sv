// gps_receiver_top: single-channel GPS L1 C/A baseband receiver.
//
// Data path: ADC samples (37.5 MHz, one every second 75 MHz clock) are
// decimated by 6 to 6.25 MHz and quantised to 4 bits. The sample stream
// feeds both the ping-pong buffer (acquisition) and the tracking channel
// (real time).
//
// Acquisition: the processor writes a satellite number, a code phase (in
// half chips) and a carrier word (IF plus Doppler) and starts a search.
// The serial-search correlator plays back a full 2 ms buffer at the system
// clock, giving one acquisition value per buffer; the Tong detector counts
// hits against the threshold and, while undecided, the same cell is
// searched again on the next buffer. The processor steps through cells
// until "acquired".
//
// Tracking: the processor starts the tracking channel with the acquired
// code phase; it begins at the next buffer swap, where the phase was
// measured. Every 1 ms dump the six accumulators go to the discriminators
// (DLL, and FLL or PLL for the carrier), to the bit synchroniser and, bit
// by bit, to the frame synchroniser, which verifies preamble, TLM/HOW
// parity and the 6 s subframe spacing. The loop filters are processor
// software; it reads the discriminators and writes NCO words.
//
// One clock domain (the 75 MHz bus clock, twelve clocks per sample); the
// ADC clock is taken to be a divided copy of it, so adc_valid is a strobe.
// Block structure and numbers follow the receiver description; the single
// clock domain, the hardware retry loop and the register bus are this
// design's choices.
//
// Some status outputs of the sub-blocks are left unconnected here: the
// per-half acquisition values, the tracking "armed" flag, the unselected
// carrier discriminator, the frame-sync event pulses and the buffer
// addresses. They are there for debug and for the block testbenches, and
// the registers carry the counters derived from them.
module gps_receiver_top
  import gps_pkg::*;
#(
  parameter int     ADC_W          = 14,
  parameter int     DECIM          = 6,
  parameter int     BUF_DEPTH      = 12500,
  parameter longint THRESHOLD      = 9_000_000,
  parameter int     TONG_INIT      = 2,
  parameter int     TONG_ACQ       = 6,
  parameter int     BIT_LOCK_COUNT = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ADC
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  // processor register bus
  input  logic [4:0]              bus_addr,
  input  logic                    bus_wr,
  input  logic [31:0]             bus_wdata,
  input  logic                    bus_rd,
  output logic [31:0]             bus_rdata,
  output logic                    bus_rvalid,
  output logic                    irq,
  // status, for observation
  output logic                    acquired,
  output logic                    trk_dump,
  output logic                    nav_bit_valid,
  output logic                    nav_bit,
  output logic                    frame_locked
);
  localparam int AW    = $clog2(BUF_DEPTH);
  localparam int ERR_W = 2 * ACC_W + 2;

  // ---------------- registers ----------------
  logic        acq_start_cmd, trk_start, trk_stop, carr_mode;
  logic [3:0]  quant_shift;
  logic [5:0]  prn;
  logic [10:0] acq_phase, trk_phase;
  logic [31:0] acq_carr_fw, acq_code_fw, trk_carr_fw, trk_code_fw;

  // ---------------- sample path ----------------
  logic                    dec_valid;
  logic signed [ADC_W-1:0] dec_data;
  adc_decimator #(.ADC_W(ADC_W), .DECIM(DECIM)) u_dec (
    .clk, .rst_n, .in_valid(adc_valid), .in_data(adc_data),
    .out_valid(dec_valid), .out_data(dec_data)
  );

  logic    smp_valid;
  sample_t smp;
  sample_quantizer #(.ADC_W(ADC_W)) u_quant (
    .clk, .rst_n, .shift(quant_shift), .in_valid(dec_valid), .in_data(dec_data),
    .out_valid(smp_valid), .out_data(smp)
  );

  logic [AW-1:0] rd_addr, wr_addr;
  sample_t       rd_data;
  logic          buf_swap, play_sel;
  pingpong_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .wr_valid(smp_valid), .wr_data(smp),
    .rd_addr, .rd_data, .swap(buf_swap), .play_sel, .wr_addr
  );

  // ---------------- acquisition ----------------
  logic search_start, search_busy, search_done;
  mag_t acq_mag, mag_h0, mag_h1;
  logic tong_retry, tong_decided, tong_failed, tong_above;
  logic [3:0] tong_count;

  // a new command clears the detector; an undecided detector re-runs the cell
  assign search_start = (acq_start_cmd || tong_retry) && !search_busy;

  serial_search #(.DEPTH(BUF_DEPTH)) u_search (
    .clk, .rst_n, .start(search_start), .prn, .code_phase(acq_phase),
    .carr_fw(acq_carr_fw), .code_fw(acq_code_fw), .buf_swap,
    .rd_addr, .rd_data, .busy(search_busy), .done(search_done),
    .mag(acq_mag), .mag_half0(mag_h0), .mag_half1(mag_h1)
  );

  tong_detector #(.THRESHOLD(THRESHOLD), .INIT(TONG_INIT), .ACQ_COUNT(TONG_ACQ)) u_tong (
    .clk, .rst_n, .clear(acq_start_cmd), .mag_valid(search_done), .mag(acq_mag),
    .count(tong_count), .acquired, .failed(tong_failed), .retry(tong_retry),
    .decided(tong_decided), .above(tong_above)
  );

  wire acq_busy = search_busy || (!acquired && !tong_failed && (tong_count != 4'(TONG_INIT) || search_busy));

  // ---------------- tracking ----------------
  epl_t        trk_acc;
  logic        trk_running, trk_armed;
  logic [31:0] trk_dump_count;
  tracking_channel u_trk (
    .clk, .rst_n, .start(trk_start), .stop(trk_stop), .sync(buf_swap),
    .prn, .start_phase(trk_phase), .carr_fw(trk_carr_fw), .code_fw(trk_code_fw),
    .sample_valid(smp_valid), .sample(smp),
    .armed(trk_armed), .running(trk_running), .dump(trk_dump), .acc(trk_acc),
    .dump_count(trk_dump_count)
  );

  logic disc_valid;
  logic signed [ERR_W-1:0] dll_err, pll_err, fll_err, carr_err;
  loop_discriminators #(.ERR_W(ERR_W)) u_disc (
    .clk, .rst_n, .clear(trk_start), .mode(carr_mode),
    .in_valid(trk_dump), .acc(trk_acc), .out_valid(disc_valid),
    .dll_err, .pll_err, .fll_err, .carr_err
  );

  // ---------------- navigation message ----------------
  logic       bit_locked;
  logic [4:0] bit_boundary;
  logic [7:0] transitions;
  nav_bit_sync #(.LOCK_COUNT(BIT_LOCK_COUNT)) u_bits (
    .clk, .rst_n, .clear(trk_start), .in_valid(trk_dump), .ip(trk_acc.ip),
    .locked(bit_locked), .boundary(bit_boundary), .bit_valid(nav_bit_valid),
    .bit_o(nav_bit), .transitions
  );

  logic        frame_verifying, frame_inverted, preamble_hit, frame_candidate;
  logic        parity_fail, frame_subframe;
  logic [7:0]  preamble_count, parity_fail_count, subframe_count;
  logic [23:0] how_data;
  nav_frame_sync u_frame (
    .clk, .rst_n, .clear(trk_start), .bit_valid(nav_bit_valid), .bit_i(nav_bit),
    .locked(frame_locked), .verifying(frame_verifying), .inverted(frame_inverted),
    .preamble_hit, .candidate(frame_candidate), .parity_fail,
    .subframe(frame_subframe), .preamble_count, .parity_fail_count,
    .subframe_count, .how_data
  );

  // ---------------- register file ----------------
  receiver_regs #(.ERR_W(ERR_W)) u_regs (
    .clk, .rst_n,
    .bus_addr, .bus_wr, .bus_wdata, .bus_rd, .bus_rdata, .bus_rvalid, .irq,
    .acq_start(acq_start_cmd), .trk_start, .trk_stop, .carr_mode, .quant_shift,
    .prn, .acq_phase, .acq_carr_fw, .acq_code_fw, .trk_carr_fw, .trk_code_fw, .trk_phase,
    .acq_busy, .acq_acquired(acquired), .acq_failed(tong_failed), .acq_count(tong_count),
    .acq_decided(tong_decided), .acq_mag,
    .trk_running, .trk_dump, .trk_acc, .trk_dump_count,
    .dll_err, .carr_err,
    .bit_locked, .bit_boundary,
    .frame_locked, .frame_verifying, .frame_inverted, .frame_subframe,
    .preamble_count, .parity_fail_count, .subframe_count, .how_data
  );
endmodule
