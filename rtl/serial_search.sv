// serial_search: the single acquisition correlator of the serial-search
// algorithm, testing one code phase and one Doppler offset per pass.
//
// Each buffered sample is multiplied by the local PRN chip, then by the
// local sine (I arm) and cosine (Q arm); each arm sums N products, and
// after N samples the acquisition value I^2 + Q^2 is formed. This is the
// receiver's structure. A pass reads one whole 2 ms playback buffer
// (DEPTH samples) as two 1 ms halves of N = DEPTH/2 samples and reports the
// larger of the two values, so that at least one half is free of a data
// bit transition; the two-half split and the max are this design's reading
// of why the buffer holds 2 ms.
//
// Operation: start latches prn, the code phase (in half chips, 0..2045),
// the carrier word (IF plus Doppler) and the code word (half chips per
// sample). The C/A generator is then stepped to the chip of that phase
// (at most 1022 clocks) and the pass waits for the next buffer swap, so a
// whole pass (DEPTH + 2 clocks at one sample per clock) ends well before
// the following swap (12 x DEPTH clocks later in the receiver). done pulses
// with mag, mag_half0 and mag_half1 valid. rd_addr drives the playback port
// of the ping-pong buffer, whose data arrives one clock later.
module serial_search
  import gps_pkg::*;
#(
  parameter int DEPTH = 12500,
  parameter int N     = DEPTH / 2,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [5:0]    prn,
  input  logic [10:0]   code_phase,   // half chips
  input  logic [31:0]   carr_fw,
  input  logic [31:0]   code_fw,
  input  logic          buf_swap,     // a fresh playback buffer is ready
  output logic [AW-1:0] rd_addr,
  input  sample_t       rd_data,
  output logic          busy,
  output logic          done,
  output mag_t          mag,
  output mag_t          mag_half0,
  output mag_t          mag_half1
);
  typedef enum logic [2:0] {S_IDLE, S_PRELOAD, S_WAIT, S_RUN, S_SQUARE, S_DONE} state_e;
  state_e state;

  logic [5:0]  prn_q;
  logic [31:0] carr_fw_q, code_fw_q;
  logic [10:0] hc;          // half-chip counter 0..2045; prompt chip = hc >> 1
  logic [31:0] hc_frac;
  logic [9:0]  preload_left;
  logic [AW-1:0] issued;    // addresses issued so far
  logic          rd_pending;// rd_data holds a sample this clock
  logic [AW-1:0] consumed;  // samples accumulated so far
  acc_t acc_i, acc_q, hold_i, hold_q;
  logic        half;        // which half has been held

  // code and carrier replicas
  logic code_load, code_step, chip;
  logic [9:0] chip_idx;
  ca_code_gen u_code (
    .clk, .rst_n, .load(code_load), .prn(prn_q), .step(code_step),
    .chip, .chip_idx
  );

  logic  nco_clear, nco_step;
  carr_t sin_v, cos_v;
  logic [31:0] nco_phase;
  carrier_nco u_nco (
    .clk, .rst_n, .clear(nco_clear), .step(nco_step), .fw(carr_fw_q),
    .sin_o(sin_v), .cos_o(cos_v), .phase(nco_phase)
  );

  // one sample: wipe off code, then carrier on each arm
  logic signed [4:0] desp;
  logic signed [7:0] prod_i, prod_q;
  always_comb begin
    desp   = chip ? -5'(rd_data) : 5'(rd_data);
    prod_i = 8'(desp) * 8'(sin_v);
    prod_q = 8'(desp) * 8'(cos_v);
  end

  // code NCO step for this sample
  logic        hc_carry;
  logic [31:0] hc_frac_next;
  logic [10:0] hc_next;
  always_comb begin
    {hc_carry, hc_frac_next} = {1'b0, hc_frac} + {1'b0, code_fw_q};
    hc_next = hc;
    if (hc_carry) hc_next = (hc == 11'(CA_HALF_CHIPS - 1)) ? '0 : hc + 1'b1;
  end

  // I^2 + Q^2 at full width
  logic signed [MAG_W-1:0] wide_i, wide_q;
  mag_t power;
  always_comb begin
    wide_i = MAG_W'(hold_i);
    wide_q = MAG_W'(hold_q);
    power  = mag_t'(wide_i * wide_i) + mag_t'(wide_q * wide_q);
  end

  wire last_in_half = (consumed == AW'(N - 1)) || (consumed == AW'(2 * N - 1));

  always_comb begin
    code_load = (state == S_IDLE) && start;
    code_step = 1'b0;
    nco_clear = (state == S_IDLE) && start;
    nco_step  = 1'b0;
    if (state == S_PRELOAD && preload_left != '0) code_step = 1'b1;
    if (state == S_RUN && rd_pending) begin
      nco_step = 1'b1;
      // the prompt chip changes when the half-chip count becomes even
      code_step = hc_carry && !hc_next[0];
    end
  end

  assign busy    = (state != S_IDLE);
  assign rd_addr = issued;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      done         <= 1'b0;
      prn_q        <= 6'd1;
      carr_fw_q    <= '0;
      code_fw_q    <= '0;
      hc           <= '0;
      hc_frac      <= '0;
      preload_left <= '0;
      issued       <= '0;
      rd_pending   <= 1'b0;
      consumed     <= '0;
      acc_i        <= '0;
      acc_q        <= '0;
      hold_i       <= '0;
      hold_q       <= '0;
      half         <= 1'b0;
      mag          <= '0;
      mag_half0    <= '0;
      mag_half1    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          prn_q        <= prn;
          carr_fw_q    <= carr_fw;
          code_fw_q    <= code_fw;
          hc           <= (code_phase >= 11'(CA_HALF_CHIPS)) ? '0 : code_phase;
          hc_frac      <= '0;
          preload_left <= (code_phase >= 11'(CA_HALF_CHIPS)) ? '0 : code_phase[10:1];
          state        <= S_PRELOAD;
        end
        S_PRELOAD: begin
          if (preload_left != '0) preload_left <= preload_left - 1'b1;
          else                    state        <= S_WAIT;
        end
        S_WAIT: if (buf_swap) begin
          issued     <= '0;
          consumed   <= '0;
          rd_pending <= 1'b0;
          acc_i      <= '0;
          acc_q      <= '0;
          half       <= 1'b0;
          state      <= S_RUN;
        end
        S_RUN: begin
          // issue one read address per clock
          rd_pending <= (issued != AW'(DEPTH));
          if (issued != AW'(DEPTH)) issued <= issued + 1'b1;
          if (rd_pending) begin
            hc      <= hc_next;
            hc_frac <= hc_frac_next;
            if (last_in_half) begin
              hold_i <= acc_i + ACC_W'(prod_i);
              hold_q <= acc_q + ACC_W'(prod_q);
              acc_i  <= '0;
              acc_q  <= '0;
              half   <= (consumed == AW'(2 * N - 1));
              state  <= S_SQUARE;
            end else begin
              acc_i <= acc_i + ACC_W'(prod_i);
              acc_q <= acc_q + ACC_W'(prod_q);
            end
            consumed <= consumed + 1'b1;
          end
        end
        S_SQUARE: begin
          // I^2 + Q^2 of the half just finished
          if (!half) begin
            mag_half0  <= power;
            // restart the read pipeline at the first sample of half 1
            issued     <= consumed;
            rd_pending <= 1'b0;
            state      <= S_RUN;
          end else begin
            mag_half1 <= power;
            state     <= S_DONE;
          end
        end
        S_DONE: begin
          mag   <= (mag_half0 > mag_half1) ? mag_half0 : mag_half1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
