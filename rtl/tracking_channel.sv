// tracking_channel: the correlator half of one tracking channel.
//
// For every live 6.25 MHz sample it removes the carrier with the local
// sine (I) and cosine (Q) and correlates against three copies of the
// satellite's C/A code: prompt, early (half a chip ahead) and late (half a
// chip behind), feeding six accumulators IE, IP, IL, QE, QP, QL. At the end
// of every code period (1 ms, when the prompt copy wraps from chip 1022 to
// chip 0) the six sums are dumped and cleared, giving the 1000 Hz loop
// update. The E/P/L structure, the I/Q arms and the six accumulators follow
// the receiver description; the half-chip spacing and the way the replicas
// are made are this design's choices.
//
// Replicas: a code NCO counts half chips (hc, 0..2045) with a 32-bit
// fraction advanced by code_fw per sample. The generator holds the early
// chip (index (hc+1)/2) and the chip before it: for even hc prompt = early
// and late = previous; for odd hc prompt = late = previous.
//
// Control: start loads prn and the start code phase (half chips), steps
// the generator to that phase (up to 1023 clocks) and arms the channel;
// the channel then begins with the first sample after sync (the ping-pong
// buffer swap, i.e. the same sample position where acquisition measured
// the phase). stop returns it to idle. carr_fw and code_fw are read every
// sample, so the processor's loop filters can steer them at any time.
// dump pulses for one clock with acc and dump_count updated.
module tracking_channel
  import gps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic        sync,
  input  logic [5:0]  prn,
  input  logic [10:0] start_phase,   // half chips, 0..2045
  input  logic [31:0] carr_fw,
  input  logic [31:0] code_fw,
  input  logic        sample_valid,
  input  sample_t     sample,
  output logic        armed,
  output logic        running,
  output logic        dump,
  output epl_t        acc,
  output logic [31:0] dump_count
);
  typedef enum logic [1:0] {T_IDLE, T_PRELOAD, T_ARMED, T_RUN} state_e;
  state_e state;

  logic [10:0] hc;
  logic [31:0] hc_frac;
  logic [10:0] preload_left;
  logic        prev_chip;
  epl_t        sum;

  // code generator holds the early chip
  logic code_load, code_step, early_chip;
  logic [9:0] chip_idx;
  ca_code_gen u_code (
    .clk, .rst_n, .load(code_load), .prn, .step(code_step),
    .chip(early_chip), .chip_idx
  );

  logic  nco_clear, nco_step;
  carr_t sin_v, cos_v;
  logic [31:0] nco_phase;
  carrier_nco u_nco (
    .clk, .rst_n, .clear(nco_clear), .step(nco_step), .fw(carr_fw),
    .sin_o(sin_v), .cos_o(cos_v), .phase(nco_phase)
  );

  wire live = sample_valid && ((state == T_RUN) || (state == T_ARMED && sync));

  // code NCO
  logic        hc_carry;
  logic [31:0] hc_frac_next;
  logic [10:0] hc_next;
  logic        epoch;
  always_comb begin
    {hc_carry, hc_frac_next} = {1'b0, hc_frac} + {1'b0, code_fw};
    hc_next = hc;
    epoch   = 1'b0;
    if (hc_carry) begin
      if (hc == 11'(CA_HALF_CHIPS - 1)) begin
        hc_next = '0;
        epoch   = 1'b1;      // prompt wraps 1022 -> 0: code period ends
      end else begin
        hc_next = hc + 1'b1;
      end
    end
  end

  // early / prompt / late chips as +1 / -1 factors (chip 1 -> -1)
  logic e_chip, p_chip, l_chip;
  always_comb begin
    e_chip = early_chip;
    p_chip = hc[0] ? prev_chip : early_chip;
    l_chip = prev_chip;
  end

  // carrier wipe-off
  logic signed [7:0] si, sq;
  always_comb begin
    si = 8'(sample) * 8'(sin_v);
    sq = 8'(sample) * 8'(cos_v);
  end

  function automatic acc_t sgn(input logic c, input logic signed [7:0] v);
    return c ? -ACC_W'(v) : ACC_W'(v);
  endfunction

  epl_t sum_next;
  always_comb begin
    sum_next.ie = sum.ie + sgn(e_chip, si);
    sum_next.ip = sum.ip + sgn(p_chip, si);
    sum_next.il = sum.il + sgn(l_chip, si);
    sum_next.qe = sum.qe + sgn(e_chip, sq);
    sum_next.qp = sum.qp + sgn(p_chip, sq);
    sum_next.ql = sum.ql + sgn(l_chip, sq);
  end

  always_comb begin
    code_load = start;
    nco_clear = code_load;
    nco_step  = live;
    code_step = 1'b0;
    if (state == T_PRELOAD && preload_left != '0) code_step = 1'b1;
    // the early chip changes when hc becomes odd
    if (live && hc_carry && hc_next[0]) code_step = 1'b1;
  end

  assign armed   = (state == T_ARMED);
  assign running = (state == T_RUN);

  logic [9:0] early_idx;
  always_comb early_idx = 10'((12'(start_phase) + 12'd1) >> 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= T_IDLE;
      hc           <= '0;
      hc_frac      <= '0;
      preload_left <= '0;
      prev_chip    <= 1'b0;
      sum          <= '0;
      acc          <= '0;
      dump         <= 1'b0;
      dump_count   <= '0;
    end else begin
      dump <= 1'b0;
      if (start) begin
        // step to early index - 1, then one more step recording the chip
        hc           <= (start_phase >= 11'(CA_HALF_CHIPS)) ? '0 : start_phase;
        hc_frac      <= '0;
        preload_left <= (start_phase >= 11'(CA_HALF_CHIPS)) ? 11'd1023
                        : 11'((early_idx == 10'd0 || early_idx == 10'(CA_LEN)) ? 11'd1023
                                                                               : 11'(early_idx));
        sum          <= '0;
        dump_count   <= '0;
        state        <= T_PRELOAD;
      end else if (stop) begin
        state <= T_IDLE;
      end else begin
        unique case (state)
          T_IDLE: ;
          T_PRELOAD: begin
            if (preload_left != '0) begin
              preload_left <= preload_left - 1'b1;
              if (preload_left == 11'd1) prev_chip <= early_chip;  // chip at early-1
            end else begin
              state <= T_ARMED;
            end
          end
          T_ARMED, T_RUN: begin
            if (sync && state == T_ARMED) state <= T_RUN;
            if (live) begin
              hc      <= hc_next;
              hc_frac <= hc_frac_next;
              if (hc_carry && hc_next[0]) prev_chip <= early_chip;
              if (epoch) begin
                acc        <= sum_next;
                sum        <= '0;
                dump       <= 1'b1;
                dump_count <= dump_count + 1'b1;
              end else begin
                sum <= sum_next;
              end
            end
          end
          default: state <= T_IDLE;
        endcase
      end
    end
  end
endmodule
