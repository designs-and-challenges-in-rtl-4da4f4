// nav_frame_sync: confirms that the navigation message is being received.
//
// Every 300-bit subframe (6 s) starts with the telemetry word (TLM), whose
// first 8 bits are the preamble 10001011, followed by the handover word
// (HOW). A loop locked 180 degrees off delivers the preamble inverted,
// 01110100, so both patterns are searched. A candidate is a position where
// the preamble (either polarity) starts a TLM whose parity and the
// following HOW's parity both check. The first candidate moves the block
// from HUNT to VERIFY; a second candidate exactly BITS_PER_SUBFRAME bits
// later confirms reception (LOCKED), and every later subframe boundary is
// checked the same way. A missing candidate where one is due returns the
// block to HUNT. Preamble, its inverse, the 6 s spacing and the TLM/HOW
// parity checks follow the receiver description; the state machine is this
// design's.
//
// The last 62 received bits are held, so that the two bits before the TLM
// (D29*, D30* of the previous word) are available for the TLM parity.
// Timing: events (preamble_hit, candidate, parity_fail, subframe) pulse
// the clock after the bit_valid that completes the HOW word.
// Of the window, the oldest bit (D29* of the word before) and the TLM
// message and parity fields are read only by the parity checkers, so the
// TLM data and the raw parity fields stay unused.
module nav_frame_sync
  import gps_pkg::*;
#(
  parameter int SUBFRAME_BITS = BITS_PER_SUBFRAME
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        bit_valid,
  input  logic        bit_i,
  output logic        locked,
  output logic        verifying,
  output logic        inverted,
  output logic        preamble_hit,   // pattern seen (parity not yet judged)
  output logic        candidate,      // pattern with TLM and HOW parity ok
  output logic        parity_fail,    // pattern seen, parity wrong
  output logic        subframe,       // subframe boundary confirmed
  output logic [7:0]  preamble_count,
  output logic [7:0]  parity_fail_count,
  output logic [7:0]  subframe_count,
  output logic [23:0] how_data        // HOW data bits of the last confirmed subframe
);
  typedef enum logic [1:0] {F_HUNT, F_VERIFY, F_LOCKED} state_e;
  state_e state;

  logic [61:0] sr;           // sr[0] newest bit
  logic [5:0]  seen;         // bits received, saturating at 62
  logic [9:0]  since;        // bits since the last candidate

  // window after shifting in the new bit
  logic [61:0] win;
  always_comb win = {sr[60:0], bit_i};

  logic tlm_ok, how_ok;
  logic [23:0] tlm_d, how_d;
  logic [5:0]  tlm_p, how_p;
  gps_parity u_tlm (.word(win[59:30]), .d29s(win[61]), .d30s(win[60]),
                    .ok(tlm_ok), .data(tlm_d), .parity_calc(tlm_p));
  gps_parity u_how (.word(win[29:0]),  .d29s(win[31]), .d30s(win[30]),
                    .ok(how_ok), .data(how_d), .parity_calc(how_p));

  wire full     = (seen == 6'd62) || (seen == 6'd61);   // win holds 62 valid bits
  wire pat_up   = (win[59:52] == PREAMBLE);
  wire pat_inv  = (win[59:52] == ~PREAMBLE);
  wire pat      = full && (pat_up || pat_inv);
  wire cand     = pat && tlm_ok && how_ok;
  wire due      = (since == 10'(SUBFRAME_BITS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      state             <= F_HUNT;
      sr                <= '0;
      seen              <= '0;
      since             <= '0;
      inverted          <= 1'b0;
      preamble_hit      <= 1'b0;
      candidate         <= 1'b0;
      parity_fail       <= 1'b0;
      subframe          <= 1'b0;
      preamble_count    <= '0;
      parity_fail_count <= '0;
      subframe_count    <= '0;
      how_data          <= '0;
    end else begin
      preamble_hit <= 1'b0;
      candidate    <= 1'b0;
      parity_fail  <= 1'b0;
      subframe     <= 1'b0;
      if (bit_valid) begin
        sr <= win;
        if (seen != 6'd62) seen <= seen + 1'b1;
        if (since != 10'h3FF) since <= since + 1'b1;

        if (pat) begin
          preamble_hit <= 1'b1;
          if (preamble_count != 8'hFF) preamble_count <= preamble_count + 1'b1;
          if (!cand) begin
            parity_fail <= 1'b1;
            if (parity_fail_count != 8'hFF) parity_fail_count <= parity_fail_count + 1'b1;
          end
        end
        if (cand) candidate <= 1'b1;

        unique case (state)
          F_HUNT: if (cand) begin
            state    <= F_VERIFY;
            since    <= '0;
            inverted <= pat_inv;
          end
          F_VERIFY, F_LOCKED: if (due) begin
            if (cand && (pat_inv == inverted)) begin
              state    <= F_LOCKED;
              since    <= '0;
              subframe <= 1'b1;
              how_data <= how_d;
              if (subframe_count != 8'hFF) subframe_count <= subframe_count + 1'b1;
            end else begin
              state <= F_HUNT;
            end
          end
          default: state <= F_HUNT;
        endcase
      end
    end
  end

  assign locked    = (state == F_LOCKED);
  assign verifying = (state == F_VERIFY);
endmodule
