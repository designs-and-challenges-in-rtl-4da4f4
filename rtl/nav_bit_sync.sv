// nav_bit_sync: recovers the 50 Hz navigation bits from the 1 kHz
// in-phase prompt accumulator.
//
// Each data bit spans 20 code periods, so once the tracking loops are
// locked the prompt I value keeps its sign for 20 dumps and flips only at
// bit boundaries. The block counts dumps modulo 20 and keeps a histogram of
// where sign changes happen; the first position to collect LOCK_COUNT
// changes is taken as the bit boundary. From then on it sums the 20 prompt
// values of each bit and outputs the sign (1 for a positive sum). The
// 20-dump bit and its visible sign flips follow the receiver description;
// the histogram method and LOCK_COUNT are this design's choices. The
// polarity of the bits is ambiguous (Costas loop); the frame sync resolves
// it.
//
// Timing: in_valid/ip per dump; bit_valid pulses one clock after the
// dump that completes a bit. clear restarts the search.
module nav_bit_sync
  import gps_pkg::*;
#(
  parameter int LOCK_COUNT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  acc_t       ip,
  output logic       locked,
  output logic [4:0] boundary,     // dump position (0..19) where bits start
  output logic       bit_valid,
  output logic       bit_o,
  output logic [7:0] transitions   // sign changes seen (saturating)
);
  localparam int SUM_W = ACC_W + 5;

  logic [4:0] ms_idx;
  logic [3:0] hist [MS_PER_BIT];
  logic       prev_sign, have_prev;
  logic signed [SUM_W-1:0] sum;
  logic [4:0] cnt;
  logic       collecting;

  wire sign_now = ip[ACC_W-1];
  wire flip     = have_prev && (sign_now != prev_sign);
  wire signed [SUM_W-1:0] sum_next = sum + SUM_W'(ip);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      ms_idx      <= '0;
      for (int i = 0; i < MS_PER_BIT; i++) hist[i] <= '0;
      prev_sign   <= 1'b0;
      have_prev   <= 1'b0;
      locked      <= 1'b0;
      boundary    <= '0;
      sum         <= '0;
      cnt         <= '0;
      collecting  <= 1'b0;
      bit_valid   <= 1'b0;
      bit_o       <= 1'b0;
      transitions <= '0;
    end else begin
      bit_valid <= 1'b0;
      if (in_valid) begin
        prev_sign <= sign_now;
        have_prev <= 1'b1;
        ms_idx    <= (ms_idx == 5'(MS_PER_BIT - 1)) ? '0 : ms_idx + 1'b1;
        if (flip && transitions != 8'hFF) transitions <= transitions + 1'b1;

        if (!locked) begin
          if (flip) begin
            hist[ms_idx] <= hist[ms_idx] + 1'b1;
            if (hist[ms_idx] + 1'b1 == 4'(LOCK_COUNT)) begin
              locked     <= 1'b1;
              boundary   <= ms_idx;
              // this dump is the first of a new bit
              sum        <= SUM_W'(ip);
              cnt        <= 5'd1;
              collecting <= 1'b1;
            end
          end
        end else if (ms_idx == boundary) begin
          sum        <= SUM_W'(ip);
          cnt        <= 5'd1;
          collecting <= 1'b1;
        end else if (collecting) begin
          sum <= sum_next;
          cnt <= cnt + 1'b1;
          if (cnt == 5'(MS_PER_BIT - 1)) begin
            bit_valid  <= 1'b1;
            bit_o      <= !sum_next[SUM_W-1];
            collecting <= 1'b0;
          end
        end
      end
    end
  end
endmodule
