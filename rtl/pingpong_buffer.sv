// pingpong_buffer: two sample memories used alternately for recording and
// playback.
//
// One data block is in record mode: its write address advances once per
// incoming 6.25 MHz sample and its data input is the quantised ADC stream.
// The other is in playback mode: it is read at the full system clock by the
// serial search, through rd_addr, and its input is unused. When the
// recording block has been filled (DEPTH samples, 2 ms at the default
// 12500) the two swap roles on the very next sample, so no sample is lost.
// Depth, rates and the swap rule follow the receiver description; storing
// a 4-bit sample per entry (instead of one per 32-bit word) is this
// design's choice.
//
// Timing: rd_data is registered, valid the clock after rd_addr. swap
// pulses for one clock right after the last sample of a block is written;
// from then on the block just filled is the playback block (play_sel).
module pingpong_buffer
  import gps_pkg::*;
#(
  parameter int DEPTH = 12500,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // record side (sample rate)
  input  logic          wr_valid,
  input  sample_t       wr_data,
  // playback side (system clock)
  input  logic [AW-1:0] rd_addr,
  output sample_t       rd_data,
  // status
  output logic          swap,      // one-clock pulse: a full block is ready
  output logic          play_sel,  // block now in playback mode (0 or 1)
  output logic [AW-1:0] wr_addr
);
  sample_t mem0 [DEPTH];
  sample_t mem1 [DEPTH];
  logic    rec_sel;  // block now in record mode

  assign play_sel = ~rec_sel;

  // record: address counter driven by the sample strobe
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rec_sel <= 1'b0;
      wr_addr <= '0;
      swap    <= 1'b0;
    end else begin
      swap <= 1'b0;
      if (wr_valid) begin
        if (wr_addr == AW'(DEPTH - 1)) begin
          wr_addr <= '0;
          rec_sel <= ~rec_sel;
          swap    <= 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !rec_sel) mem0[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (wr_valid && rec_sel) mem1[wr_addr] <= wr_data;
  end

  // playback: read the block that is not recording
  sample_t rd0, rd1;
  always_ff @(posedge clk) rd0 <= mem0[rd_addr];
  always_ff @(posedge clk) rd1 <= mem1[rd_addr];

  logic play_sel_q;
  always_ff @(posedge clk) play_sel_q <= play_sel;
  assign rd_data = play_sel_q ? rd1 : rd0;

  // the blocks swap only on the write that fills the record block
  a_swap_full: assert property (@(posedge clk) disable iff (!rst_n)
                                swap |-> $past(wr_valid) && $past(wr_addr) == AW'(DEPTH - 1))
    else $error("buffer swapped before the record block was full");
endmodule
