// tb_pingpong_buffer: records a numbered sample stream (one sample every
// 12 clocks, as in the receiver) into a small ping-pong buffer and, after
// every swap, plays the finished block back at one address per clock.
// Checks: the swap comes exactly every DEPTH samples, the play_sel flips,
// the playback block holds exactly the last DEPTH samples in order (no
// sample lost at the swap), and playback reads are not disturbed by the
// recording going on at the same time.
module tb_pingpong_buffer;
  import gps_pkg::*;
  localparam int DEPTH = 100;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0;
  sample_t wr_data = '0;
  logic [AW-1:0] rd_addr = '0;
  sample_t rd_data;
  logic swap, play_sel;
  logic [AW-1:0] wr_addr;
  int checks = 0, failures = 0;

  pingpong_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  sample_t hist [$];      // every sample written, in order
  int n_written = 0;
  int swaps = 0, last_swap_at = 0;

  // sample source: one sample every 12 clocks
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    forever begin
      repeat (11) @(posedge clk);
      wr_valid <= 1;
      wr_data  <= sample_t'($urandom);
      @(posedge clk);
      wr_valid <= 0;
    end
  end
  always @(posedge clk) if (rst_n && wr_valid) begin
    hist.push_back(wr_data);
    n_written++;
  end

  // playback checker
  initial begin
    bit exp_sel;
    exp_sel = 1;  // block 1 is the idle playback block before the first swap
    wait (rst_n);
    repeat (6) begin
      @(posedge clk iff swap);
      swaps++;
      checks++;
      if (n_written != swaps * DEPTH) begin
        failures++;
        $display("FAIL: swap after %0d samples, expected %0d", n_written, swaps * DEPTH);
      end
      exp_sel = ~exp_sel;
      checks++;
      if (play_sel != exp_sel) begin failures++; $display("FAIL: play_sel"); end
      // read the whole block back, one address per clock
      for (int a = 0; a <= DEPTH; a++) begin
        @(negedge clk);
        if (a < DEPTH) rd_addr = AW'(a);
        if (a > 0) begin
          checks++;
          if (rd_data != hist[(swaps - 1) * DEPTH + a - 1]) begin
            failures++;
            $display("FAIL: block %0d addr %0d got %0d exp %0d", swaps, a - 1, rd_data,
                     hist[(swaps - 1) * DEPTH + a - 1]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * DEPTH * 10) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
