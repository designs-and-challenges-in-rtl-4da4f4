// tb_nav_frame_sync: bit streams built from correctly encoded subframes.
//  1. Upright stream: random lead-in, then four subframes. The block must
//     find a candidate at the end of the first HOW (VERIFY), confirm at the
//     second subframe (LOCKED) and count each later one, with the HOW data
//     of the last subframe reported.
//  2. The same kind of stream inverted: it must lock with inverted set.
//  3. A stream whose third TLM has a parity error: a parity failure is
//     flagged and the lock is dropped where the subframe was due.
module tb_nav_frame_sync;
  import gps_pkg::*;
  import gps_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, bit_valid = 0, bit_i = 0;
  logic locked, verifying, inverted, preamble_hit, candidate, parity_fail, subframe;
  logic [7:0] preamble_count, parity_fail_count, subframe_count;
  logic [23:0] how_data;
  int checks = 0, failures = 0;

  nav_frame_sync dut (.*);
  always #5 clk = ~clk;

  bit stream [$];
  bit [23:0] hows [$];
  int sub_pulses, cand_pulses, pf_pulses;
  always @(posedge clk) begin
    if (subframe) sub_pulses++;
    if (candidate) cand_pulses++;
    if (parity_fail) pf_pulses++;
  end

  task automatic build(input int nsub, input int corrupt_sub);
    bit s29, s30;
    bit bits [300];
    bit [23:0] hd;
    stream.delete(); hows.delete();
    for (int i = 0; i < 37; i++) stream.push_back(1'($urandom));
    stream.push_back(0); stream.push_back(0);   // previous word ends in 00
    s29 = 0; s30 = 0;
    for (int s = 0; s < nsub; s++) begin
      make_subframe(17'(100 + s), s29, s30, bits, hd);
      if (s == corrupt_sub) bits[27] = ~bits[27];   // TLM parity bit
      foreach (bits[b]) stream.push_back(bits[b]);
      hows.push_back(hd);
    end
  endtask

  task automatic send(input bit inv);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    sub_pulses = 0; cand_pulses = 0; pf_pulses = 0;
    foreach (stream[i]) begin
      @(negedge clk); bit_valid = 1; bit_i = stream[i] ^ inv;
      @(negedge clk); bit_valid = 0;
      // end of the first HOW: 39 lead-in bits + 60
      if (i == 39 + 59) begin
        @(negedge clk);
        checks++;
        if (!verifying) begin failures++; $display("FAIL: not verifying after first HOW"); end
      end
      if (i == 39 + 300 + 59) begin
        @(negedge clk);
        checks++;
        if (!locked) begin failures++; $display("FAIL: not locked after second subframe"); end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // 1. upright
    build(4, -1);
    send(0);
    checks += 5;
    if (!locked || inverted) begin failures++; $display("FAIL: upright lock"); end
    if (subframe_count != 8'd3 || sub_pulses != 3) begin failures++; $display("FAIL: subframes %0d", subframe_count); end
    if (how_data != hows[3]) begin failures++; $display("FAIL: HOW %h exp %h", how_data, hows[3]); end
    if (cand_pulses < 4) begin failures++; $display("FAIL: candidates %0d", cand_pulses); end
    if (preamble_count < 4) begin failures++; $display("FAIL: preambles"); end
    $display("upright: preambles %0d, parity fails %0d, subframes %0d", preamble_count, parity_fail_count, subframe_count);
    // 2. inverted
    build(3, -1);
    send(1);
    checks += 2;
    if (!locked || !inverted) begin failures++; $display("FAIL: inverted lock"); end
    if (subframe_count != 8'd2) begin failures++; $display("FAIL: inverted subframes %0d", subframe_count); end
    // 3. parity error in the third TLM
    build(3, 2);
    send(0);
    checks += 3;
    if (locked) begin failures++; $display("FAIL: lock kept through a bad TLM"); end
    if (pf_pulses < 1 || parity_fail_count < 1) begin failures++; $display("FAIL: parity failure not flagged"); end
    if (subframe_count != 8'd1) begin failures++; $display("FAIL: corrupt run subframes %0d", subframe_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
