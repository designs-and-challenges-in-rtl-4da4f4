// tb_receiver_regs: writes every control register and reads it back,
// checks the reset values (nominal carrier and code words), that command
// bits give one-clock pulses, that each status register shows the inputs
// in the documented bit positions, and the interrupt latch and clear.
module tb_receiver_regs;
  import gps_pkg::*;
  localparam int ERR_W = 2 * ACC_W + 2;
  logic clk = 0, rst_n = 0;
  logic [4:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid, irq;
  logic acq_start, trk_start, trk_stop, carr_mode;
  logic [3:0] quant_shift;
  logic [5:0] prn;
  logic [10:0] acq_phase, trk_phase;
  logic [31:0] acq_carr_fw, acq_code_fw, trk_carr_fw, trk_code_fw;
  logic acq_busy = 0, acq_acquired = 0, acq_failed = 0, acq_decided = 0;
  logic [3:0] acq_count = '0;
  mag_t acq_mag = '0;
  logic trk_running = 0, trk_dump = 0;
  epl_t trk_acc = '0;
  logic [31:0] trk_dump_count = '0;
  logic signed [ERR_W-1:0] dll_err = '0, carr_err = '0;
  logic bit_locked = 0, frame_locked = 0, frame_verifying = 0, frame_inverted = 0, frame_subframe = 0;
  logic [4:0] bit_boundary = '0;
  logic [7:0] preamble_count = '0, parity_fail_count = '0, subframe_count = '0;
  logic [23:0] how_data = '0;
  int checks = 0, failures = 0;

  receiver_regs dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0;
    if (!bus_rvalid) begin failures++; $display("FAIL: no rvalid"); end
    d = bus_rdata;
  endtask

  task automatic expect_rd(input reg_addr_e a, input logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL: %s read %h exp %h", a.name(), d, e); end
  endtask

  int pulses_acq = 0, pulses_ts = 0, pulses_tp = 0;
  always @(posedge clk) if (rst_n) begin
    if (acq_start) pulses_acq++;
    if (trk_start) pulses_ts++;
    if (trk_stop)  pulses_tp++;
  end

  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // reset values
    expect_rd(REG_ACQ_CARR_FW, CARR_FW_NOMINAL);
    expect_rd(REG_TRK_CARR_FW, CARR_FW_NOMINAL);
    expect_rd(REG_TRK_CODE_FW, CODE_FW_NOMINAL);
    expect_rd(REG_ACQ_CODE_FW, CODE_FW_NOMINAL);
    expect_rd(REG_PRN, 32'd1);
    // control registers
    for (int i = 0; i < 20; i++) begin
      logic [31:0] r;
      r = $urandom;
      wr(REG_PRN, r);         expect_rd(REG_PRN, {26'd0, r[5:0]});
      checks++; if (prn != r[5:0]) begin failures++; $display("FAIL: prn port"); end
      wr(REG_ACQ_PHASE, r);   expect_rd(REG_ACQ_PHASE, {21'd0, r[10:0]});
      checks++; if (acq_phase != r[10:0]) begin failures++; $display("FAIL: acq_phase port"); end
      wr(REG_ACQ_CARR_FW, r); expect_rd(REG_ACQ_CARR_FW, r);
      wr(REG_TRK_CARR_FW, ~r); expect_rd(REG_TRK_CARR_FW, ~r);
      wr(REG_TRK_CODE_FW, r ^ 32'h55); expect_rd(REG_TRK_CODE_FW, r ^ 32'h55);
      checks++; if (acq_carr_fw != r || trk_carr_fw != ~r || trk_code_fw != (r ^ 32'h55)) begin
        failures++; $display("FAIL: fw ports");
      end
      wr(REG_ACQ_CODE_FW, r ^ 32'h77); expect_rd(REG_ACQ_CODE_FW, r ^ 32'h77);
      checks++; if (acq_code_fw != (r ^ 32'h77)) begin failures++; $display("FAIL: acq code fw port"); end
      wr(REG_TRK_PHASE, r);   expect_rd(REG_TRK_PHASE, {21'd0, r[10:0]});
      checks++; if (trk_phase != r[10:0]) begin failures++; $display("FAIL: trk_phase port"); end
    end
    // command pulses and mode bits
    wr(REG_CTRL, 32'h0000_2907);   // start acq + trk, stop, PLL, shift 10
    repeat (2) @(negedge clk);
    checks += 3;
    if (pulses_acq != 1 || pulses_ts != 1 || pulses_tp != 1) begin failures++; $display("FAIL: pulses"); end
    if (!carr_mode || quant_shift != 4'd10) begin failures++; $display("FAIL: mode/shift"); end
    if (acq_start || trk_start) begin failures++; $display("FAIL: pulse stuck"); end
    expect_rd(REG_CTRL, 32'h0000_2900);
    // status inputs
    acq_busy = 1; acq_acquired = 0; acq_failed = 1; acq_count = 4'd5; trk_running = 1;
    expect_rd(REG_STATUS, 32'h0000_0355);
    acq_mag = mag_t'(64'h0000_0123_89AB_CDEF);
    expect_rd(REG_ACQ_MAG_LO, 32'h89AB_CDEF);
    expect_rd(REG_ACQ_MAG_HI, 32'h0000_0123);
    trk_acc.ie = -24'sd5; trk_acc.ip = 24'sd3000; trk_acc.il = 24'sd7;
    trk_acc.qe = 24'sd8;  trk_acc.qp = -24'sd9;   trk_acc.ql = 24'sd10;
    expect_rd(REG_IE, 32'hFFFF_FFFB);
    expect_rd(REG_IP, 32'd3000);
    expect_rd(REG_IL, 32'd7);
    expect_rd(REG_QE, 32'd8);
    expect_rd(REG_QP, 32'hFFFF_FFF7);
    expect_rd(REG_QL, 32'd10);
    dll_err = -(ERR_W'(1) <<< 40);
    expect_rd(REG_DLL_ERR, 32'hFFC0_0000);   // upper 32 of 50 bits
    carr_err = (ERR_W'(3) <<< 18);
    expect_rd(REG_CARR_ERR, 32'd3);
    bit_locked = 1; bit_boundary = 5'd13; frame_locked = 1; frame_inverted = 1;
    expect_rd(REG_NAV_STATUS, 32'h0000_031B);
    preamble_count = 8'd9; parity_fail_count = 8'd2; subframe_count = 8'd4;
    expect_rd(REG_NAV_WORDS, 32'h0004_0209);
    trk_dump_count = 32'd12345; expect_rd(REG_DUMP_COUNT, 32'd12345);
    how_data = 24'hABCDEF; expect_rd(REG_HOW, 32'h00AB_CDEF);
    // interrupts: acquisition decided, then a dump; clear one at a time
    checks++; if (irq) begin failures++; $display("FAIL: irq at rest"); end
    @(negedge clk); acq_decided = 1; @(negedge clk); acq_decided = 0;
    @(negedge clk); trk_dump = 1; @(negedge clk); trk_dump = 0;
    checks++; if (!irq) begin failures++; $display("FAIL: irq not raised"); end
    rd(REG_STATUS, v);
    checks++; if (v[12:10] != 3'b011) begin failures++; $display("FAIL: pending %b", v[12:10]); end
    wr(REG_IRQ_CLR, 32'd1);
    checks++; if (!irq) begin failures++; $display("FAIL: irq cleared too much"); end
    wr(REG_IRQ_CLR, 32'd2);
    checks++; if (irq) begin failures++; $display("FAIL: irq not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
