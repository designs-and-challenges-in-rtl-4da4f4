// receiver_regs: the memory-mapped registers through which the processor
// governs acquisition and tracking and reads their results.
//
// The receiver exchanges with its processor the acquisition value
// (magnitude squared), the six tracking accumulators and the two loop
// discriminator outputs, and receives search and NCO settings. The bus
// here is a plain single-clock register port (word address, write strobe,
// read strobe, read data one clock later) standing in for the processor
// bus slave; the register map (gps_pkg::reg_addr_e) and the interrupt
// scheme are this design's choices.
//
// Status layout: REG_STATUS [0] acquisition busy, [1] acquired, [2] failed,
// [7:4] Tong counter, [8] tracking running, [9] carrier mode, [12:10]
// pending interrupts; REG_NAV_STATUS [0] bit sync locked, [5:1] bit
// boundary, [8] frame locked, [9] inverted, [10] verifying; REG_NAV_WORDS
// [7:0] preambles, [15:8] parity failures, [23:16] subframes.
//
// Write side: REG_CTRL bits 0..2 produce one-clock command pulses
// (acquisition start, tracking start, tracking stop); bit 8 is the carrier
// discriminator mode (0 FLL, 1 PLL) and bits 13:10 the quantiser shift.
// Interrupt causes (acquisition decided, 1 ms dump, subframe) latch in
// irq_pending and are cleared by writing 1s to REG_IRQ_CLR; irq is their OR.
module receiver_regs
  import gps_pkg::*;
#(
  parameter int ERR_W = 2 * ACC_W + 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic [4:0]  bus_addr,
  input  logic        bus_wr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_rd,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  output logic        irq,
  // control out
  output logic        acq_start,
  output logic        trk_start,
  output logic        trk_stop,
  output logic        carr_mode,
  output logic [3:0]  quant_shift,
  output logic [5:0]  prn,
  output logic [10:0] acq_phase,
  output logic [31:0] acq_carr_fw,
  output logic [31:0] acq_code_fw,
  output logic [31:0] trk_carr_fw,
  output logic [31:0] trk_code_fw,
  output logic [10:0] trk_phase,
  // status in
  input  logic        acq_busy,
  input  logic        acq_acquired,
  input  logic        acq_failed,
  input  logic [3:0]  acq_count,
  input  logic        acq_decided,
  input  mag_t        acq_mag,
  input  logic        trk_running,
  input  logic        trk_dump,
  input  epl_t        trk_acc,
  input  logic [31:0] trk_dump_count,
  input  logic signed [ERR_W-1:0] dll_err,
  input  logic signed [ERR_W-1:0] carr_err,
  input  logic        bit_locked,
  input  logic [4:0]  bit_boundary,
  input  logic        frame_locked,
  input  logic        frame_verifying,
  input  logic        frame_inverted,
  input  logic        frame_subframe,
  input  logic [7:0]  preamble_count,
  input  logic [7:0]  parity_fail_count,
  input  logic [7:0]  subframe_count,
  input  logic [23:0] how_data
);
  logic [2:0] irq_pending;
  reg_addr_e  addr;
  assign addr = reg_addr_e'(bus_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acq_start   <= 1'b0;
      trk_start   <= 1'b0;
      trk_stop    <= 1'b0;
      carr_mode   <= 1'b0;
      quant_shift <= 4'd0;
      prn         <= 6'd1;
      acq_phase   <= '0;
      acq_carr_fw <= CARR_FW_NOMINAL;
      acq_code_fw <= CODE_FW_NOMINAL;
      trk_carr_fw <= CARR_FW_NOMINAL;
      trk_code_fw <= CODE_FW_NOMINAL;
      trk_phase   <= '0;
      irq_pending <= '0;
    end else begin
      acq_start <= 1'b0;
      trk_start <= 1'b0;
      trk_stop  <= 1'b0;
      // interrupt causes
      irq_pending <= irq_pending | {frame_subframe, trk_dump, acq_decided};
      if (bus_wr) begin
        unique case (addr)
          REG_CTRL: begin
            acq_start   <= bus_wdata[0];
            trk_start   <= bus_wdata[1];
            trk_stop    <= bus_wdata[2];
            carr_mode   <= bus_wdata[8];
            quant_shift <= bus_wdata[13:10];
          end
          REG_PRN:         prn         <= bus_wdata[5:0];
          REG_ACQ_PHASE:   acq_phase   <= bus_wdata[10:0];
          REG_ACQ_CARR_FW: acq_carr_fw <= bus_wdata;
          REG_ACQ_CODE_FW: acq_code_fw <= bus_wdata;
          REG_TRK_CARR_FW: trk_carr_fw <= bus_wdata;
          REG_TRK_CODE_FW: trk_code_fw <= bus_wdata;
          REG_TRK_PHASE:   trk_phase   <= bus_wdata[10:0];
          REG_IRQ_CLR:     irq_pending <= (irq_pending | {frame_subframe, trk_dump, acq_decided})
                                          & ~bus_wdata[2:0];
          default: ;
        endcase
      end
    end
  end

  assign irq = |irq_pending;

  logic [31:0] rmux;
  always_comb begin
    unique case (addr)
      REG_CTRL:        rmux = {18'd0, quant_shift, 1'b0, carr_mode, 8'd0};
      REG_STATUS:      rmux = {19'd0, irq_pending, carr_mode, trk_running,
                               acq_count, 1'b0, acq_failed, acq_acquired, acq_busy};
      REG_PRN:         rmux = {26'd0, prn};
      REG_ACQ_PHASE:   rmux = {21'd0, acq_phase};
      REG_ACQ_CARR_FW: rmux = acq_carr_fw;
      REG_ACQ_CODE_FW: rmux = acq_code_fw;
      REG_ACQ_MAG_LO:  rmux = acq_mag[31:0];
      REG_ACQ_MAG_HI:  rmux = 32'(acq_mag >> 32);
      REG_TRK_CARR_FW: rmux = trk_carr_fw;
      REG_TRK_CODE_FW: rmux = trk_code_fw;
      REG_TRK_PHASE:   rmux = {21'd0, trk_phase};
      REG_IE:          rmux = 32'(trk_acc.ie);
      REG_IP:          rmux = 32'(trk_acc.ip);
      REG_IL:          rmux = 32'(trk_acc.il);
      REG_QE:          rmux = 32'(trk_acc.qe);
      REG_QP:          rmux = 32'(trk_acc.qp);
      REG_QL:          rmux = 32'(trk_acc.ql);
      REG_DLL_ERR:     rmux = 32'(dll_err >>> (ERR_W - 32));
      REG_CARR_ERR:    rmux = 32'(carr_err >>> (ERR_W - 32));
      REG_NAV_STATUS:  rmux = {21'd0, frame_verifying, frame_inverted, frame_locked,
                               2'd0, bit_boundary, bit_locked};
      REG_NAV_WORDS:   rmux = {8'd0, subframe_count, parity_fail_count, preamble_count};
      REG_DUMP_COUNT:  rmux = trk_dump_count;
      REG_HOW:         rmux = {8'd0, how_data};
      default:         rmux = 32'hDEAD_0000 | 32'(bus_addr);
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_rd;
      if (bus_rd) bus_rdata <= rmux;
    end
  end

  // bus rule: a cycle is a read or a write, never both
  a_bus_rw: assert property (@(posedge clk) disable iff (!rst_n) !(bus_rd && bus_wr))
    else $error("simultaneous register read and write");
endmodule
