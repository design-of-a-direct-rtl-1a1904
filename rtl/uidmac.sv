// uidmac: four-channel DMA controller unit for the RISC32 system bus.
//
// An I/O device raises DREQ; the controller asks the processor for the bus
// with HRQ (holdrq), and once hold acknowledge comes back it drives a 16-bit
// address and the memory and I/O strobes so that a byte moves directly
// between memory and the device (or, in memory-to-memory mode, from one
// memory block to another through the internal temporary register). The
// upper address byte A15..A8 goes out on the data bus while ADSTB is high in
// state S1 and must be held by an external 8-bit latch; A7..A4 come from
// addr_msb and A3..A0 from addr_lsb. In the idle cycle the processor reads
// and writes the controller's registers through chip select, IOR/IOW and
// A3..A0.
//
// The unit is three blocks: the datapath (address and word-count registers,
// CPU register port, address pins), the timing and control unit (command and
// mode registers, state machine, strobes, EOP) and the priority unit (status,
// mask and request registers, priority encoder, HRQ/DACK).
//
// Bidirectional pins (data bus, IOR, IOW, EOP, A3..A0) are split into an
// input, an output value and an output enable; three-state outputs
// (A7..A4) have an enable. The board must combine them. EOP is open-drain:
// uidmac_eop_oe high means the controller pulls the pin low. Reset is synchronous and
// active high. One transfer takes four clocks (S1..S4) when A15..A8 must be
// strobed and three (S2..S4) otherwise; compressed timing takes two.
module uidmac
  import dmac_pkg::*;
(
  input  logic           uidmac_clk,
  input  logic           uidmac_rst,
  input  logic [3:0]     uidmac_dreq,
  input  logic           uidmac_hold_ack,
  input  logic           uidmac_rdy,
  input  logic           uidmac_chipslt_n,
  // data bus
  input  logic [7:0]     uidmac_databus_i,
  output logic [7:0]     uidmac_databus_o,
  output logic           uidmac_databus_oe,
  // I/O strobes (inputs in the idle cycle, outputs in the active cycle)
  input  logic           uidmac_iord_n_i,
  input  logic           uidmac_iowr_n_i,
  output logic           uidmac_iord_n_o,
  output logic           uidmac_iowr_n_o,
  output logic           uidmac_io_oe,
  // end of process
  input  logic           uidmac_eop_n_i,
  output logic           uidmac_eop_oe,
  // address
  input  logic [3:0]     uidmac_addr_lsb_i,
  output logic [3:0]     uidmac_addr_lsb_o,
  output logic           uidmac_addr_lsb_oe,
  output logic [3:0]     uidmac_addr_msb,
  output logic           uidmac_addr_msb_oe,
  // bus request and control
  output logic           uidmac_holdrq,
  output logic [3:0]     uidmac_dack,
  output logic           uidmac_aen,
  output logic           uidmac_memr_n,
  output logic           uidmac_memw_n,
  output logic           uidmac_adstb
);

  regop_t         regop;
  logic [7:0]     wdata;
  cmd_t           cmd;
  logic [5:0]     mode_rd;
  logic [7:0]     status;
  logic [NCH-1:0] mask, req, valid_dreq, restore;
  logic [1:0]     pr_ch, ch, fin_ch;
  logic           hrq, dack_en, fin, fin_autoinit, release_svc;
  logic           last, upper_change, dec, addr_hold, xfer_done, latch_tmp, drive_tmp;
  dma_state_e     state;
  logic [AW-1:0]  addr, tmp_addr, tmp_cnt;

  bidmac_dp u_dp (
    .bidmac_dp_clk        (uidmac_clk),
    .bidmac_dp_rst        (uidmac_rst),
    .bidmac_dp_chipslt_n  (uidmac_chipslt_n),
    .bidmac_dp_iord_n     (uidmac_iord_n_i),
    .bidmac_dp_iowr_n     (uidmac_iowr_n_i),
    .bidmac_dp_hold_ack   (uidmac_hold_ack),
    .bidmac_dp_addr_lsb_i (uidmac_addr_lsb_i),
    .bidmac_dp_databus_i  (uidmac_databus_i),
    .bidmac_dp_databus_o  (uidmac_databus_o),
    .bidmac_dp_databus_oe (uidmac_databus_oe),
    .bidmac_dp_addr_lsb_o (uidmac_addr_lsb_o),
    .bidmac_dp_addr_lsb_oe(uidmac_addr_lsb_oe),
    .bidmac_dp_addr_msb   (uidmac_addr_msb),
    .bidmac_dp_addr_msb_oe(uidmac_addr_msb_oe),
    .state, .ch, .dec, .addr_hold, .xfer_done, .restore, .latch_tmp, .drive_tmp,
    .status_rd (status),
    .cmd_rd    (cmd),
    .req_rd    (req),
    .mask_rd   (mask),
    .mode_rd,
    .regop, .wdata, .last, .upper_change, .addr,
    .tmp_addr_o(tmp_addr),
    .tmp_cnt_o (tmp_cnt)
  );

  bidmac_ctrl_time u_tc (
    .bidmac_ctrl_time_clk     (uidmac_clk),
    .bidmac_ctrl_time_rst     (uidmac_rst),
    .bidmac_ctrl_time_hold_ack(uidmac_hold_ack),
    .bidmac_ctrl_time_rdy     (uidmac_rdy),
    .bidmac_ctrl_time_eop_n_i (uidmac_eop_n_i),
    .bidmac_ctrl_time_aen     (uidmac_aen),
    .bidmac_ctrl_time_adstb   (uidmac_adstb),
    .bidmac_ctrl_time_memr_n  (uidmac_memr_n),
    .bidmac_ctrl_time_memw_n  (uidmac_memw_n),
    .bidmac_ctrl_time_iord_n  (uidmac_iord_n_o),
    .bidmac_ctrl_time_iowr_n  (uidmac_iowr_n_o),
    .bidmac_ctrl_time_io_oe   (uidmac_io_oe),
    .bidmac_ctrl_time_eop_oe  (uidmac_eop_oe),
    .regop, .wdata, .cmd, .mode_rd,
    .valid_dreq, .pr_ch, .hrq, .dack_en, .fin, .fin_ch, .fin_autoinit, .release_svc,
    .last, .upper_change, .state, .ch, .dec, .addr_hold, .xfer_done, .restore,
    .latch_tmp, .drive_tmp
  );

  bidmac_pr u_pr (
    .bidmac_pr_clk     (uidmac_clk),
    .bidmac_pr_rst     (uidmac_rst),
    .bidmac_pr_dreq    (uidmac_dreq),
    .bidmac_pr_hold_ack(uidmac_hold_ack),
    .bidmac_pr_dack    (uidmac_dack),
    .bidmac_pr_holdrq  (uidmac_holdrq),
    .regop, .wdata, .cmd, .status, .mask, .req,
    .hrq, .dack_en, .fin, .fin_ch, .fin_autoinit, .release_svc, .valid_dreq,
    .ch (pr_ch)
  );

  // The datapath's current address and temporary registers are internal
  // observation points; the address pins carry the same value.
  logic unused_obs;
  assign unused_obs = ^{addr, tmp_addr, tmp_cnt};

  // Bus rules: address and strobes only while the bus is held, and never
  // both memory strobes at once.
  a_aen_hrq:  assert property (@(posedge uidmac_clk) disable iff (uidmac_rst)
                               uidmac_aen |-> uidmac_holdrq);
  a_strobe:   assert property (@(posedge uidmac_clk) disable iff (uidmac_rst)
                               (!uidmac_memr_n || !uidmac_memw_n) |-> uidmac_aen);
  a_one_mem:  assert property (@(posedge uidmac_clk) disable iff (uidmac_rst)
                               !(!uidmac_memr_n && !uidmac_memw_n));

endmodule
