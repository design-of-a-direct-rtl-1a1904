// bidmac_pr: priority unit of the DMA controller.
//
// Holds the 8-bit status register, the 4-bit mask register and the 4-bit
// request register, and decides which channel is served. A channel's request
// is valid when its DREQ pin is active (polarity from command bit 6) and its
// mask bit is clear, or when its software request bit is set; no request is
// valid while the controller is disabled (command bit 2). Among valid
// requests the winner is channel 0 first (fixed priority) or, with command
// bit 4, the channel after the one served last (rotating priority). The
// winner is frozen when HRQ is answered by hold acknowledge and stays the
// served channel until the service is released.
//
// HRQ comes from the timing and control unit. DACK of the served channel is
// driven while dack_en is high, with the polarity of command bit 7 (active
// low by default). When a service ends on terminal count or EOP (fin), the
// status TC bit of that channel is set, its request bit is cleared, and its
// mask bit is set unless the channel autoinitializes. Reading the status
// register clears the TC bits (status bits 7..4 show pending requests).
//
// Register contents and bit layouts follow the design description; the
// reset value of the mask (all clear) follows its reset test case. The
// grant/freeze timing is this implementation's choice.
module bidmac_pr
  import dmac_pkg::*;
(
  input  logic              bidmac_pr_clk,
  input  logic              bidmac_pr_rst,
  input  logic [NCH-1:0]    bidmac_pr_dreq,
  input  logic              bidmac_pr_hold_ack,
  output logic [NCH-1:0]    bidmac_pr_dack,
  output logic              bidmac_pr_holdrq,
  // register access
  input  regop_t            regop,
  input  logic [7:0]        wdata,
  input  cmd_t              cmd,
  output logic [7:0]        status,
  output logic [NCH-1:0]    mask,
  output logic [NCH-1:0]    req,
  // timing and control
  input  logic              hrq,
  input  logic              dack_en,
  input  logic              fin,
  input  logic [1:0]        fin_ch,
  input  logic              fin_autoinit,
  input  logic              release_svc,
  output logic [NCH-1:0]    valid_dreq,
  output logic [1:0]        ch
);

  logic [NCH-1:0] tc_q;
  logic [1:0]     ch_q, last_ch_q;
  logic           locked_q;
  logic [NCH-1:0] dreq_act;

  assign dreq_act   = bidmac_pr_dreq ^ {NCH{cmd.dreq_lo}};
  assign valid_dreq = cmd.disable_c ? '0 : ((dreq_act & ~mask) | req);

  // Priority encoder: fixed (0 highest) or rotating (after last served)
  logic [1:0] winner;
  always_comb begin
    logic [1:0] start, idx;
    start  = cmd.rotate ? last_ch_q + 2'd1 : 2'd0;
    winner = start;
    for (int k = NCH - 1; k >= 0; k--) begin
      idx = start + 2'(k);
      if (valid_dreq[idx]) winner = idx;
    end
  end

  assign ch = locked_q ? ch_q : winner;

  always_ff @(posedge bidmac_pr_clk) begin
    if (bidmac_pr_rst || regop.master_clr) begin
      tc_q      <= '0;
      mask      <= '0;
      req       <= '0;
      ch_q      <= '0;
      last_ch_q <= 2'd3;
      locked_q  <= 1'b0;
    end else begin
      // grant: freeze the winner
      if (hrq && bidmac_pr_hold_ack && !locked_q && |valid_dreq) begin
        ch_q     <= winner;
        locked_q <= 1'b1;
      end
      if (release_svc) begin
        locked_q  <= 1'b0;
        last_ch_q <= ch;
      end else if (!hrq) begin
        locked_q  <= 1'b0;
      end

      // status TC bits
      if (regop.rd_status) tc_q <= '0;
      if (fin)             tc_q[fin_ch] <= 1'b1;

      // mask register
      if (regop.wr_smask)   mask[wdata[1:0]] <= wdata[2];
      if (regop.clr_mask)   mask <= '0;
      if (regop.wr_allmask) mask <= wdata[NCH-1:0];
      if (fin && !fin_autoinit) mask[fin_ch] <= 1'b1;

      // request register
      if (regop.wr_req) req[wdata[1:0]] <= wdata[2];
      if (fin) begin
        req[fin_ch] <= 1'b0;
        req[ch]     <= 1'b0;
      end
    end
  end

  assign status = {(dreq_act | req), tc_q};

  assign bidmac_pr_holdrq = hrq;
  always_comb begin
    bidmac_pr_dack = '0;
    if (dack_en) bidmac_pr_dack[ch] = 1'b1;
    if (!cmd.dack_hi) bidmac_pr_dack = ~bidmac_pr_dack;
  end

endmodule
