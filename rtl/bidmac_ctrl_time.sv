// bidmac_ctrl_time: timing and control unit of the DMA controller.
//
// Holds the 8-bit command register and the four 6-bit mode registers and runs
// the state machine of the controller:
//
//   SI  idle cycle; the CPU may program the registers. A valid request
//       (from the priority unit) moves to S0.
//   S0  hold request (HRQ) to the CPU; wait for hold acknowledge. Back to SI
//       if the request goes away.
//   S1  AEN and ADSTB high, full address on the pins (A15..A8 on the data
//       bus). Back to SI on external EOP or loss of hold acknowledge.
//   S2  read strobe low (MEMR for a read transfer, IOR for a write
//       transfer); write strobe low as well with extended write.
//   S3  read and write strobes low; held here while READY is low.
//   S4  strobes high; internal EOP low if the word count ran out. The
//       address and count step at the end of S4. The service then goes on
//       with S2 (same A15..A8), S1 (A15..A8 changed) or ends in SI, as the
//       channel's mode says: single mode ends after each transfer, demand
//       mode while DREQ stays active, block mode at terminal count or EOP.
//   SC  cascade: HRQ and DACK follow the request; no address or strobe.
//
// Compressed timing drops S3 (strobes in S2 only, READY sampled in S2).
// Memory-to-memory (command bit 0, started by a channel 0 request) runs two
// S1..S4 passes per byte: a memory read at channel 0's address into the
// temporary register, then a memory write at channel 1's address; channel 1's
// word count ends the service.
//
// Interface: all outputs are registered-state decodes (Moore); strobes are
// active low. xfer_done pulses in the last cycle of S4, fin in the last cycle
// of a service ended by terminal count or EOP, release in the last cycle of
// any service.
//
// The states SI, S0..S4, their outputs and the command / mode bit meanings
// follow the design description. The cascade state, READY wait in S3, the
// continuation S4->S2/S1 and letting an EOP seen in S2/S3 finish the current
// transfer through S4 are choices of this implementation.
module bidmac_ctrl_time
  import dmac_pkg::*;
(
  input  logic              bidmac_ctrl_time_clk,
  input  logic              bidmac_ctrl_time_rst,
  input  logic              bidmac_ctrl_time_hold_ack,
  input  logic              bidmac_ctrl_time_rdy,
  input  logic              bidmac_ctrl_time_eop_n_i,
  // control pins
  output logic              bidmac_ctrl_time_aen,
  output logic              bidmac_ctrl_time_adstb,
  output logic              bidmac_ctrl_time_memr_n,
  output logic              bidmac_ctrl_time_memw_n,
  output logic              bidmac_ctrl_time_iord_n,
  output logic              bidmac_ctrl_time_iowr_n,
  output logic              bidmac_ctrl_time_io_oe,    // IOR/IOW driven by the controller
  output logic              bidmac_ctrl_time_eop_oe,   // internal EOP: pull the pin low
  // register access
  input  regop_t            regop,
  input  logic [7:0]        wdata,
  output cmd_t              cmd,
  output logic [5:0]        mode_rd,
  // priority unit
  input  logic [NCH-1:0]    valid_dreq,
  input  logic [1:0]        pr_ch,
  output logic              hrq,
  output logic              dack_en,
  output logic              fin,
  output logic [1:0]        fin_ch,
  output logic              fin_autoinit,
  output logic              release_svc,
  // datapath
  input  logic              last,
  input  logic              upper_change,
  output dma_state_e        state,
  output logic [1:0]        ch,
  output logic              dec,
  output logic              addr_hold,
  output logic              xfer_done,
  output logic [NCH-1:0]    restore,
  output logic              latch_tmp,
  output logic              drive_tmp
);

  mode_t      mode [NCH];
  logic [1:0] mode_cnt;
  dma_state_e st_q, st_d;
  logic       mm_q, phase_q, eop_seen_q;
  logic       mm_d, phase_d, eop_seen_d;
  logic       eop_ext;

  assign eop_ext = !bidmac_ctrl_time_eop_n_i;
  assign state   = st_q;

  // Registers written by the CPU ------------------------------------------
  always_ff @(posedge bidmac_ctrl_time_clk) begin
    if (bidmac_ctrl_time_rst || regop.master_clr) begin
      cmd      <= '0;
      mode_cnt <= '0;
      for (int i = 0; i < NCH; i++) mode[i] <= '0;
    end else begin
      if (regop.wr_cmd)  cmd <= cmd_t'(wdata);
      if (regop.wr_mode) mode[wdata[1:0]] <= mode_t'(wdata[7:2]);
      if (regop.clr_mode_cnt)  mode_cnt <= '0;
      else if (regop.rd_mode)  mode_cnt <= mode_cnt + 2'd1;
    end
  end
  assign mode_rd = mode[mode_cnt];

  // Channel in use and its mode -------------------------------------------
  mode_t cur_mode;
  assign ch        = mm_q ? {1'b0, phase_q} : pr_ch;
  assign cur_mode  = mode[ch];
  assign dec       = cur_mode.dec;
  assign addr_hold = mm_q && !phase_q && cmd.ch0_hold;

  // Terminal condition checked in S4
  logic tc_now, term;
  assign tc_now = last && (!mm_q || phase_q);
  assign term   = tc_now || eop_seen_q || eop_ext;

  // Next state -------------------------------------------------------------
  logic req_any;
  assign req_any = |valid_dreq && !cmd.disable_c;

  always_comb begin
    st_d       = st_q;
    mm_d       = mm_q;
    phase_d    = phase_q;
    eop_seen_d = eop_seen_q;
    unique case (st_q)
      ST_SI: begin
        eop_seen_d = 1'b0;
        phase_d    = 1'b0;
        if (req_any) st_d = ST_S0;
      end
      ST_S0: begin
        if (!req_any) st_d = ST_SI;
        else if (bidmac_ctrl_time_hold_ack) begin
          mm_d    = cmd.mem2mem && (pr_ch == 2'd0);
          phase_d = 1'b0;
          if (!(cmd.mem2mem && pr_ch == 2'd0) && mode[pr_ch].mode == MD_CASCADE)
            st_d = ST_SC;
          else
            st_d = ST_S1;
        end
      end
      ST_SC: begin
        if (!valid_dreq[pr_ch] || !bidmac_ctrl_time_hold_ack) st_d = ST_SI;
      end
      ST_S1: begin
        if (eop_ext || !bidmac_ctrl_time_hold_ack) st_d = ST_SI;
        else                                       st_d = ST_S2;
      end
      ST_S2: begin
        eop_seen_d = eop_seen_q || eop_ext;
        if (cmd.compressed && !mm_q) begin
          if (bidmac_ctrl_time_rdy) st_d = ST_S4;
        end else begin
          st_d = ST_S3;
        end
      end
      ST_S3: begin
        eop_seen_d = eop_seen_q || eop_ext;
        if (bidmac_ctrl_time_rdy) st_d = ST_S4;
      end
      ST_S4: begin
        eop_seen_d = 1'b0;
        if (mm_q) begin
          if (term) st_d = ST_SI;
          else begin
            st_d    = ST_S1;
            phase_d = !phase_q;
          end
        end else if (term) begin
          st_d = ST_SI;
        end else begin
          unique case (cur_mode.mode)
            MD_SINGLE:  st_d = ST_SI;
            MD_DEMAND:  st_d = valid_dreq[ch] ? (upper_change ? ST_S1 : ST_S2) : ST_SI;
            default:    st_d = upper_change ? ST_S1 : ST_S2;
          endcase
        end
      end
      default: st_d = ST_SI;
    endcase
  end

  always_ff @(posedge bidmac_ctrl_time_clk) begin
    if (bidmac_ctrl_time_rst || regop.master_clr) begin
      st_q       <= ST_SI;
      mm_q       <= 1'b0;
      phase_q    <= 1'b0;
      eop_seen_q <= 1'b0;
    end else begin
      st_q       <= st_d;
      mm_q       <= (st_d == ST_SI) ? 1'b0 : mm_d;
      phase_q    <= phase_d;
      eop_seen_q <= eop_seen_d;
    end
  end

  // Outputs -----------------------------------------------------------------
  logic in_s1_4, rd_act, wr_act;
  assign in_s1_4 = (st_q == ST_S1) || (st_q == ST_S2) || (st_q == ST_S3) || (st_q == ST_S4);

  always_comb begin
    // read strobe: S2 and S3; write strobe: S3 (late) or S2+S3 (extended);
    // compressed timing: both in S2
    rd_act = (st_q == ST_S2) || (st_q == ST_S3);
    if (cmd.compressed && !mm_q)
      wr_act = (st_q == ST_S2);
    else
      wr_act = (st_q == ST_S3) || (cmd.ext_write && st_q == ST_S2);
  end

  always_comb begin
    bidmac_ctrl_time_memr_n = 1'b1;
    bidmac_ctrl_time_memw_n = 1'b1;
    bidmac_ctrl_time_iord_n = 1'b1;
    bidmac_ctrl_time_iowr_n = 1'b1;
    if (mm_q) begin
      if (!phase_q) bidmac_ctrl_time_memr_n = !rd_act;
      else          bidmac_ctrl_time_memw_n = !wr_act;
    end else begin
      unique case (cur_mode.xfer)
        XF_READ: begin
          bidmac_ctrl_time_memr_n = !rd_act;
          bidmac_ctrl_time_iowr_n = !wr_act;
        end
        XF_WRITE: begin
          bidmac_ctrl_time_iord_n = !rd_act;
          bidmac_ctrl_time_memw_n = !wr_act;
        end
        default: ;  // verify / illegal: addresses only
      endcase
    end
  end

  assign bidmac_ctrl_time_io_oe   = in_s1_4;
  assign bidmac_ctrl_time_aen     = in_s1_4;
  assign bidmac_ctrl_time_adstb   = (st_q == ST_S1);
  assign bidmac_ctrl_time_eop_oe  = (st_q == ST_S4) && tc_now;

  assign hrq     = (st_q != ST_SI);
  assign dack_en = (in_s1_4 && !mm_q) || (st_q == ST_SC);

  assign xfer_done   = (st_q == ST_S4);
  assign fin         = (st_q == ST_S4) && (st_d == ST_SI) && term;
  assign fin_ch      = ch;
  assign fin_autoinit = cur_mode.autoinit;
  assign release_svc = (st_q != ST_SI) && (st_q != ST_S0) && (st_d == ST_SI);

  always_comb begin
    restore = '0;
    if (fin) begin
      if (mm_q) begin
        restore[0] = mode[0].autoinit;
        restore[1] = mode[1].autoinit;
      end else begin
        restore[ch] = cur_mode.autoinit;
      end
    end
  end

  assign latch_tmp = mm_q && !phase_q && (st_q == ST_S3) && bidmac_ctrl_time_rdy;
  assign drive_tmp = mm_q &&  phase_q && ((st_q == ST_S2) || (st_q == ST_S3));

endmodule
