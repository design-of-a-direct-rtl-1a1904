// bidmac_dp: datapath unit of the DMA controller.
//
// Holds, for each of the four channels, a base and a current address register
// and a base and a current word-count register (16 bits each), plus the
// temporary address and word-count registers and the 8-bit temporary data
// register used by memory-to-memory transfers. It owns the CPU side of the
// register file: while the controller is idle and chip select is low it
// decodes the lower address nibble (A3..A0) with the I/O read / write
// strobes, loads the channel registers a byte at a time under a first/last
// flip-flop, drives the read-back byte on the data bus and hands the command
// codes (A3 = 1) to the other units as one-cycle strobes (regop).
//
// During an active cycle it puts the current address of the selected channel
// on the pins: A15..A8 on the data bus in S1 (captured by the external latch
// with ADSTB), A7..A4 on addr_msb and A3..A0 on addr_lsb in S1..S4. At the
// end of each transfer (xfer_done, the last cycle of S4) the current address
// steps by +1 or -1 and the current word count by -1; the temporary registers
// keep a copy of the new values. When a service terminates with
// autoinitialize set (restore), current registers reload from base.
//
// Interface: CPU-side pins (chipslt_n, iord_n_i, iowr_n_i, addr_lsb_i,
// databus_i) are synchronous inputs. A CPU write takes effect on the first
// clock where the write strobe is seen low; side effects of a read (flip-flop
// toggle, status clear, mode counter) happen on the clock where the read
// strobe is seen back high. Three-state pins are split into value and
// output-enable.
//
// Register set, address map, byte-wise programming and address stepping
// follow the design description. The split of pins into value/enable, the
// read side-effect timing, committing the address step at the end of S4
// (so the address stays put during the strobes) and "last = count is 1"
// (N transfers for a word count of N) are choices of this implementation.
module bidmac_dp
  import dmac_pkg::*;
(
  input  logic              bidmac_dp_clk,
  input  logic              bidmac_dp_rst,
  // CPU bus (idle cycle)
  input  logic              bidmac_dp_chipslt_n,
  input  logic              bidmac_dp_iord_n,
  input  logic              bidmac_dp_iowr_n,
  input  logic              bidmac_dp_hold_ack,
  input  logic [3:0]        bidmac_dp_addr_lsb_i,
  input  logic [DW-1:0]     bidmac_dp_databus_i,
  // pins driven by the datapath
  output logic [DW-1:0]     bidmac_dp_databus_o,
  output logic              bidmac_dp_databus_oe,
  output logic [3:0]        bidmac_dp_addr_lsb_o,
  output logic              bidmac_dp_addr_lsb_oe,
  output logic [3:0]        bidmac_dp_addr_msb,
  output logic              bidmac_dp_addr_msb_oe,
  // from timing and control
  input  dma_state_e        state,
  input  logic [1:0]        ch,           // channel whose registers are in use
  input  logic              dec,          // address decrement for ch
  input  logic              addr_hold,    // keep address of ch (channel 0 hold)
  input  logic              xfer_done,    // last cycle of a transfer: step ch
  input  logic [NCH-1:0]    restore,      // autoinitialize these channels
  input  logic              latch_tmp,    // capture data bus into temporary reg
  input  logic              drive_tmp,    // drive temporary reg on the data bus
  // register read-back sources
  input  logic [7:0]        status_rd,
  input  logic [7:0]        cmd_rd,
  input  logic [NCH-1:0]    req_rd,
  input  logic [NCH-1:0]    mask_rd,
  input  logic [5:0]        mode_rd,
  // to the other units
  output regop_t            regop,
  output logic [DW-1:0]     wdata,
  output logic              last,         // current count of ch is 1
  output logic              upper_change, // next address of ch leaves the A15..A8 page
  output logic [AW-1:0]     addr,         // current address of ch
  output logic [AW-1:0]     tmp_addr_o,   // temporary address register
  output logic [AW-1:0]     tmp_cnt_o     // temporary word-count register
);

  logic [AW-1:0] base_addr [NCH];
  logic [AW-1:0] base_cnt  [NCH];
  logic [AW-1:0] cur_addr  [NCH];
  logic [AW-1:0] cur_cnt   [NCH];
  logic [AW-1:0] tmp_addr, tmp_cnt;
  logic [DW-1:0] tmp_data;
  logic          ff_q;                 // first/last flip-flop: 0 low byte, 1 high byte
  logic          iord_q, iowr_q;

  // CPU access decode -----------------------------------------------------
  logic       prog, wr_stb, rd_end;
  logic [3:0] a;
  assign a      = bidmac_dp_addr_lsb_i;
  assign prog   = (state == ST_SI) && !bidmac_dp_chipslt_n && !bidmac_dp_hold_ack;
  assign wr_stb = prog && !bidmac_dp_iowr_n && iowr_q;
  assign rd_end = prog &&  bidmac_dp_iord_n && !iord_q;
  assign wdata  = bidmac_dp_databus_i;

  always_comb begin
    regop = '0;
    if (a[3]) begin
      unique case (a[2:0])
        3'b000: begin regop.wr_cmd     = wr_stb; regop.rd_status    = rd_end; end
        3'b001:       regop.wr_req     = wr_stb;
        3'b010:       regop.wr_smask   = wr_stb;
        3'b011: begin regop.wr_mode    = wr_stb; regop.rd_mode      = rd_end; end
        3'b101:       regop.master_clr = wr_stb;
        3'b110: begin regop.clr_mask   = wr_stb; regop.clr_mode_cnt = rd_end; end
        3'b111:       regop.wr_allmask = wr_stb;
        default: ;
      endcase
    end
  end

  // Working values for the channel in use -----------------------------------
  logic [AW-1:0] next_addr, next_cnt;
  assign addr         = cur_addr[ch];
  assign next_addr    = addr_hold ? cur_addr[ch] : (dec ? cur_addr[ch] - 1'b1 : cur_addr[ch] + 1'b1);
  assign next_cnt     = cur_cnt[ch] - 1'b1;
  assign last         = (cur_cnt[ch] == AW'(1));
  assign upper_change = (next_addr[15:8] != cur_addr[ch][15:8]);

  // Registers ----------------------------------------------------------------
  always_ff @(posedge bidmac_dp_clk) begin
    if (bidmac_dp_rst || regop.master_clr) begin
      for (int i = 0; i < NCH; i++) begin
        base_addr[i] <= '0;
        base_cnt[i]  <= '0;
        cur_addr[i]  <= '0;
        cur_cnt[i]   <= '0;
      end
      tmp_addr <= '0;
      tmp_cnt  <= '0;
      tmp_data <= '0;
      ff_q     <= 1'b0;
      iord_q   <= 1'b1;
      iowr_q   <= 1'b1;
    end else begin
      iord_q <= bidmac_dp_iord_n;
      iowr_q <= bidmac_dp_iowr_n;

      // channel register programming (A3 = 0): A2..A1 channel, A0 count/address
      if (wr_stb && !a[3]) begin
        if (!a[0]) begin
          if (ff_q) begin base_addr[a[2:1]][15:8] <= wdata; cur_addr[a[2:1]][15:8] <= wdata; end
          else      begin base_addr[a[2:1]][7:0]  <= wdata; cur_addr[a[2:1]][7:0]  <= wdata; end
        end else begin
          if (ff_q) begin base_cnt[a[2:1]][15:8]  <= wdata; cur_cnt[a[2:1]][15:8]  <= wdata; end
          else      begin base_cnt[a[2:1]][7:0]   <= wdata; cur_cnt[a[2:1]][7:0]   <= wdata; end
        end
      end

      // first/last flip-flop
      if ((wr_stb || rd_end) && !a[3])
        ff_q <= !ff_q;
      else if (wr_stb && a == 4'b1100)
        ff_q <= 1'b0;               // clear first/last F/F
      else if (rd_end && a == 4'b1100)
        ff_q <= 1'b1;               // set first/last F/F

      // address / count stepping at the end of each transfer
      if (xfer_done) begin
        cur_addr[ch] <= next_addr;
        cur_cnt[ch]  <= next_cnt;
        tmp_addr     <= next_addr;
        tmp_cnt      <= next_cnt;
      end
      for (int i = 0; i < NCH; i++) begin
        if (restore[i]) begin
          cur_addr[i] <= base_addr[i];
          cur_cnt[i]  <= base_cnt[i];
        end
      end

      if (latch_tmp)
        tmp_data <= bidmac_dp_databus_i;
    end
  end

  // Read-back multiplexer ------------------------------------------------------
  logic [DW-1:0] rd_byte;
  always_comb begin
    rd_byte = '0;
    if (!a[3]) begin
      if (!a[0]) rd_byte = ff_q ? cur_addr[a[2:1]][15:8] : cur_addr[a[2:1]][7:0];
      else       rd_byte = ff_q ? cur_cnt[a[2:1]][15:8]  : cur_cnt[a[2:1]][7:0];
    end else begin
      unique case (a[2:0])
        3'b000:  rd_byte = status_rd;
        3'b001:  rd_byte = {4'hF, req_rd};
        3'b010:  rd_byte = cmd_rd;
        3'b011:  rd_byte = {mode_rd, 2'b11};
        3'b101:  rd_byte = tmp_data;
        3'b111:  rd_byte = {4'hF, mask_rd};
        default: rd_byte = '0;
      endcase
    end
  end

  // Pin drive ---------------------------------------------------------------
  logic active;
  assign active = (state == ST_S1) || (state == ST_S2) || (state == ST_S3) || (state == ST_S4);

  always_comb begin
    bidmac_dp_databus_o  = '0;
    bidmac_dp_databus_oe = 1'b0;
    if (prog && !bidmac_dp_iord_n) begin
      bidmac_dp_databus_o  = rd_byte;
      bidmac_dp_databus_oe = 1'b1;
    end else if (state == ST_S1) begin
      bidmac_dp_databus_o  = cur_addr[ch][15:8];
      bidmac_dp_databus_oe = 1'b1;
    end else if (drive_tmp) begin
      bidmac_dp_databus_o  = tmp_data;
      bidmac_dp_databus_oe = 1'b1;
    end
  end

  assign bidmac_dp_addr_lsb_o  = cur_addr[ch][3:0];
  assign bidmac_dp_addr_lsb_oe = active;
  assign bidmac_dp_addr_msb    = cur_addr[ch][7:4];
  assign bidmac_dp_addr_msb_oe = active;

  assign tmp_addr_o = tmp_addr;
  assign tmp_cnt_o  = tmp_cnt;

endmodule
