// tb_bidmac_ctrl_time: unit test of the timing and control unit.
//
// Plays the priority unit, the datapath and the CPU. The datapath is a
// bench model of one word counter per channel that steps on xfer_done and
// reports "last" when it holds 1; an optional page-change input is driven by
// the bench. Checks: the state sequence SI, S0 (while hold acknowledge is
// missing), S1, S2, S3, S4 with the outputs of each state (HRQ, AEN, ADSTB,
// read and write strobes for read / write / verify transfers, late and
// extended write, compressed timing); 3 clocks per byte in a block after
// the first S1; S4 -> S1 on a page change; READY wait states; internal EOP
// and fin at terminal count; autoinitialize restore; single-mode release;
// demand-mode stop; external EOP; cascade; memory-to-memory channel and
// strobe sequence; mode read-back counter.
module tb_bidmac_ctrl_time;
  import dmac_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  logic rst, hold_ack, rdy, eop_n;
  logic aen, adstb, memr_n, memw_n, iord_n, iowr_n, io_oe, eop_oe;
  regop_t regop;
  logic [7:0] wdata;
  cmd_t cmd;
  logic [5:0] mode_rd;
  logic [3:0] valid_dreq;
  logic [1:0] pr_ch;
  logic hrq, dack_en, fin, fin_autoinit, release_svc;
  logic [1:0] fin_ch;
  logic last, upper_change;
  dma_state_e state;
  logic [1:0] ch;
  logic dec, addr_hold, xfer_done, latch_tmp, drive_tmp;
  logic [3:0] restore;

  bidmac_ctrl_time dut (
    .bidmac_ctrl_time_clk(clk), .bidmac_ctrl_time_rst(rst),
    .bidmac_ctrl_time_hold_ack(hold_ack), .bidmac_ctrl_time_rdy(rdy),
    .bidmac_ctrl_time_eop_n_i(eop_n),
    .bidmac_ctrl_time_aen(aen), .bidmac_ctrl_time_adstb(adstb),
    .bidmac_ctrl_time_memr_n(memr_n), .bidmac_ctrl_time_memw_n(memw_n),
    .bidmac_ctrl_time_iord_n(iord_n), .bidmac_ctrl_time_iowr_n(iowr_n),
    .bidmac_ctrl_time_io_oe(io_oe), .bidmac_ctrl_time_eop_oe(eop_oe),
    .regop, .wdata, .cmd, .mode_rd, .valid_dreq, .pr_ch, .hrq, .dack_en, .fin, .fin_ch,
    .fin_autoinit, .release_svc, .last, .upper_change, .state, .ch, .dec, .addr_hold,
    .xfer_done, .restore, .latch_tmp, .drive_tmp
  );

  // datapath model: word counters
  int cnt [4];
  logic page_req;
  assign last         = (cnt[ch] == 1);
  assign upper_change = page_req;
  always @(posedge clk) if (xfer_done) cnt[ch] = cnt[ch] - 1;

  // hold acknowledge one clock after HRQ
  logic ack_en;
  always_ff @(posedge clk) hold_ack <= hrq && ack_en;

  // trace: record the state letters and strobes per clock
  string trace;
  int n_fin, n_rel, n_eop, n_clk_aen, n_latch, n_drive;
  logic [3:0] restore_seen;
  always @(posedge clk) begin
    string s;
    unique case (state)
      ST_SI: s = "I"; ST_S0: s = "0"; ST_S1: s = "1"; ST_S2: s = "2";
      ST_S3: s = "3"; ST_S4: s = "4"; ST_SC: s = "C"; default: s = "?";
    endcase
    if (state != ST_SI) trace = {trace, s};
    if (fin) n_fin++;
    if (release_svc) n_rel++;
    if (eop_oe) n_eop++;
    if (aen) n_clk_aen++;
    if (latch_tmp) n_latch++;
    if (drive_tmp) n_drive++;
    restore_seen |= restore;
  end

  // strobe pattern recorder: for each clock in S2/S3, letter of active strobes
  string strobes;
  always @(posedge clk) begin
    if (state == ST_S2 || state == ST_S3) begin
      string s;
      s = "";
      if (!memr_n) s = {s, "r"};
      if (!memw_n) s = {s, "w"};
      if (!iord_n) s = {s, "R"};
      if (!iowr_n) s = {s, "W"};
      strobes = {strobes, (s == "") ? "-" : s, " "};
    end
  end

  task automatic reg_wr(input int which, input logic [7:0] d);
    @(negedge clk);
    regop = '0; wdata = d;
    unique case (which)
      0: regop.wr_cmd = 1;
      1: regop.wr_mode = 1;
      2: regop.rd_mode = 1;
      3: regop.clr_mode_cnt = 1;
      default: regop.master_clr = 1;
    endcase
    @(negedge clk); regop = '0;
  endtask

  function automatic logic [7:0] mb(svc_mode_e m, bit d, bit ai, xfer_e x, int c);
    return {m, d, ai, x, 2'(c)};
  endfunction

  task automatic run(input int c, input int maxc);
    int n = 0;
    trace = ""; strobes = ""; n_clk_aen = 0;
    @(negedge clk); pr_ch = 2'(c); valid_dreq[c] = 1;
    while (state == ST_SI && n < maxc) begin @(negedge clk); n++; end
    while (state != ST_SI && n < maxc) begin @(negedge clk); n++; end
    check(n < maxc, "service ended");
    valid_dreq = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rdy = 1; eop_n = 1; regop = '0; wdata = 0; valid_dreq = 0; pr_ch = 0;
    ack_en = 1; page_req = 0; restore_seen = 0; trace = ""; strobes = "";
    n_fin = 0; n_rel = 0; n_eop = 0; n_latch = 0; n_drive = 0;
    for (int i = 0; i < 4; i++) cnt[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(state == ST_SI && !hrq && !aen && memr_n && memw_n && iord_n && iowr_n, "reset idle");

    // block write transfer (I/O -> memory), 3 bytes, late write
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_WRITE, 0));
    cnt[0] = 3;
    run(0, 100);
    check(trace == "001234234234", {"block trace ", trace});
    check(strobes == "R wR R wR R wR ", {"write-transfer strobes ", strobes});
    check(n_clk_aen == 1 + 3 * 3, $sformatf("AEN clocks %0d", n_clk_aen));
    check(n_fin == 1 && n_eop == 1 && cnt[0] == 0, "terminal count: fin and internal EOP");

    // read transfer (memory -> I/O) with extended write
    reg_wr(0, 8'h20);
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_READ, 1));
    cnt[1] = 2;
    run(1, 100);
    check(strobes == "rW rW rW rW ", {"read-transfer extended-write strobes ", strobes});

    // compressed timing: 2 clocks per byte
    reg_wr(0, 8'h08);
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_WRITE, 2));
    cnt[2] = 3;
    run(2, 100);
    check(trace == "001242424", {"compressed trace ", trace});
    check(strobes == "wR wR wR ", {"compressed strobes ", strobes});
    reg_wr(0, 8'h00);

    // verify: no strobes
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_VERIFY, 3));
    cnt[3] = 2;
    run(3, 100);
    check(strobes == "- - - - ", {"verify strobes ", strobes});

    // page change: S4 -> S1
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_WRITE, 0));
    cnt[0] = 2; page_req = 1;
    run(0, 100);
    page_req = 0;
    check(trace == "0012341234", {"page-change trace ", trace});

    // READY wait in S3
    cnt[0] = 1;
    fork
      run(0, 100);
      begin
        @(negedge clk);
        while (state != ST_S2) @(negedge clk);
        rdy = 0;
        repeat (3) @(negedge clk);
        rdy = 1;
      end
    join
    check(trace == "00123334", {"READY wait trace ", trace});

    // autoinitialize: restore pulse, no change to fin count semantics
    reg_wr(1, mb(MD_BLOCK, 0, 1, XF_WRITE, 1));
    cnt[1] = 1; restore_seen = 0;
    run(1, 100);
    check(restore_seen == 4'b0010 && fin_autoinit, "autoinit restore of channel 1");

    // single mode: one transfer per service, release without fin
    reg_wr(1, mb(MD_SINGLE, 0, 0, XF_WRITE, 2));
    cnt[2] = 5; n_fin = 0; n_rel = 0;
    run(2, 100);
    check(trace == "001234" && n_fin == 0 && n_rel == 1 && cnt[2] == 4, {"single trace ", trace});

    // demand mode: request dropped during the second transfer
    reg_wr(1, mb(MD_DEMAND, 0, 0, XF_WRITE, 2));
    fork
      run(2, 100);
      begin
        int k = 0;
        while (k < 2) begin @(negedge clk); if (state == ST_S3) k++; end
        valid_dreq[2] = 0;
      end
    join
    check(trace == "001234234" && cnt[2] == 2, {"demand trace ", trace});

    // hold acknowledge withheld: stays in S0
    ack_en = 0;
    @(negedge clk) pr_ch = 0; valid_dreq[0] = 1; cnt[0] = 1;
    repeat (6) @(posedge clk);
    check(state == ST_S0 && hrq && !aen, "S0 waits for hold acknowledge");
    @(negedge clk) valid_dreq[0] = 0;
    @(posedge clk); @(posedge clk);
    check(state == ST_SI && !hrq, "S0 -> SI when the request goes away");
    ack_en = 1;

    // external EOP in S2 ends the service after that transfer
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_WRITE, 0));
    cnt[0] = 10; n_fin = 0;
    fork
      run(0, 100);
      begin
        @(negedge clk);
        while (state != ST_S2) @(negedge clk);
        eop_n = 0;
        @(negedge clk) eop_n = 1;
      end
    join
    check(cnt[0] == 9 && n_fin == 1, $sformatf("external EOP: one transfer, fin (cnt %0d)", cnt[0]));

    // cascade
    reg_wr(1, mb(MD_CASCADE, 0, 0, XF_VERIFY, 3));
    @(negedge clk) pr_ch = 3; valid_dreq[3] = 1;
    repeat (5) @(posedge clk);
    check(state == ST_SC && hrq && dack_en && !aen && io_oe == 0, "cascade state");
    @(negedge clk) valid_dreq[3] = 0;
    @(posedge clk); @(posedge clk);
    check(state == ST_SI, "cascade released");

    // memory-to-memory: 2 bytes, channel 1 count ends it
    reg_wr(0, 8'h01);
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_READ, 0));
    reg_wr(1, mb(MD_BLOCK, 0, 0, XF_WRITE, 1));
    cnt[0] = 7; cnt[1] = 2; n_latch = 0; n_drive = 0;
    run(0, 100);
    check(trace == "001234123412341234", {"mem-to-mem trace ", trace});
    check(strobes == "r r - w r r - w ", {"mem-to-mem strobes ", strobes});
    check(n_latch == 2 && n_drive == 4 && cnt[1] == 0 && cnt[0] == 5, "mem-to-mem latch/drive/counts");
    reg_wr(0, 8'h00);

    // mode read-back counter
    reg_wr(3, 0);
    check(mode_rd == mb(MD_BLOCK, 0, 0, XF_READ, 0) >> 2, "mode counter at channel 0");
    reg_wr(2, 0);
    check(mode_rd == mb(MD_BLOCK, 0, 0, XF_WRITE, 0) >> 2, "mode counter at channel 1");

    // master clear
    reg_wr(0, 8'hFF);
    reg_wr(4, 0);
    check(cmd == '0 && state == ST_SI, "master clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
