// tb_bidmac_dp: unit test of the DMA datapath.
//
// Acts as the CPU and as the timing-and-control unit. Checks: byte-wise
// programming of base/current address and count through the first/last
// flip-flop and their read-back; decoding of the command codes into regop
// strobes; read-back of status, command, request, mask, mode and temporary
// registers; address increment / decrement / hold and count decrement at
// xfer_done; the "last" and "upper_change" flags; autoinitialize restore;
// the address pins in S1..S4 (A15..A8 on the data bus in S1); capture and
// drive of the temporary data register; master clear. Expected values are
// computed in the bench.
module tb_bidmac_dp;
  import dmac_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  logic rst, cs_n, iord_n, iowr_n, hold_ack;
  logic [3:0] a_i, alsb_o, amsb;
  logic [7:0] db_i, db_o;
  logic db_oe, alsb_oe, amsb_oe;
  dma_state_e state;
  logic [1:0] ch;
  logic dec, addr_hold, xfer_done, latch_tmp, drive_tmp;
  logic [3:0] restore;
  regop_t regop;
  logic [7:0] wdata;
  logic last, upper_change;
  logic [15:0] addr, tmp_addr, tmp_cnt;

  bidmac_dp dut (
    .bidmac_dp_clk(clk), .bidmac_dp_rst(rst), .bidmac_dp_chipslt_n(cs_n),
    .bidmac_dp_iord_n(iord_n), .bidmac_dp_iowr_n(iowr_n), .bidmac_dp_hold_ack(hold_ack),
    .bidmac_dp_addr_lsb_i(a_i), .bidmac_dp_databus_i(db_i),
    .bidmac_dp_databus_o(db_o), .bidmac_dp_databus_oe(db_oe),
    .bidmac_dp_addr_lsb_o(alsb_o), .bidmac_dp_addr_lsb_oe(alsb_oe),
    .bidmac_dp_addr_msb(amsb), .bidmac_dp_addr_msb_oe(amsb_oe),
    .state, .ch, .dec, .addr_hold, .xfer_done, .restore, .latch_tmp, .drive_tmp,
    .status_rd(8'hA5), .cmd_rd(8'h3C), .req_rd(4'h6), .mask_rd(4'h9), .mode_rd(6'h2B),
    .regop, .wdata, .last, .upper_change, .addr, .tmp_addr_o(tmp_addr), .tmp_cnt_o(tmp_cnt)
  );

  // count regop strobes
  int n_op [10];
  always @(posedge clk) begin
    if (regop.wr_cmd)       n_op[0]++;
    if (regop.wr_req)       n_op[1]++;
    if (regop.wr_smask)     n_op[2]++;
    if (regop.wr_mode)      n_op[3]++;
    if (regop.rd_mode)      n_op[4]++;
    if (regop.clr_mode_cnt) n_op[5]++;
    if (regop.clr_mask)     n_op[6]++;
    if (regop.wr_allmask)   n_op[7]++;
    if (regop.master_clr)   n_op[8]++;
    if (regop.rd_status)    n_op[9]++;
  end

  task automatic cpu_wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); cs_n = 0; a_i = a; db_i = d; iowr_n = 0;
    @(negedge clk); iowr_n = 1;
    @(negedge clk); cs_n = 1;
  endtask
  task automatic cpu_rd(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk); cs_n = 0; a_i = a; iord_n = 0;
    @(negedge clk); d = db_oe ? db_o : 8'h00; iord_n = 1;
    @(negedge clk); cs_n = 1;
  endtask
  task automatic prog(input int c, input logic [15:0] ad, input logic [15:0] cn);
    cpu_wr(4'b1100, 0);
    cpu_wr(4'(2 * c), ad[7:0]);     cpu_wr(4'(2 * c), ad[15:8]);
    cpu_wr(4'(2 * c + 1), cn[7:0]); cpu_wr(4'(2 * c + 1), cn[15:8]);
  endtask
  task automatic rdback(input int c, output logic [15:0] ad, output logic [15:0] cn);
    logic [7:0] b0, b1, b2, b3;
    cpu_wr(4'b1100, 0);
    cpu_rd(4'(2 * c), b0); cpu_rd(4'(2 * c), b1);
    cpu_rd(4'(2 * c + 1), b2); cpu_rd(4'(2 * c + 1), b3);
    ad = {b1, b0}; cn = {b3, b2};
  endtask
  task automatic step();
    @(negedge clk); xfer_done = 1;
    @(negedge clk); xfer_done = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r;
    logic [15:0] ad, cn;
    rst = 1; cs_n = 1; iord_n = 1; iowr_n = 1; hold_ack = 0; a_i = 0; db_i = 0;
    state = ST_SI; ch = 0; dec = 0; addr_hold = 0; xfer_done = 0; restore = 0;
    latch_tmp = 0; drive_tmp = 0;
    for (int i = 0; i < 10; i++) n_op[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    // program all four channels and read back
    for (int c = 0; c < 4; c++) prog(c, 16'h1234 + 16'(c * 16'h1111), 16'h0100 + 16'(c));
    for (int c = 0; c < 4; c++) begin
      rdback(c, ad, cn);
      check(ad == 16'h1234 + 16'(c * 16'h1111), $sformatf("ch%0d address read-back %h", c, ad));
      check(cn == 16'h0100 + 16'(c), $sformatf("ch%0d count read-back %h", c, cn));
    end

    // register read-back mux
    cpu_rd(4'b1000, r); check(r == 8'hA5, "status read-back");
    cpu_rd(4'b1001, r); check(r == 8'hF6, "request read-back, upper ones");
    cpu_rd(4'b1010, r); check(r == 8'h3C, "command read-back");
    cpu_rd(4'b1011, r); check(r == 8'hAF, "mode read-back (bits 7:2, ones below)");
    cpu_rd(4'b1111, r); check(r == 8'hF9, "mask read-back, upper ones");

    // command-code strobes: each exactly once
    for (int i = 0; i < 10; i++) n_op[i] = 0;
    cpu_wr(4'b1000, 8'h11); cpu_wr(4'b1001, 8'h04); cpu_wr(4'b1010, 8'h05);
    cpu_wr(4'b1011, 8'h48); cpu_wr(4'b1110, 8'h00); cpu_wr(4'b1111, 8'h0F);
    cpu_rd(4'b1011, r); cpu_rd(4'b1110, r); cpu_rd(4'b1000, r);
    for (int i = 0; i < 10; i++)
      if (i != 8) check(n_op[i] == 1, $sformatf("regop strobe %0d once (%0d)", i, n_op[i]));
    check(n_op[8] == 0, "no master clear yet");

    // no access while not idle or while hold acknowledge is high
    @(negedge clk) state = ST_S2;
    cpu_wr(4'd0, 8'hEE);
    @(negedge clk) state = ST_SI; hold_ack = 1;
    cpu_wr(4'd1, 8'hEE);
    @(negedge clk) hold_ack = 0;
    rdback(0, ad, cn);
    check(ad == 16'h1234 && cn == 16'h0100, "writes ignored outside the idle cycle");

    // stepping: channel 1 increment, channel 2 decrement, channel 0 hold
    @(negedge clk) ch = 1; dec = 0;
    #1 check(addr == 16'h2345, "addr output for channel 1");
    step(); step();
    check(addr == 16'h2347 && tmp_addr == 16'h2347 && tmp_cnt == 16'h0101 - 2,
          "increment, decrement count, temporary registers");
    @(negedge clk) ch = 2; dec = 1;
    step();
    check(addr == 16'h3455, "decrement address");
    @(negedge clk) ch = 0; dec = 0; addr_hold = 1;
    step();
    check(addr == 16'h1234, "address hold");
    @(negedge clk) addr_hold = 0;
    rdback(0, ad, cn); check(cn == 16'h00FF, "count stepped under hold");

    // last flag and page change
    prog(3, 16'h40FF, 16'd2);
    @(negedge clk) ch = 3; dec = 0;
    #1 check(!last && upper_change, "count 2: not last; 40FF+1 leaves the page");
    step();
    check(last && !upper_change && addr == 16'h4100, "count 1: last");
    step();
    // restore channel 3 from base
    @(negedge clk) restore = 4'b1000;
    @(negedge clk) restore = 0;
    rdback(3, ad, cn); check(ad == 16'h40FF && cn == 16'd2, "autoinit restore");

    // pins in the active cycle
    @(negedge clk) state = ST_S1; ch = 3;
    #1 check(db_oe && db_o == 8'h40 && alsb_oe && amsb_oe && amsb == 4'hF && alsb_o == 4'hF,
             "S1: A15..A8 on data bus, A7..A0 on pins");
    @(negedge clk) state = ST_S2;
    #1 check(!db_oe && alsb_oe, "S2: data bus released");
    // temporary data register
    @(negedge clk) db_i = 8'h77; latch_tmp = 1;
    @(negedge clk) latch_tmp = 0; db_i = 0; drive_tmp = 1;
    #1 check(db_oe && db_o == 8'h77, "temporary register driven");
    @(negedge clk) drive_tmp = 0; state = ST_SI;
    cpu_rd(4'b1101, r); check(r == 8'h77, "temporary register read-back");
    #1 check(!alsb_oe && !amsb_oe, "address pins released in idle");

    // master clear
    cpu_wr(4'b1101, 8'h00);
    check(n_op[8] == 1, "master clear strobe");
    rdback(1, ad, cn); check(ad == 0 && cn == 0, "master clear zeroes registers");
    cpu_rd(4'b1101, r); check(r == 0, "master clear zeroes temporary");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
