// tb_uidmac: end-to-end test of the four-channel DMA controller.
//
// The bench models the system around the controller: a CPU that programs the
// registers through chip select / IOR / IOW and answers HRQ with hold
// acknowledge one clock later, a 64 KiB byte memory, the external latch that
// captures A15..A8 from the data bus while ADSTB is high, and one I/O device
// per channel that supplies a known byte sequence on IOR and records what it
// receives on IOW. Every scenario checks its result against values computed
// here from the programmed addresses and counts, not read from the design.
//
// Scenarios: reset values; block-mode I/O-to-memory with the 3-clocks-per-byte
// rate checked; single-mode memory-to-I/O with address decrement; demand mode
// with DREQ dropped part way; fixed and rotating priority; page crossing of
// A15..A8 (extra S1); READY wait states; compressed timing; extended write;
// verify transfers; autoinitialize; external EOP; memory-to-memory with and
// without channel 0 address hold; cascade; DREQ/DACK polarity; mode read-back
// counter; master clear. Each mechanism is counted and must occur.
module tb_uidmac;
  import dmac_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- DUT
  logic       rst;
  logic [3:0] dreq;
  logic       hold_ack, rdy, cs_n;
  logic [7:0] db_i, db_o;
  logic       db_oe;
  logic       iord_i, iowr_i, iord_o, iowr_o, io_oe;
  logic       eop_i, eop_oe;
  logic [3:0] alsb_i, alsb_o, amsb;
  logic       alsb_oe, amsb_oe;
  logic       holdrq, aen, memr_n, memw_n, adstb;
  logic [3:0] dack;

  uidmac dut (
    .uidmac_clk(clk), .uidmac_rst(rst), .uidmac_dreq(dreq), .uidmac_hold_ack(hold_ack),
    .uidmac_rdy(rdy), .uidmac_chipslt_n(cs_n),
    .uidmac_databus_i(db_i), .uidmac_databus_o(db_o), .uidmac_databus_oe(db_oe),
    .uidmac_iord_n_i(iord_i), .uidmac_iowr_n_i(iowr_i),
    .uidmac_iord_n_o(iord_o), .uidmac_iowr_n_o(iowr_o), .uidmac_io_oe(io_oe),
    .uidmac_eop_n_i(eop_i), .uidmac_eop_oe(eop_oe),
    .uidmac_addr_lsb_i(alsb_i), .uidmac_addr_lsb_o(alsb_o), .uidmac_addr_lsb_oe(alsb_oe),
    .uidmac_addr_msb(amsb), .uidmac_addr_msb_oe(amsb_oe),
    .uidmac_holdrq(holdrq), .uidmac_dack(dack), .uidmac_aen(aen),
    .uidmac_memr_n(memr_n), .uidmac_memw_n(memw_n), .uidmac_adstb(adstb)
  );

  // ---------------------------------------------------------------- system models
  logic [7:0] cpu_db;
  logic [3:0] cpu_a;
  logic       cpu_iord, cpu_iowr;
  logic       ext_eop_n;
  logic       grant_en;
  bit         dack_hi;     // mirrors command bit 7 for decoding DACK

  logic [7:0] mem [65536];
  logic [7:0] alatch = 8'h00;
  logic [15:0] bus_addr;

  // per-channel device: bytes supplied and bytes received
  int         dev_tx_n [4];
  logic [7:0] dev_rx   [4][64];
  int         dev_rx_n [4];

  function automatic logic [7:0] dev_byte(int c, int n);
    return 8'((c << 6) | ((n * 5 + 1) & 63));
  endfunction
  function automatic logic [7:0] mem_init(int a);
    return 8'(a ^ (a >> 8) ^ 8'h5A);
  endfunction

  logic [3:0] dack_act;
  int         dch;
  assign dack_act = dack_hi ? dack : ~dack;
  always_comb begin
    dch = 0;
    for (int i = 3; i >= 0; i--) if (dack_act[i]) dch = i;
  end

  assign iord_i   = io_oe ? iord_o : cpu_iord;
  assign iowr_i   = io_oe ? iowr_o : cpu_iowr;
  assign alsb_i   = alsb_oe ? alsb_o : cpu_a;
  assign eop_i    = ext_eop_n && !eop_oe;
  assign bus_addr = {alatch, amsb, alsb_o};

  always_comb begin
    if (db_oe)                         db_i = db_o;
    else if (!memr_n)                  db_i = mem[bus_addr];
    else if (io_oe && !iord_o)         db_i = dev_byte(dch, dev_tx_n[dch]);
    else                               db_i = cpu_db;
  end

  always_ff @(posedge clk) begin
    if (adstb) alatch <= db_o;
    hold_ack <= holdrq && grant_en;
  end

  always @(posedge clk) if (!memw_n) mem[bus_addr] <= db_i;

  // device strobe tracking: count a byte at the end of each strobe
  logic ior_q = 1'b1, iow_q = 1'b1;
  int   ior_ch, iow_ch;
  always @(posedge clk) begin
    logic ior_pin, iow_pin;
    ior_pin = io_oe ? iord_o : 1'b1;
    iow_pin = io_oe ? iowr_o : 1'b1;
    if (!ior_pin) ior_ch = dch;
    if (!iow_pin) begin
      iow_ch = dch;
      dev_rx[dch][dev_rx_n[dch] % 64] = db_i;
    end
    if (ior_pin && !ior_q) dev_tx_n[ior_ch]++;
    if (iow_pin && !iow_q) dev_rx_n[iow_ch]++;
    ior_q <= ior_pin;
    iow_q <= iow_pin;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_s1, n_wait, n_hrq_rise, n_eop_int, n_cascade, n_aen, n_extw;
  logic hrq_q = 1'b0;
  always @(posedge clk) begin
    if (dut.state == ST_S1) n_s1++;
    if ((dut.state == ST_S3 || (dut.state == ST_S2 && dut.cmd.compressed)) && !rdy) n_wait++;
    if (holdrq && !hrq_q) n_hrq_rise++;
    if (eop_oe) n_eop_int++;
    if (dut.state == ST_SC) n_cascade++;
    if (aen) n_aen++;
    if (dut.state == ST_S2 && !memw_n) n_extw++;
    hrq_q <= holdrq;
  end
  int m_block, m_single, m_demand, m_page, m_wait, m_compressed, m_extwrite, m_verify,
      m_autoinit, m_exteop, m_mm, m_mmhold, m_cascade, m_fixed, m_rotate, m_polarity,
      m_modecnt, m_masterclr;

  // ---------------------------------------------------------------- CPU tasks
  task automatic cpu_wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); cs_n = 1'b0; cpu_a = a; cpu_db = d; cpu_iowr = 1'b0;
    @(negedge clk); cpu_iowr = 1'b1;
    @(negedge clk); cs_n = 1'b1;
  endtask

  task automatic cpu_rd(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk); cs_n = 1'b0; cpu_a = a; cpu_iord = 1'b0;
    @(negedge clk); d = db_oe ? db_o : 8'hxx; cpu_iord = 1'b1;
    @(negedge clk); cs_n = 1'b1;
  endtask

  task automatic prog_ch(input int c, input logic [15:0] addr, input logic [15:0] cnt,
                         input logic [7:0] mode);
    cpu_wr(4'b1100, 8'h00);                       // clear first/last F/F
    cpu_wr(4'(c * 2), addr[7:0]);
    cpu_wr(4'(c * 2), addr[15:8]);
    cpu_wr(4'(c * 2 + 1), cnt[7:0]);
    cpu_wr(4'(c * 2 + 1), cnt[15:8]);
    cpu_wr(4'b1011, {mode[7:2], 2'(c)});
  endtask

  task automatic rd_cur(input int c, output logic [15:0] addr, output logic [15:0] cnt);
    logic [7:0] b0, b1, b2, b3;
    cpu_wr(4'b1100, 8'h00);
    cpu_rd(4'(c * 2), b0);
    cpu_rd(4'(c * 2), b1);
    cpu_rd(4'(c * 2 + 1), b2);
    cpu_rd(4'(c * 2 + 1), b3);
    addr = {b1, b0};
    cnt  = {b3, b2};
  endtask

  task automatic wait_idle(input int maxc, input string tag = "");
    int n = 0;
    while (!holdrq && n < maxc) begin @(posedge clk); n++; end
    while ((holdrq || dut.state != ST_SI) && n < maxc) begin @(posedge clk); n++; end
    check(n < maxc, {"service ended in time ", tag});
    repeat (2) @(posedge clk);
  endtask

  // mode byte: {mode[1:0], dec, autoinit, xfer[1:0], 2'b00}
  function automatic logic [7:0] mb(svc_mode_e m, bit d, bit ai, xfer_e x);
    return {m, d, ai, x, 2'b00};
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scenarios
  initial begin
    logic [7:0]  r;
    logic [15:0] a16, c16;
    int          t0, aen_cycles, s1_0, rx0, tx0, hr0;

    for (int i = 0; i < 65536; i++) mem[i] = mem_init(i);
    for (int i = 0; i < 4; i++) begin dev_tx_n[i] = 0; dev_rx_n[i] = 0; end
    rst = 1'b1; dreq = '0; rdy = 1'b1; cs_n = 1'b1; cpu_db = '0; cpu_a = '0;
    cpu_iord = 1'b1; cpu_iowr = 1'b1; ext_eop_n = 1'b1; grant_en = 1'b1; dack_hi = 0;

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // ---- reset values
    check(holdrq == 1'b0, "reset: holdrq low");
    check(dack == 4'hF, "reset: dack inactive (active-low)");
    cpu_rd(4'b1000, r); check(r == 8'h00, "reset: status 00");
    cpu_rd(4'b1010, r); check(r == 8'h00, "reset: command 00");
    cpu_rd(4'b1111, r); check(r == 8'hF0, "reset: mask clear");
    cpu_rd(4'b1001, r); check(r == 8'hF0, "reset: request clear");
    cpu_rd(4'b1101, r); check(r == 8'h00, "reset: temporary 00");
    check(dut.tmp_addr == 16'h0000 && dut.tmp_cnt == 16'h0000,
          "reset: temporary address and word count 0000");

    // ---- 1: block mode, I/O -> memory (write transfer), increment, 4 bytes
    prog_ch(0, 16'h1000, 16'd4, mb(MD_BLOCK, 0, 0, XF_WRITE));
    rd_cur(0, a16, c16);
    check(a16 == 16'h1000 && c16 == 16'd4, "program/read-back channel 0");
    tx0 = dev_tx_n[0]; s1_0 = n_s1; aen_cycles = n_aen;
    @(negedge clk) dreq[0] = 1'b1;
    wait_idle(200, "w1");
    dreq[0] = 1'b0;
    aen_cycles = n_aen - aen_cycles;
    for (int i = 0; i < 4; i++)
      check(mem[16'h1000 + i] == dev_byte(0, tx0 + i), $sformatf("block write byte %0d", i));
    check(mem[16'h1004] == mem_init(16'h1004), "block write: no byte past the count");
    check(aen_cycles == 1 + 4 * 3, $sformatf("block rate: %0d AEN clocks for 4 bytes", aen_cycles));
    check(n_s1 - s1_0 == 1, "block: one S1 without page change");
    cpu_rd(4'b1000, r); check(r[3:0] == 4'b0001, "status TC0 set");
    cpu_rd(4'b1000, r); check(r[3:0] == 4'b0000, "status TC cleared by read");
    cpu_rd(4'b1111, r); check(r[3:0] == 4'b0001, "mask 0 set at TC (no autoinit)");
    rd_cur(0, a16, c16);
    check(a16 == 16'h1004 && c16 == 16'd0, "channel 0 current after block");
    check(n_eop_int > 0, "internal EOP at terminal count");
    m_block++;

    // ---- 2: single mode, memory -> I/O (read transfer), decrement, 3 bytes
    prog_ch(1, 16'h3002, 16'd3, mb(MD_SINGLE, 1, 0, XF_READ));
    rx0 = dev_rx_n[1]; hr0 = n_hrq_rise;
    @(negedge clk) dreq[1] = 1'b1;
    t0 = 0;
    while (dev_rx_n[1] - rx0 < 3 && t0 < 400) begin @(posedge clk); t0++; end
    @(negedge clk) dreq[1] = 1'b0;
    repeat (10) @(posedge clk);
    check(!holdrq && dut.state == ST_SI, "single: idle after DREQ drops");
    check(dev_rx_n[1] - rx0 == 3, "single: 3 bytes to device");
    for (int i = 0; i < 3; i++)
      check(dev_rx[1][(rx0 + i) % 64] == mem_init(16'h3002 - i), $sformatf("single read byte %0d", i));
    check(n_hrq_rise - hr0 == 3, $sformatf("single: HRQ released after each byte (%0d)", n_hrq_rise - hr0));
    m_single++;

    // ---- 3: demand mode, write transfer, DREQ dropped after 2 of 5
    prog_ch(2, 16'h4000, 16'd5, mb(MD_DEMAND, 0, 0, XF_WRITE));
    tx0 = dev_tx_n[2];
    @(negedge clk) dreq[2] = 1'b1;
    while (dev_tx_n[2] - tx0 < 1) @(posedge clk);
    while (dut.state != ST_S3) @(posedge clk);
    @(negedge clk) dreq[2] = 1'b0;
    wait_idle(200, "w3");
    rd_cur(2, a16, c16);
    check(c16 == 16'd3 && a16 == 16'h4002, $sformatf("demand: paused with count %0d", c16));
    cpu_rd(4'b1000, r); check(r[2] == 1'b0, "demand pause: no TC");
    @(negedge clk) dreq[2] = 1'b1;
    wait_idle(200, "w4");
    dreq[2] = 1'b0;
    for (int i = 0; i < 5; i++)
      check(mem[16'h4000 + i] == dev_byte(2, tx0 + i), $sformatf("demand byte %0d", i));
    m_demand++;

    // ---- 4: fixed priority: channels 2 and 3 together, 2 goes first
    cpu_wr(4'b1110, 8'h00);                          // clear all mask bits
    prog_ch(2, 16'h5000, 16'd1, mb(MD_BLOCK, 0, 0, XF_VERIFY));
    prog_ch(3, 16'h5100, 16'd1, mb(MD_BLOCK, 0, 0, XF_VERIFY));
    @(negedge clk) dreq[3:2] = 2'b11;
    while (!aen) @(posedge clk);
    check(dut.ch == 2'd2, "fixed priority: channel 2 before 3");
    while (dut.state != ST_SI) @(posedge clk);
    while (!aen) @(posedge clk);
    check(dut.ch == 2'd3, "fixed priority: then channel 3");
    @(negedge clk) dreq[3:2] = 2'b00;
    wait_idle(100, "w5");
    rd_cur(2, a16, c16); check(a16 == 16'h5001, "verify: address advanced without strobes");
    m_fixed++; m_verify++;

    // ---- 5: rotating priority: after channel 1 is served, 2 wins over 0 and 1
    cpu_wr(4'b1000, 8'h10);                          // command: rotating priority
    cpu_wr(4'b1110, 8'h00);
    prog_ch(1, 16'h5200, 16'd1, mb(MD_SINGLE, 0, 0, XF_VERIFY));
    @(negedge clk) dreq[1] = 1'b1;
    wait_idle(100, "w6");
    dreq[1] = 1'b0;
    cpu_wr(4'b1110, 8'h00);
    prog_ch(0, 16'h5300, 16'd1, mb(MD_SINGLE, 0, 0, XF_VERIFY));
    prog_ch(2, 16'h5400, 16'd1, mb(MD_SINGLE, 0, 0, XF_VERIFY));
    @(negedge clk) dreq[2:0] = 3'b101;
    while (!aen) @(posedge clk);
    check(dut.ch == 2'd2, "rotating priority: channel 2 after 1");
    while (dut.state != ST_SI) @(posedge clk);
    while (!aen) @(posedge clk);
    check(dut.ch == 2'd0, "rotating priority: then channel 0");
    @(negedge clk) dreq = '0;
    wait_idle(100, "w7");
    cpu_wr(4'b1000, 8'h00);
    m_rotate++;

    // ---- 6: page crossing, READY waits, extended write
    cpu_wr(4'b1110, 8'h00);
    cpu_wr(4'b1000, 8'h20);                          // extended write
    prog_ch(0, 16'h10FE, 16'd4, mb(MD_BLOCK, 0, 0, XF_WRITE));
    tx0 = dev_tx_n[0]; s1_0 = n_s1;
    @(negedge clk) dreq[0] = 1'b1;
    t0 = n_extw;
    while (dut.state != ST_S3) @(posedge clk);
    @(negedge clk) rdy = 1'b0;
    repeat (6) @(negedge clk);
    rdy = 1'b1;
    wait_idle(200, "w8");
    if (n_extw > t0) m_extwrite++;
    dreq[0] = 1'b0;
    for (int i = 0; i < 4; i++)
      check(mem[16'h10FE + i] == dev_byte(0, tx0 + i), $sformatf("page-cross byte %0d", i));
    check(n_s1 - s1_0 == 2, $sformatf("page crossing re-strobes A15..A8 (%0d S1)", n_s1 - s1_0));
    check(n_wait >= 3, "READY low stretched S3");
    if (n_s1 - s1_0 == 2) m_page++;
    if (n_wait >= 3) m_wait++;
    cpu_wr(4'b1000, 8'h00);

    // ---- 7: compressed timing, 2 clocks per byte
    cpu_wr(4'b1110, 8'h00);
    cpu_wr(4'b1000, 8'h08);
    prog_ch(3, 16'h6000, 16'd4, mb(MD_BLOCK, 0, 0, XF_WRITE));
    tx0 = dev_tx_n[3]; aen_cycles = n_aen;
    @(negedge clk) dreq[3] = 1'b1;
    wait_idle(200, "w9");
    dreq[3] = 1'b0;
    aen_cycles = n_aen - aen_cycles;
    check(aen_cycles == 1 + 4 * 2, $sformatf("compressed rate: %0d AEN clocks", aen_cycles));
    for (int i = 0; i < 4; i++)
      check(mem[16'h6000 + i] == dev_byte(3, tx0 + i), $sformatf("compressed byte %0d", i));
    if (aen_cycles == 9) m_compressed++;
    cpu_wr(4'b1000, 8'h00);

    // ---- 8: autoinitialize
    cpu_wr(4'b1110, 8'h00);
    prog_ch(3, 16'h7000, 16'd2, mb(MD_BLOCK, 0, 1, XF_WRITE));
    @(negedge clk) dreq[3] = 1'b1;
    wait_idle(100, "w10");
    dreq[3] = 1'b0;
    rd_cur(3, a16, c16);
    check(a16 == 16'h7000 && c16 == 16'd2, "autoinit restores base address and count");
    cpu_rd(4'b1111, r); check(r[3] == 1'b0, "autoinit: mask not set");
    cpu_rd(4'b1000, r); check(r[3] == 1'b1, "autoinit: TC3 flagged");
    m_autoinit++;

    // ---- 9: external EOP stops a block service early
    prog_ch(1, 16'h8000, 16'd10, mb(MD_BLOCK, 0, 0, XF_WRITE));
    tx0 = dev_tx_n[1];
    @(negedge clk) dreq[1] = 1'b1;
    while (dev_tx_n[1] - tx0 < 3) @(posedge clk);
    while (dut.state != ST_S2) @(posedge clk);
    @(negedge clk) ext_eop_n = 1'b0;
    @(negedge clk) ext_eop_n = 1'b1;
    wait_idle(200, "w11");
    dreq[1] = 1'b0;
    rd_cur(1, a16, c16);
    check(c16 == 16'd6, $sformatf("external EOP after 4 bytes (count %0d)", c16));
    cpu_rd(4'b1000, r); check(r[1] == 1'b1, "external EOP sets TC bit");
    if (c16 == 16'd6) m_exteop++;

    // ---- 10: memory-to-memory, 4 bytes 0x1000 -> 0x2000
    cpu_wr(4'b1110, 8'h00);
    cpu_wr(4'b1000, 8'h01);
    prog_ch(0, 16'h1000, 16'd4, mb(MD_BLOCK, 0, 0, XF_READ));
    prog_ch(1, 16'h2000, 16'd4, mb(MD_BLOCK, 0, 0, XF_WRITE));
    cpu_wr(4'b1001, 8'h04);                          // software request, channel 0
    wait_idle(300, "w12");
    for (int i = 0; i < 4; i++)
      check(mem[16'h2000 + i] == mem[16'h1000 + i], $sformatf("mem-to-mem byte %0d", i));
    check(mem[16'h2004] == mem_init(16'h2004), "mem-to-mem: no byte past the count");
    cpu_rd(4'b1101, r); check(r == mem[16'h1003], "temporary register holds last byte");
    cpu_rd(4'b1001, r); check(r[0] == 1'b0, "software request cleared at TC");
    if (mem[16'h2003] == mem[16'h1003]) m_mm++;

    // ---- 11: memory-to-memory with channel 0 address hold (block fill)
    cpu_wr(4'b1110, 8'h00);
    cpu_wr(4'b1000, 8'h03);
    prog_ch(0, 16'h1001, 16'd3, mb(MD_BLOCK, 0, 0, XF_READ));
    prog_ch(1, 16'h2100, 16'd3, mb(MD_BLOCK, 0, 0, XF_WRITE));
    cpu_wr(4'b1001, 8'h04);
    wait_idle(300, "w13");
    for (int i = 0; i < 3; i++)
      check(mem[16'h2100 + i] == mem[16'h1001], $sformatf("address-hold fill byte %0d", i));
    rd_cur(0, a16, c16); check(a16 == 16'h1001, "channel 0 address held");
    if (mem[16'h2102] == mem[16'h1001]) m_mmhold++;
    cpu_wr(4'b1000, 8'h00);

    // ---- 12: cascade: DACK follows while DREQ held, no address
    cpu_wr(4'b1110, 8'h00);
    cpu_wr(4'b1011, {MD_CASCADE, 4'b0000, 2'd2});
    @(negedge clk) dreq[2] = 1'b1;
    repeat (8) @(posedge clk);
    check(holdrq && dack == 4'b1011 && !aen, "cascade: HRQ and DACK2, no AEN");
    @(negedge clk) dreq[2] = 1'b0;
    repeat (4) @(posedge clk);
    check(!holdrq && dack == 4'hF, "cascade: released when DREQ drops");
    if (n_cascade > 0) m_cascade++;

    // ---- 13: DREQ active low, DACK active high
    cpu_wr(4'b1111, 8'h0F);                          // mask all while switching polarity
    dreq = 4'hF;                                     // all inactive once active low
    cpu_wr(4'b1000, 8'hC0);
    dack_hi = 1;
    cpu_wr(4'b1110, 8'h00);
    repeat (4) @(posedge clk);
    check(!holdrq && dack == 4'h0, "polarity: idle with DREQ high, DACK low");
    prog_ch(0, 16'h9000, 16'd2, mb(MD_BLOCK, 0, 0, XF_WRITE));
    tx0 = dev_tx_n[0];
    @(negedge clk) dreq[0] = 1'b0;
    while (!aen) @(posedge clk);
    @(posedge clk);
    check(dack == 4'b0001, "polarity: DACK0 high");
    wait_idle(100, "w14");
    dreq = 4'hF;
    check(mem[16'h9001] == dev_byte(0, tx0 + 1), "polarity: transfer done");
    m_polarity++;

    // ---- 14: mode read-back counter
    cpu_wr(4'b1011, mb(MD_SINGLE, 1, 0, XF_READ) | 8'h00);
    cpu_wr(4'b1011, mb(MD_DEMAND, 0, 1, XF_WRITE) | 8'h01);
    cpu_rd(4'b1110, r);                              // clear mode register counter
    cpu_rd(4'b1011, r); check(r == (mb(MD_SINGLE, 1, 0, XF_READ) | 8'h03), "mode read-back ch0");
    cpu_rd(4'b1011, r); check(r == (mb(MD_DEMAND, 0, 1, XF_WRITE) | 8'h03), "mode read-back ch1");
    m_modecnt++;

    // ---- 15: master clear
    cpu_wr(4'b1111, 8'h0F);
    dreq = 4'h0;
    cpu_wr(4'b1101, 8'h00);
    dack_hi = 0;
    cpu_rd(4'b1010, r); check(r == 8'h00, "master clear: command 00");
    cpu_rd(4'b1111, r); check(r == 8'hF0, "master clear: mask clear");
    rd_cur(0, a16, c16); check(a16 == 16'h0 && c16 == 16'h0, "master clear: channel 0 cleared");
    repeat (4) @(posedge clk);
    check(!holdrq && dack == 4'hF, "master clear: idle");
    m_masterclr++;

    // ---- every mechanism happened
    check(m_block > 0, "mechanism: block");       check(m_single > 0, "mechanism: single");
    check(m_demand > 0, "mechanism: demand");     check(m_page > 0, "mechanism: page crossing");
    check(m_wait > 0, "mechanism: READY wait");   check(m_compressed > 0, "mechanism: compressed");
    check(m_extwrite > 0, "mechanism: extended write");
    check(m_verify > 0, "mechanism: verify");     check(m_autoinit > 0, "mechanism: autoinit");
    check(m_exteop > 0, "mechanism: external EOP");
    check(m_mm > 0, "mechanism: mem-to-mem");     check(m_mmhold > 0, "mechanism: address hold");
    check(m_cascade > 0, "mechanism: cascade");   check(m_fixed > 0, "mechanism: fixed priority");
    check(m_rotate > 0, "mechanism: rotating priority");
    check(m_polarity > 0, "mechanism: polarity"); check(m_modecnt > 0, "mechanism: mode counter");
    check(m_masterclr > 0, "mechanism: master clear");
    $display("mechanisms: block=%0d single=%0d demand=%0d page=%0d wait=%0d compressed=%0d extwrite=%0d verify=%0d autoinit=%0d exteop=%0d mm=%0d mmhold=%0d cascade=%0d fixed=%0d rotate=%0d polarity=%0d",
             m_block, m_single, m_demand, m_page, n_wait, m_compressed, m_extwrite, m_verify,
             m_autoinit, m_exteop, m_mm, m_mmhold, n_cascade, m_fixed, m_rotate, m_polarity);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
