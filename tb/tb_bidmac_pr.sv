// tb_bidmac_pr: unit test of the priority unit.
//
// Plays the timing-and-control unit and the CPU. Checks: valid requests from
// DREQ, mask and software request bits, and controller disable; DREQ
// polarity; the fixed-priority winner for every request pattern against a
// reference encoder in the bench; the rotating-priority winner after each
// served channel; freezing of the served channel at hold acknowledge; DACK
// and its polarity; HRQ pass-through; and the effect of a terminal count
// (status TC bit, request clear, mask set unless autoinitializing), status
// clear on read, and master clear.
module tb_bidmac_pr;
  import dmac_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  logic rst, hold_ack;
  logic [3:0] dreq, dack, mask, req, valid_dreq;
  logic holdrq, hrq, dack_en, fin, fin_autoinit, release_svc;
  regop_t regop;
  logic [7:0] wdata, status;
  cmd_t cmd;
  logic [1:0] fin_ch, ch;

  bidmac_pr dut (
    .bidmac_pr_clk(clk), .bidmac_pr_rst(rst), .bidmac_pr_dreq(dreq),
    .bidmac_pr_hold_ack(hold_ack), .bidmac_pr_dack(dack), .bidmac_pr_holdrq(holdrq),
    .regop, .wdata, .cmd, .status, .mask, .req, .hrq, .dack_en, .fin, .fin_ch,
    .fin_autoinit, .release_svc, .valid_dreq, .ch
  );

  function automatic logic [1:0] ref_winner(logic [3:0] v, logic [1:0] start);
    for (int k = 0; k < 4; k++) if (v[2'(start + 2'(k))]) return 2'(start + 2'(k));
    return start;
  endfunction

  task automatic op(input int which, input logic [7:0] d);
    @(negedge clk);
    regop = '0; wdata = d;
    unique case (which)
      0: regop.wr_req = 1;
      1: regop.wr_smask = 1;
      2: regop.clr_mask = 1;
      3: regop.wr_allmask = 1;
      4: regop.rd_status = 1;
      default: regop.master_clr = 1;
    endcase
    @(negedge clk); regop = '0;
  endtask

  // one service of the current winner: grant, then release
  task automatic serve(output logic [1:0] got);
    @(negedge clk) hrq = 1;
    @(negedge clk) hold_ack = 1;
    @(negedge clk) dack_en = 1; got = ch;
    @(negedge clk) release_svc = 1;
    @(negedge clk) release_svc = 0; dack_en = 0; hrq = 0; hold_ack = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] got, last_served;
    rst = 1; hold_ack = 0; dreq = 0; hrq = 0; dack_en = 0; fin = 0; fin_autoinit = 0;
    release_svc = 0; regop = '0; wdata = 0; cmd = '0; fin_ch = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(mask == 0 && req == 0 && status == 0 && dack == 4'hF && !holdrq, "reset values");

    // fixed priority against the reference for all request patterns
    for (int p = 1; p < 16; p++) begin
      @(negedge clk) dreq = 4'(p);
      #1 check(valid_dreq == 4'(p) && ch == ref_winner(4'(p), 0),
               $sformatf("fixed winner for %b: %0d", 4'(p), ch));
    end

    // mask and software request
    @(negedge clk) dreq = 4'b0011;
    op(1, 8'h04);                                     // set mask bit 0
    #1 check(valid_dreq == 4'b0010 && ch == 1, "mask bit 0 hides DREQ0");
    op(0, 8'h07);                                     // software request channel 3
    #1 check(valid_dreq == 4'b1010 && req == 4'b1000, "software request ignores mask");
    check(status[7:4] == 4'b1011, "status request bits");
    op(3, 8'h0F);
    #1 check(mask == 4'hF && valid_dreq == 4'b1000, "write all mask bits");
    op(2, 8'h00);
    #1 check(mask == 4'h0 && valid_dreq == 4'b1011, "clear mask bits");
    op(0, 8'h03);                                     // clear request channel 3
    #1 check(req == 4'b0000, "request bit reset");

    // controller disable and DREQ active low
    @(negedge clk) cmd.disable_c = 1;
    #1 check(valid_dreq == 0, "disabled controller has no valid request");
    @(negedge clk) cmd.disable_c = 0; cmd.dreq_lo = 1; dreq = 4'b1011;
    #1 check(valid_dreq == 4'b0100 && ch == 2, "DREQ active low");
    @(negedge clk) cmd.dreq_lo = 0;

    // grant freezes the channel; DACK and polarity
    @(negedge clk) dreq = 4'b0100; hrq = 1;
    #1 check(holdrq, "HRQ passes through");
    @(negedge clk) hold_ack = 1;
    @(negedge clk) dreq = 4'b0101; dack_en = 1;
    #1 check(ch == 2 && dack == 4'b1011, "served channel frozen, DACK2 active low");
    @(negedge clk) cmd.dack_hi = 1;
    #1 check(dack == 4'b0100, "DACK active high");
    @(negedge clk) cmd.dack_hi = 0;
    // terminal count on channel 2, not autoinit
    @(negedge clk) fin = 1; fin_ch = 2; fin_autoinit = 0; release_svc = 1;
    @(negedge clk) fin = 0; release_svc = 0; dack_en = 0; hrq = 0; hold_ack = 0;
    #1 check(status[3:0] == 4'b0100 && mask == 4'b0100, "TC2 flagged and channel 2 masked");
    check(ch == 0, "channel 0 wins after release");
    op(4, 0);
    #1 check(status[3:0] == 0, "status read clears TC bits");
    // terminal count with autoinit: no mask
    op(2, 0);
    @(negedge clk) fin = 1; fin_ch = 1; fin_autoinit = 1;
    @(negedge clk) fin = 0;
    #1 check(status[1] && !mask[1], "autoinit: TC flagged, mask untouched");
    // software request cleared at TC
    op(0, 8'h06);
    @(negedge clk) fin = 1; fin_ch = 2; fin_autoinit = 1;
    @(negedge clk) fin = 0;
    #1 check(req[2] == 0, "software request cleared at TC");

    // rotating priority: after serving channel k, k becomes lowest
    @(negedge clk) cmd.rotate = 1; dreq = 4'b1111;
    last_served = 2;                                  // channel 2 was released last
    for (int i = 0; i < 8; i++) begin
      serve(got);
      check(got == ref_winner(4'b1111, last_served + 2'd1),
            $sformatf("rotating winner %0d after %0d", got, last_served));
      last_served = got;
    end
    @(negedge clk) dreq = 4'b1010;
    #1 check(ch == ref_winner(4'b1010, last_served + 2'd1), "rotating with gaps");

    // master clear
    op(3, 8'h0F);
    op(0, 8'h05);
    op(5, 0);
    #1 check(mask == 0 && req == 0 && status[3:0] == 0, "master clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
