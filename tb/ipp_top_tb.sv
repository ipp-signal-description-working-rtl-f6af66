// ipp_top_tb: end-to-end test of the Input Port Processor at default sizes.
// Sources: a 32-bit link whose upper half leads the lower half by three strobes
// (so the deskew must hunt), carrying tagged ATM cells, idle (unassigned) cells,
// cells with a bad HEC, control cells and cells whose VPI/VCI are out of range;
// and the OPP recycling path (own clock, own phase) carrying tagged data and
// control cells, idle cells and cells with a parity error. The SE side is a
// monitor that rebuilds each outgoing cell from the four slices, checks parity
// and control copies, compares header (against a reference translation of the
// table contents) and payload, and answers with GRANT_SE.
// Phases: (A) light traffic with random grant refusals; (B) no grants for a long
// stretch, so the RCB congests and overflows, the CYCB data FIFO fills and CS=0
// cells are dropped; (C) recovery and light traffic; (E) CTRL_EN, SLE and RLE
// switched off in turn and the link taken down (cells sent then must not come
// out; BADCELL and SLETIMEOUT must pulse); then the RESET_REQ and CLR_ERR
// commands; (D) a second reset into 16-bit link mode with CC_TAP = 3.
// Every cell sent in a quiet period must come out exactly once, granted cells
// never reappear, refused cells are sent again, and when all traffic has
// drained every cell-store pointer is free again. Each mechanism is counted and
// a mechanism that never happened counts as a failure.
module ipp_top_tb;
  import ipp_pkg::*;

  // ---------------- DUT ----------------
  logic clk = 0, cell_clk = 0, reset_n = 0, ctrl_en = 1;
  logic [3:0] c_clk_tap = 0;
  logic reset_req_pd, clr_err_pd, clr_err_n_in;
  logic strb_l_link = 0, strb_h_link = 0;
  logic [15:0] d_l_link = 0, d_h_link = 0;
  logic soc_l_link = 0, soc_h_link = 0, up_l_link = 1, up_h_link = 1, width_link = 1, d_skew_link = 1;
  logic [3:0] type_link = 0;
  logic clk_opp = 0;
  logic [31:0] d_opp = 0;
  logic soc_opp = 0, pari_opp = 1;
  logic [3:0][7:0] d_ipp;
  logic [3:0][3:0] ctrl_ipp;
  logic [3:0] pari_ipp;
  logic grant_se = 1;
  logic sle = 1, rle = 1;
  logic [31:0] hrent = 2, sclt = 0;
  logic [7:0] rcbdisthr = 20, vpcount = 8;
  logic [15:0] rcbdishd = 3;
  logic tbl_we = 0;
  logic [9:0] tbl_addr = 0;
  logic [31:0] tbl_wdata = 0;
  logic cmd_reset_req = 0, cmd_clr_err = 0;
  logic bist_clk = 0, bist_test = 0;
  logic [2:0] bist_res;
  logic [1:0] quik_test = 0;
  logic all0, all1, all0but1;
  logic [49:0] test_ipp;

  assign clr_err_n_in = !clr_err_pd;   // wired line with no other driver

  ipp_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s @%0t", m, $time); end
  endtask

  // ---------------- clocks ----------------
  always #4.167 clk = ~clk;                              // CLK 120 MHz, the top rate
  int ncyc = 0;
  always @(negedge clk) begin
    ncyc++;
    cell_clk <= (ncyc % 16 == 0);
  end
  initial begin #2.5; forever #12.5 strb_l_link = ~strb_l_link; end
  initial begin #9.0; forever #12.5 strb_h_link = ~strb_h_link; end
  initial begin #3.7; forever #4.167 clk_opp = ~clk_opp; end

  // the testbench's own cell phase: 0 in the cycle after CELL_CLK is sampled
  logic [3:0] tph = 0;
  always @(posedge clk) tph <= cell_clk ? 4'd0 : tph + 4'd1;

  // ---------------- cells ----------------
  typedef logic [15:0][31:0] cellw_t;
  localparam int LEAD = 3;

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  function automatic logic [31:0] payload(input logic [31:0] tag, input int k);
    return tag * 32'h9E37_79B9 + 32'(k) * 32'h0101_0101;
  endfunction

  function automatic cellw_t mk_cell(input logic [31:0] h, input logic [31:0] tag, input bit bad_hec);
    cellw_t c;
    c[0] = h;
    c[1] = {ref_hec(h) ^ (bad_hec ? 8'h01 : 8'h00), tag[23:0]};
    c[2] = tag;
    for (int k = 3; k < 16; k++) c[k] = payload(tag, k);
    return c;
  endfunction

  cellw_t idle_cell;
  initial idle_cell = mk_cell(32'h0, 32'h0, 0);

  // ---------------- table and reference translation ----------------
  logic [31:0] tbl [1024];
  function automatic bit translate(input logic [31:0] h, input bit ctl, output logic [31:0] eh, output bit ior);
    logic [31:0] e;
    logic [7:0] vpi = h[27:20];
    logic [15:0] vci = h[19:4];
    ior = 0;
    if (ctl) begin eh = {5'd0, h[3:1], h[27:4]}; return 1; end
    if (vpi >= vpcount) begin ior = 1; return 0; end
    e = tbl[vpi];
    if (e[29]) begin
      if (32'(vci) >= 1024 - 32'(vpcount)) begin ior = 1; return 0; end
      e = tbl[32'(vpcount) + 32'(vci)];
      eh = {e[28:24], h[3:1], e[23:0]};
    end else begin
      eh = {e[28:24], h[3:1], e[23:16], vci};
    end
    return 1;
  endfunction

  // ---------------- link driver ----------------
  cellw_t lq[$];                 // cells waiting to go on the link
  cellw_t slot_cell[int];        // cell chosen for each link slot
  int nl = 0, nh = 0;
  function automatic logic [31:0] link_word(input int n);
    int s = n / 16;
    if (!slot_cell.exists(s)) begin
      if (lq.size() > 0) slot_cell[s] = lq.pop_front();
      else slot_cell[s] = idle_cell;
      if (slot_cell.exists(s - 8)) slot_cell.delete(s - 8);
    end
    return slot_cell[s][n % 16];
  endfunction
  always @(negedge strb_l_link) begin
    if (width_link) begin
      logic [31:0] w;
      w = link_word(nl);
      d_l_link <= w[15:0]; soc_l_link <= (nl % 16 == 0);
    end else begin
      logic [31:0] w;
      w = link_word(nl / 2);
      d_l_link <= (nl % 2 == 0) ? w[31:16] : w[15:0];
      soc_l_link <= (nl % 32 == 0);
    end
    nl++;
  end
  always @(negedge strb_h_link) begin
    if (width_link) begin
      logic [31:0] w;
      w = link_word(nh + LEAD);
      d_h_link <= w[31:16]; soc_h_link <= ((nh + LEAD) % 16 == 0);
    end
    nh++;
  end

  // ---------------- OPP driver ----------------
  cellw_t oq[$];
  cellw_t ocur;
  int no = 0;
  bit opp_bad[$];
  bit obad;
  always @(posedge clk_opp) begin
    #1;
    if (no % 16 == 0) begin
      if (oq.size() > 0) begin ocur = oq.pop_front(); obad = opp_bad.pop_front(); end
      else begin ocur = idle_cell; obad = 0; end
    end
    d_opp    <= ocur[no % 16];
    soc_opp  <= (no % 16 == 0);
    pari_opp <= ~^ocur[no % 16] ^ (obad && no % 16 == 7);
    no++;
  end

  // ---------------- expectations ----------------
  typedef struct { logic [31:0] eh; bit must; bit ctl; bit fromlink; } exp_t;
  exp_t exp_tag[logic [31:0]];
  int delivered[logic [31:0]];
  int tagn = 1;
  bit quiet = 1;          // cells sent now must come out
  bit expect_none = 0;    // cells sent now must be dropped
  int n_dropsent = 0;

  task automatic send_link(input int kind, input bit ctl_ok);
    // kind: 0 good, 1 bad HEC, 2 VPI out of range, 3 control cell, 4 VCI out of range, 5 CS0-prone
    logic [31:0] h, tag, eh;
    bit ok, ior, ctl;
    tag = {1'b0, 31'(tagn++)};
    h = $urandom;
    h[27:20] = 8'($urandom_range(0, 7));
    if (h[27:20] == 3 && kind != 5) h[27:20] = 2;
    if (kind == 5) h[27:20] = 3;
    h[19:4] = 16'($urandom_range(33, 1015));
    if (kind == 2) h[27:20] = 8'($urandom_range(8, 255));
    if (kind == 4) begin h[27:20] = 8'($urandom_range(4, 7)); h[19:4] = 16'($urandom_range(1016, 65535)); end
    ctl = (kind == 3);
    if (ctl) h[27:4] = {8'd0, 16'd32};
    ok = translate(h, ctl, eh, ior);
    if (expect_none) n_dropsent++;
    else if (kind != 1 && ok && (!ctl || ctl_ok))
      exp_tag[tag] = '{eh, quiet && kind != 5, ctl, 1'b1};
    lq.push_back(mk_cell(h, tag, kind == 1));
  endtask

  task automatic send_opp(input bit ctl, input bit bad);
    logic [31:0] h, tag, eh;
    bit ok, ior;
    tag = {1'b1, 31'(tagn++)};
    h = $urandom;
    h[27:20] = 8'($urandom_range(0, 7));
    if (h[27:20] == 3) h[27:20] = 1;
    h[19:4] = 16'($urandom_range(33, 1015));
    if (ctl) h[27:4] = {8'd0, 16'd32};
    ok = translate(h, ctl, eh, ior);
    if (expect_none && !ctl) n_dropsent++;
    else if (!bad) exp_tag[tag] = '{eh, quiet, ctl, 1'b0};
    oq.push_back(mk_cell(h, tag, 0));
    opp_bad.push_back(bad);
  endtask

  // ---------------- SE monitor ----------------
  logic [31:0] ow [16];
  int oidx = -1;
  bit obusy, octl;
  bit last_granted = 1;
  logic [31:0] last_tag = 0, cur_tag;
  bit grant_this;
  int n_cells_out = 0, n_resend = 0, n_refused = 0, n_tapcheck = 0;
  bit refuse_all = 0;
  int refuse_pct = 10;

  always @(negedge clk) if (reset_n) begin
    logic [31:0] w;
    logic [3:0] c;
    for (int i = 0; i < 4; i++) begin
      w[8*i +: 8] = d_ipp[i];
      chk(^{d_ipp[i], ctrl_ipp[i], pari_ipp[i]} == 1'b1, "SE parity");
      chk(ctrl_ipp[i] == ctrl_ipp[0], "control copies");
    end
    c = ctrl_ipp[0];
    if (c[1]) begin
      chk(tph == c_clk_tap + 4'd1, "first word position against CELL_CLK and CC_TAP");
      n_tapcheck++;
      oidx = 0; octl = c[2];
    end
    if (oidx >= 0 && c[0]) begin
      ow[oidx] = w;
      if (oidx == 15) begin
        chk(c[3], "last-word bit");
        cur_tag = ow[2];
        n_cells_out++;
        if (!last_granted) begin
          chk(cur_tag == last_tag, "refused cell sent again");
          n_resend++;
        end
        if (!exp_tag.exists(cur_tag)) chk(0, $sformatf("unknown cell tag %h", cur_tag));
        else begin
          chk(ow[0] == exp_tag[cur_tag].eh, $sformatf("header %h exp %h", ow[0], exp_tag[cur_tag].eh));
          chk(octl == exp_tag[cur_tag].ctl, "control bit");
          for (int k = 3; k < 16; k++) chk(ow[k] == payload(cur_tag, k), "payload");
          chk(ow[1][23:0] == cur_tag[23:0], "payload word 1");
          if (grant_this) begin
            chk(!delivered.exists(cur_tag), "granted cell delivered once");
            delivered[cur_tag] = 1;
          end
        end
        last_granted = grant_this;
        last_tag = cur_tag;
        oidx = -1;
      end else oidx++;
    end else if (oidx >= 0 && !c[0]) oidx = -1;
    // GRANT_SE for the cell being sent; sampled at the edge ending ph 7
    if (tph == 4'd7) begin
      grant_se = !refuse_all && ($urandom_range(0, 99) >= refuse_pct);
      grant_this = grant_se;
      if (!grant_se) n_refused++;
    end
  end

  // ---------------- mechanism counters ----------------
  int m_lock = 0, m_badhec = 0, m_rxcc = 0, m_ctl_link = 0, m_cong = 0, m_ovf0 = 0, m_ovf1 = 0;
  int m_vxior = 0, m_cs0 = 0, m_dfull = 0, m_cfull = 0, m_cycb = 0, m_rcb_disc = 0, m_hle = 0;
  int m_resetreq = 0, m_clrerr = 0, m_mreq = 0, m_all0 = 0, m_all1 = 0, m_ptravail_low = 0;
  int m_socm = 0, m_badcell = 0, m_slet = 0, m_hle_low = 0;
  always @(posedge clk) if (reset_n) begin
    if (tph == 4'd1) begin
      m_rxcc += test_ipp[5]; m_badhec += test_ipp[8]; m_hle += test_ipp[9];
      m_ovf0 += test_ipp[20]; m_ovf1 += test_ipp[21]; m_cong += test_ipp[22];
      m_vxior += test_ipp[42]; m_cs0 += test_ipp[43];
      m_badcell += test_ipp[7]; m_slet += test_ipp[10]; m_hle_low += !test_ipp[9];
    end
    m_lock += test_ipp[2];
    if (test_ipp[3] && test_ipp[4]) m_ctl_link++;
    m_rcb_disc += test_ipp[19];
    m_socm += test_ipp[27];
    m_mreq += test_ipp[28];
    m_dfull += test_ipp[31]; m_cfull += test_ipp[32];
    m_cycb += test_ipp[33];
    m_resetreq += reset_req_pd; m_clrerr += clr_err_pd;
    m_all0 += all0; m_all1 += all1;
    m_ptravail_low += !test_ipp[18];
  end

  // ---------------- sequence ----------------
  initial begin
    repeat (16 * 12000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cells(input int n);
    repeat (16 * n) @(posedge clk);
  endtask

  task automatic drain_link;
    while (lq.size() > 0) cells(1);
    cells(5);
  endtask
  task automatic drain_opp;
    while (oq.size() > 0) cells(1);
    cells(5);
  endtask

  task automatic check_quiet_delivered(input string ph);
    int miss;
    drain_link; drain_opp; cells(30);
    miss = 0;
    foreach (exp_tag[t]) if (exp_tag[t].must && !delivered.exists(t)) miss++;
    chk(miss == 0, $sformatf("%s: %0d cells that had to come out are missing", ph, miss));
  endtask

  initial begin
    // table: VP entries 0..3 switch the VP (entry 3 has CS 0), 4..7 point to VC entries
    for (int a = 0; a < 1024; a++) begin
      tbl[a] = $urandom;
      if (a < 8) tbl[a][29] = (a >= 4); else tbl[a][29] = 0;
      if (tbl[a][31:30] == 0) tbl[a][31:30] = 2'd1;
      if (a == 3) tbl[a][31:30] = 2'd0;
    end
    reset_n = 0;
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      tbl_we = 1; tbl_addr = 10'(a); tbl_wdata = tbl[a];
      @(negedge clk);
    end
    tbl_we = 0;
    cells(12);
    reset_n = 1;
    cells(20);
    chk(test_ipp[2], "link deskew locked");

    // (A) light traffic, 10 % refusals
    quiet = 1; refuse_pct = 10;
    for (int i = 0; i < 80; i++) begin
      send_link((i % 9 == 4) ? 1 : (i % 9 == 6) ? 2 : (i % 9 == 7) ? 3 : (i % 9 == 8) ? 4 : (i % 9 == 5) ? 5 : 0, 1);
      if (i % 3 == 0) send_opp(i % 6 == 0 && i % 12 != 0, i % 15 == 9);
      cells(2);
    end
    cells(60);
    check_quiet_delivered("A");

    // (B) SE refuses everything: congestion, overflow, full recycling FIFO
    quiet = 0; refuse_all = 1;
    for (int i = 0; i < 100; i++) begin
      send_link((i % 8 == 1) ? 5 : 0, 1);
      if (i < 20) begin send_opp(i % 7 == 0, 0); send_opp(0, 0); end
      cells(2);
    end
    cells(30);
    refuse_all = 0;
    // (C) recovery
    for (int i = 0; i < 60; i++) begin
      send_link((i % 3 == 1) ? 5 : 0, 1);
      cells(3);
    end
    cells(200);
    quiet = 1;
    for (int i = 0; i < 40; i++) begin
      send_link(0, 1);
      if (i % 4 == 0) send_opp(i % 8 == 0, 0);
      cells(2);
    end
    cells(100);
    check_quiet_delivered("C");
    chk(dut.u_cstr.free_count == 7'(IPP_CELLS - 2), $sformatf("pointers leaked: %0d free", dut.u_cstr.free_count));
    chk(test_ipp[18], "cell store never ran out");

    // (E) enables: CTRL_EN, SLE and RLE off, then the link goes down
    refuse_pct = 0;
    ctrl_en = 0; cells(3);
    for (int i = 0; i < 3; i++) begin send_link(3, 0); send_link(0, 1); end
    drain_link;
    ctrl_en = 1;
    sle = 0; cells(3); expect_none = 1;
    for (int i = 0; i < 4; i++) send_link(0, 1);
    drain_link;
    expect_none = 0; sle = 1;
    rle = 0; cells(3); expect_none = 1;
    for (int i = 0; i < 6; i++) send_opp(i == 2, 0);
    drain_opp;
    expect_none = 0; rle = 1;
    sclt = 5; hrent = 4;
    up_l_link = 0; cells(3); expect_none = 1;
    for (int i = 0; i < 3; i++) send_link(0, 1);
    drain_link;
    cells(8);
    expect_none = 0; up_l_link = 1;
    cells(12);
    for (int i = 0; i < 10; i++) begin send_link(0, 1); send_opp(0, 0); cells(2); end
    cells(40);
    check_quiet_delivered("E");
    sclt = 0; hrent = 2;

    // control-cell commands
    @(negedge clk); cmd_reset_req = 1; cmd_clr_err = 1;
    @(negedge clk); cmd_reset_req = 0; cmd_clr_err = 0;
    cells(2);
    chk(reset_req_pd && clr_err_pd, "RESET_REQ and CLR_ERR driven");
    cells(260);
    chk(!clr_err_pd, "CLR_ERR released");
    chk(reset_req_pd, "RESET_REQ held until RESET");

    // (D) reset into 16-bit link mode with CC_TAP = 3
    reset_n = 0; c_clk_tap = 4'd3; width_link = 0;
    #1 chk(!reset_req_pd, "RESET pin releases RESET_REQ at once");
    cells(12);
    reset_n = 1;
    cells(3);
    chk(!reset_req_pd, "RESET clears RESET_REQ");
    cells(20);
    refuse_pct = 0;
    for (int i = 0; i < 20; i++) begin
      send_link(0, 1);
      cells(3);
    end
    cells(60);
    check_quiet_delivered("D");

    $display("mechanisms: lock=%0d rxcc=%0d badhec=%0d ctl_link=%0d cong=%0d ovf0=%0d ovf1=%0d rcb_disc=%0d badcell=%0d slet=%0d dropsent=%0d vxior=%0d cs0=%0d dfull=%0d cfull=%0d cycb=%0d hle=%0d resend=%0d mreq=%0d socm=%0d resetreq=%0d clrerr=%0d all0=%0d all1=%0d out=%0d",
             m_lock, m_rxcc, m_badhec, m_ctl_link, m_cong, m_ovf0, m_ovf1, m_rcb_disc, m_badcell, m_slet, n_dropsent, m_vxior, m_cs0,
             m_dfull, m_cfull, m_cycb, m_hle, n_resend, m_mreq, m_socm, m_resetreq, m_clrerr, m_all0, m_all1, n_cells_out);
    chk(m_lock > 0, "mechanism: deskew lock");
    chk(m_rxcc > 0, "mechanism: cells received");
    chk(m_badhec > 0, "mechanism: HEC error drop");
    chk(m_ctl_link > 0, "mechanism: link control cell");
    chk(m_cong > 0, "mechanism: RCB congestion");
    chk(m_ovf0 > 0, "mechanism: RCB full drop (CLP 0)");
    chk(m_ovf1 > 0, "mechanism: RCB congestion drop (CLP 1)");
    chk(m_vxior > 0, "mechanism: VPI/VCI range drop");
    chk(m_cs0 > 0, "mechanism: CS 0 drop");
    chk(m_dfull > 0, "mechanism: CYCB data FIFO full");
    chk(m_cfull > 0, "mechanism: CYCB control FIFO full");
    chk(m_cycb > 0, "mechanism: recycled cell chosen");
    chk(m_hle > 0 && m_hle_low > 0, "mechanism: hardware link enable");
    chk(m_badcell > 0, "mechanism: control cell refused with CTRL_EN low");
    chk(m_slet > 0, "mechanism: software carrier loss timeout");
    chk(n_dropsent >= 12, "mechanism: cells dropped while SLE, RLE or the link is off");
    chk(n_resend > 0, "mechanism: resend after refused grant");
    chk(m_socm > m_mreq && m_mreq > 0, "mechanism: recycled cells kept and dropped");
    chk(m_resetreq > 0 && m_clrerr > 0, "mechanism: RESET_REQ and CLR_ERR");
    chk(m_all0 > 0, "mechanism: ALL0 detector");
    chk(n_tapcheck > 0, "cells out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
