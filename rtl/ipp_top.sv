// ipp_top: Input Port Processor of a gigabit ATM switch.
// The IPP sits between one ATM link (16- or 32-bit, with its own strobes) plus
// the recycling path from the Output Port Processor (OPP), and the switch core,
// which it feeds through four 8-bit bit-sliced Switch Element (SE) ports. All
// core logic runs on CLK; one cell is 16 words of 32 bits, one word per CLK, so a
// cell time is 16 CLK periods, marked by CELL_CLK.
//   link -> rfrm_dskw (link strobe domain) -> dual-clock FIFO -> rfrm
//        -> cstr (cell store, 64 cells) -> rcb (descriptor queue)
//   OPP  -> mreg_dskw (CLK_OPP -> CLK) -> mreg -> cstr, cycb (recycling queues)
//   cycb/rcb -> rcv -> vxt (VPI/VCI translation, holding area)
//        -> rfmt_sgen (slicing, control bits, parity, CC_TAP timing) -> SE
// A cell's payload stays in the cell store; the queues and the translator only
// move 35-bit descriptors that point at it. The SE's GRANT_SE tells whether the
// cell sent this cell time was accepted; only then is its slot freed, else it is
// sent again. Fields of the maintenance register (link enables, timers,
// thresholds, VP count), the translation-table write port and the control-cell
// commands for RESET_REQ and CLR_ERR are inputs: the register block that would
// decode them from control cells is not part of this design. RESET_REQ and
// CLR_ERR are open-drain pads; *_pd = 1 means "pull the pad low". TEST_IPP<49:0>
// carries internal signals in the document's pin order. BIST pins, QUIK_TEST and
// TYPE_LINK are accepted and unused, BIST_RES is driven 0.
// Lint notes: bist_clk, bist_test, quik_test and type_link are unused inputs (see
// above); the link FIFO's level and full, the cell store's free count and
// rf_ready, and the RCB's count are observation outputs left unconnected here
// (the link receiver writes into the store's reserved slot, which always exists
// while ptr_avail_t is high).
module ipp_top
  import ipp_pkg::*;
#(
  parameter int CC_DEC_PH = 9
) (
  // core clocking and control
  input  logic        clk,
  input  logic        cell_clk,
  input  logic        reset_n,
  input  logic        ctrl_en,
  input  logic [3:0]  c_clk_tap,
  output logic        reset_req_pd,
  input  logic        clr_err_n_in,
  output logic        clr_err_pd,
  // link
  input  logic        strb_l_link,
  input  logic        strb_h_link,
  input  logic [15:0] d_l_link,
  input  logic [15:0] d_h_link,
  input  logic        soc_l_link,
  input  logic        soc_h_link,
  input  logic        up_l_link,
  input  logic        up_h_link,
  input  logic        width_link,
  input  logic        d_skew_link,
  input  logic [3:0]  type_link,
  // recycling path from the OPP
  input  logic        clk_opp,
  input  logic [31:0] d_opp,
  input  logic        soc_opp,
  input  logic        pari_opp,
  // to the SE slices
  output logic [3:0][7:0] d_ipp,
  output logic [3:0][3:0] ctrl_ipp,
  output logic [3:0]  pari_ipp,
  input  logic        grant_se,
  // maintenance-register fields and commands
  input  logic        sle,
  input  logic        rle,
  input  logic [31:0] hrent,
  input  logic [31:0] sclt,
  input  logic [7:0]  rcbdisthr,
  input  logic [7:0]  vpcount,
  input  logic [15:0] rcbdishd,
  input  logic        tbl_we,
  input  logic [9:0]  tbl_addr,
  input  logic [31:0] tbl_wdata,
  input  logic        cmd_reset_req,
  input  logic        cmd_clr_err,
  // test
  input  logic        bist_clk,
  input  logic        bist_test,
  output logic [2:0]  bist_res,
  input  logic [1:0]  quik_test,
  output logic        all0,
  output logic        all1,
  output logic        all0but1,
  output logic [49:0] test_ipp
);
  logic [3:0] ph;
  logic       rst, clr_err;

  core_sync u_sync (.clk, .cell_clk, .reset_n, .clr_err_n(clr_err_n_in),
                    .ph, .rst, .clr_err);

  resetreq_clrerr u_rrq (.clk, .rst, .reset_n, .ph, .ctrl_en, .cmd_reset_req, .cmd_clr_err,
                         .reset_req_pd, .clr_err_pd);

  // ---------------- link side ----------------
  logic        rst_link;
  logic [31:0] lk_word;
  logic        lk_soc, lk_valid, lk_lock, soc_l_t, soc_h_t;
  logic [32:0] lf_rdata;
  logic        lf_empty;
  logic [3:0]  lf_level;
  logic        link_up;

  sync2 u_rst_link (.clk(strb_l_link), .d(rst), .q(rst_link));

  rfrm_dskw u_dskw (
    .strb_l(strb_l_link), .strb_h(strb_h_link), .rst(rst_link),
    .width32(width_link), .d_skew(d_skew_link),
    .d_l(d_l_link), .soc_l(soc_l_link), .d_h(d_h_link), .soc_h(soc_h_link),
    .word(lk_word), .soc(lk_soc), .valid(lk_valid), .lock(lk_lock),
    .soc_l_t, .soc_h_t);

  async_fifo #(.W(33), .DEPTH(8)) u_link_fifo (
    .wclk(strb_l_link), .wrst(rst_link), .wr(lk_valid), .wdata({lk_soc, lk_word}), .full(),
    .rclk(clk), .rrst(rst), .rd(!lf_empty), .rdata(lf_rdata), .empty(lf_empty), .level(lf_level));

  sync2 u_up_sync (.clk, .d(up_l_link && (up_h_link || !width_link) && lk_lock), .q(link_up));

  logic        rf_wr, rf_req, rf_control;
  logic [3:0]  rf_widx;
  logic [31:0] rf_wdata, rf_hdr;
  logic        rxcc, badhec, badcell, badsigcell, hle, sletimeout;

  rfrm u_rfrm (
    .clk, .rst, .ph, .word(lf_rdata[31:0]), .soc(lf_rdata[32]), .valid(!lf_empty),
    .ctrl_en, .link_up, .sle, .hrent, .sclt,
    .wr(rf_wr), .widx(rf_widx), .wdata(rf_wdata), .req(rf_req), .control(rf_control), .hdr(rf_hdr),
    .rxcc, .badhec, .badcell, .badsigcell, .hle, .sletimeout);

  // ---------------- recycling side ----------------
  logic [31:0] dk_data;
  logic        dk_soc, dk_valid, dk_perr, dk_lock;

  mreg_dskw u_mdskw (.clk, .rst, .clk_opp, .d_opp, .soc_opp, .pari_opp,
                     .data(dk_data), .soc(dk_soc), .valid(dk_valid), .par_err(dk_perr), .lock(dk_lock));

  logic        mr_wr, mr_req, soc_mreg, mr_push, mr_push_ctl;
  logic [3:0]  mr_widx;
  logic [31:0] mr_wdata;
  logic [IPP_PTR_W-1:0] mr_ptr;
  logic        mr_ptr_avail, data_full, control_full;
  desc_t       mr_desc;

  mreg u_mreg (.clk, .rst, .data(dk_data), .soc(dk_soc), .valid(dk_valid), .par_err(dk_perr),
               .rle, .ptr(mr_ptr), .ptr_avail(mr_ptr_avail), .data_full, .control_full,
               .wr(mr_wr), .widx(mr_widx), .wdata(mr_wdata), .req(mr_req), .soc_mreg,
               .push(mr_push), .push_ctl(mr_push_ctl), .dout(mr_desc));

  // ---------------- cell store ----------------
  logic        cellpres, clp, disc_req, rel_req, ptr_avail_t, rf_ready;
  logic [IPP_PTR_W-1:0] ptr_rcb, disc_ptr, rel_ptr, rd_ptr;
  logic [23:0] vxi;
  logic [3:0]  ccd, rd_idx;
  logic [31:0] cstr_data;
  logic [IPP_PTR_W:0] free_count;

  cstr u_cstr (
    .clk, .rst, .clr_err,
    .rf_wr, .rf_widx, .rf_wdata, .rf_req, .rf_control, .rf_hdr, .rf_ready,
    .mr_wr, .mr_widx, .mr_wdata, .mr_req, .mr_ptr, .mr_ptr_avail,
    .cellpres, .ptr_rcb, .vxi, .ccd, .clp,
    .disc_req, .disc_ptr, .rel_req, .rel_ptr,
    .rd_ptr, .rd_idx, .rd_data(cstr_data), .ptr_avail_t, .free_count);

  // ---------------- queues ----------------
  desc_t data_rcb, data_cycb, data_rcv;
  logic  cong, ovf0, ovf1, rcb_data_t, grant_rcb, grant_rcv, xfer, grant_cycb;
  logic [5:0] rcb_count;

  rcb u_rcb (.clk, .rst, .ph, .cellpres,
             .din('{valid: 1'b1, ccd: ccd, vxi: vxi, ptr: ptr_rcb}), .clp,
             .thr(rcbdisthr), .grant(grant_rcb), .data_rcb, .disc_req, .disc_ptr,
             .cong, .ovf0, .ovf1, .data_t(rcb_data_t), .count(rcb_count));

  cycb #(.DEC_PH(CC_DEC_PH)) u_cycb (
    .clk, .rst, .ph, .push(mr_push), .push_ctl(mr_push_ctl), .din(mr_desc),
    .data_full, .control_full, .grant_vxt(grant_cycb), .xfer, .grant_rcv, .grant_rcb,
    .dout(data_cycb));

  rcv u_rcv (.clk, .rst, .xfer, .sel_cycb(grant_rcv), .data_rcb, .data_cycb, .data_rcv);

  // ---------------- translation and output ----------------
  logic        hold_valid, hold_ctl, tx_start, grant_val, grant_int;
  logic [IPP_PTR_W-1:0] hold_ptr, ptr_t;
  logic [31:0] hold_hdr;
  logic        req_t, vxior, cs0_disc, vxt_data_t;

  vxt u_vxt (.clk, .rst, .ph, .data_rcv, .cong, .vpcount, .dishd(rcbdishd),
             .tbl_we, .tbl_addr, .tbl_wdata, .tx_start, .grant_val, .grant(grant_int),
             .grant_cycb, .hold_valid, .hold_ptr, .hold_hdr, .hold_ctl, .rel_req, .rel_ptr,
             .req_t, .ptr_t, .vxior, .cs0_disc, .data_t(vxt_data_t));

  rfmt_sgen u_rfmt (.clk, .rst, .ph, .tap(c_clk_tap), .hold_valid, .hold_ptr, .hold_hdr,
                    .hold_ctl, .cstr_data, .rd_ptr, .rd_idx, .tx_start,
                    .d_ipp, .ctrl_ipp, .pari_ipp, .grant_se, .grant_val, .grant_int,
                    .all0, .all1, .all0but1);

  // ---------------- test pins ----------------
  assign bist_res = 3'b000;

  always_comb begin
    test_ipp        = '0;
    test_ipp[0]     = soc_h_t;
    test_ipp[1]     = soc_l_t;
    test_ipp[2]     = lk_lock;
    test_ipp[3]     = rf_req;
    test_ipp[4]     = rf_control;
    test_ipp[5]     = rxcc;
    test_ipp[6]     = badsigcell;
    test_ipp[7]     = badcell;
    test_ipp[8]     = badhec;
    test_ipp[9]     = hle;
    test_ipp[10]    = sletimeout;
    test_ipp[11]    = cellpres;
    test_ipp[17:12] = ptr_rcb;
    test_ipp[18]    = ptr_avail_t;
    test_ipp[19]    = disc_req;
    test_ipp[20]    = ovf0;
    test_ipp[21]    = ovf1;
    test_ipp[22]    = cong;
    test_ipp[23]    = rcb_data_t;
    test_ipp[24]    = dk_soc;
    test_ipp[25]    = dk_lock;
    test_ipp[26]    = sle;
    test_ipp[27]    = soc_mreg;
    test_ipp[28]    = mr_req;
    test_ipp[29]    = rle;
    test_ipp[30]    = mr_req;
    test_ipp[31]    = data_full;
    test_ipp[32]    = control_full;
    test_ipp[33]    = grant_rcv;
    test_ipp[34]    = req_t;
    test_ipp[40:35] = ptr_t;
    test_ipp[41]    = grant_cycb;
    test_ipp[42]    = vxior;
    test_ipp[43]    = cs0_disc;
    test_ipp[44]    = vxt_data_t;
  end
endmodule
