// rfrm: link cell receiver ("reformatter" of the link side).
// Takes the deskewed link word stream, already moved into the CLK domain, and
// frames cells of CELL_WORDS words from each SOC. Every word is written straight
// into the cell slot the cell store has reserved (wr/widx/wdata); the cell is
// committed by a one-cycle req pulse one cycle after its last word, with the
// header and the control-cell flag, or silently dropped (the slot is then
// reused). Checks, made when the last word arrives:
//   - HEC: word 1 bits 31:24 must equal the ATM CRC-8 of the header (word 0);
//   - unassigned cells (VPI 0, VCI 0) are dropped without being counted;
//   - control cells (VPI 0, VCI 32) are dropped and counted as BADCELL when
//     ctrl_en is low;
//   - every cell is dropped while the hardware link enable (hle) or the
//     software link enable (sle) is low.
// Status outputs rxcc, badhec, badcell change only at cell boundaries (ph 15 to
// 0) and are high for one cell time per event. hle rises once link_up has held
// for hrent cell times; sletimeout is a one-cell-time pulse when hle rises after
// more than sclt cell times low (never when sclt is 0). The checks and status
// meanings follow the document's test-pin descriptions; the cell layout, the
// drop-while-disabled rule and the commit timing are this design's choices.
// badsigcell needs a cell-type table that is not part of this design and stays low.
module rfrm
  import ipp_pkg::*;
#(
  parameter int CELL_WORDS = ipp_pkg::IPP_CELL_WORDS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  ph,
  input  logic [31:0] word,
  input  logic        soc,
  input  logic        valid,
  input  logic        ctrl_en,
  input  logic        link_up,
  input  logic        sle,
  input  logic [31:0] hrent,
  input  logic [31:0] sclt,
  // to the cell store
  output logic        wr,
  output logic [$clog2(CELL_WORDS)-1:0] widx,
  output logic [31:0] wdata,
  output logic        req,
  output logic        control,
  output logic [31:0] hdr,
  // status, one cell time per event
  output logic        rxcc,
  output logic        badhec,
  output logic        badcell,
  output logic        badsigcell,
  output logic        hle,
  output logic        sletimeout
);
  localparam int IW = $clog2(CELL_WORDS);

  logic [IW-1:0] idx;
  logic          in_cell;
  logic          hec_ok;
  logic          last;
  logic          ev_rxcc, ev_badhec, ev_badcell;
  logic          p_rxcc, p_badhec, p_badcell;
  logic [31:0]   up_cnt, down_cnt;
  logic          hle_n;
  logic          unassigned, ctl;

  assign wr    = valid && (soc || (in_cell && idx != '0));
  assign widx  = soc ? '0 : idx;
  assign wdata = word;
  assign last  = wr && widx == IW'(CELL_WORDS - 1);

  assign unassigned = (hdr_vpi(hdr) == 8'd0) && (hdr_vci(hdr) == 16'd0);
  assign ctl        = is_ctrl_cell(hdr);
  assign ev_badhec  = last && !hec_ok;
  assign ev_rxcc    = last && hec_ok && !unassigned;
  assign ev_badcell = last && hec_ok && ctl && !ctrl_en;
  assign hle_n      = link_up && (up_cnt >= hrent);
  assign badsigcell = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cell <= 1'b0;
      idx     <= '0;
      req     <= 1'b0;
      control <= 1'b0;
      p_rxcc <= 1'b0; p_badhec <= 1'b0; p_badcell <= 1'b0;
      rxcc   <= 1'b0; badhec   <= 1'b0; badcell   <= 1'b0;
      hle <= 1'b0; sletimeout <= 1'b0;
      up_cnt <= '0; down_cnt <= '0;
      hec_ok <= 1'b0;
      hdr    <= '0;
    end else begin
      // framing
      if (wr) begin
        if (widx == '0) hdr <= word;
        if (widx == IW'(1)) hec_ok <= (word[31:24] == atm_hec(hdr));
        idx     <= widx + 1'b1;
        in_cell <= !last;
      end
      req     <= last && hec_ok && !unassigned && !(ctl && !ctrl_en) && hle && sle;
      control <= ctl;

      // per-cell-time status
      if (ph == 4'd15) begin
        rxcc    <= p_rxcc    | ev_rxcc;
        badhec  <= p_badhec  | ev_badhec;
        badcell <= p_badcell | ev_badcell;
        p_rxcc <= 1'b0; p_badhec <= 1'b0; p_badcell <= 1'b0;

        up_cnt     <= !link_up ? '0 : (up_cnt == '1 ? up_cnt : up_cnt + 1);
        down_cnt   <= hle_n ? '0 : (down_cnt == '1 ? down_cnt : down_cnt + 1);
        sletimeout <= hle_n && !hle && (sclt != 0) && (down_cnt > sclt);
        hle        <= hle_n;
      end else begin
        p_rxcc    <= p_rxcc    | ev_rxcc;
        p_badhec  <= p_badhec  | ev_badhec;
        p_badcell <= p_badcell | ev_badcell;
      end
    end
  end
endmodule
