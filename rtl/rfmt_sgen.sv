// rfmt_sgen: output reformatter and signal generator towards the four SE slices.
// Each cell time it sends one 16-word cell (or an idle cell of zeros). The
// position of the cell in time is set by tap (C_CLK_TAP): with tap 0 the first
// word appears at the outputs on the CLK edge after the one that samples
// CELL_CLK high (the edge ending ph 0); each tap step delays it one CLK. Word k
// of a cell is loaded into the output registers at the edge ending
// ph == (tap + k) mod 16. The cell-store read of word k is issued one cycle
// earlier, since the store's read is registered; at the cycle that would read
// word 0 (tx_start) the cell waiting in the VXT holding area is latched. Word 0
// is the VXT's translated header (hold_hdr), words 1..15 come from the cell
// store. The 32-bit word is cut into four 8-bit slices (slice i = bits
// 8i+7..8i); every slice receives the same 4 control bits {last word, control
// cell, first word, busy} and an odd parity bit over its 8 data + 4 control
// bits. GRANT_SE is sampled at the edge ending ph == GRANT_PH (the eighth CLK
// period of the cell time); grant_val is high for the following cycle with the
// sampled value on grant_int. all0/all1/all0but1 watch the 32-bit cell-store
// read bus (combinational). The slicing, replication, parity, tap timing, grant
// sampling and test outputs are the document's; the control-bit meanings and
// the idle-cell content are this design's.
module rfmt_sgen
  import ipp_pkg::*;
#(
  parameter int CELL_WORDS = ipp_pkg::IPP_CELL_WORDS,
  parameter int GRANT_PH   = 7
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  ph,
  input  logic [3:0]  tap,
  input  logic        hold_valid,
  input  logic [IPP_PTR_W-1:0] hold_ptr,
  input  logic [31:0] hold_hdr,
  input  logic        hold_ctl,
  input  logic [31:0] cstr_data,
  output logic [IPP_PTR_W-1:0] rd_ptr,
  output logic [3:0]  rd_idx,
  output logic        tx_start,
  output logic [3:0][7:0] d_ipp,
  output logic [3:0][3:0] ctrl_ipp,
  output logic [3:0]  pari_ipp,
  input  logic        grant_se,
  output logic        grant_val,
  output logic        grant_int,
  output logic        all0,
  output logic        all1,
  output logic        all0but1
);
  logic [3:0]  ri, oi;
  logic        tx_busy, tx_ctl;
  logic [IPP_PTR_W-1:0] tx_ptr;
  logic [31:0] tx_hdr;
  logic [31:0] word;
  logic [3:0]  ctrl;

  assign ri       = ph + 4'd1 - tap;   // word whose read is issued this cycle
  assign oi       = ph - tap;          // word loaded into the outputs this cycle
  assign tx_start = (ri == 4'd0) && !rst;
  assign rd_ptr   = tx_ptr;
  assign rd_idx   = ri;

  assign all0     = (cstr_data == 32'h0000_0000);
  assign all1     = (cstr_data == 32'hFFFF_FFFF);
  assign all0but1 = (cstr_data == 32'h0000_0001);

  always_comb begin
    word = (oi == 4'd0) ? tx_hdr : cstr_data;
    ctrl = {oi == 4'(CELL_WORDS - 1), tx_ctl, oi == 4'd0, 1'b1};
    if (!tx_busy) begin
      word = '0;
      ctrl = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_busy <= 1'b0;
      tx_ctl  <= 1'b0;
      tx_ptr  <= '0;
      tx_hdr  <= '0;
      d_ipp    <= '0;
      ctrl_ipp <= '0;
      pari_ipp <= '1;
      grant_val <= 1'b0;
      grant_int <= 1'b0;
    end else begin
      if (tx_start) begin
        tx_busy <= hold_valid;
        tx_ctl  <= hold_ctl;
        tx_ptr  <= hold_ptr;
        tx_hdr  <= hold_hdr;
      end
      for (int i = 0; i < 4; i++) begin
        d_ipp[i]    <= word[8*i +: 8];
        ctrl_ipp[i] <= ctrl;
        pari_ipp[i] <= ~^{word[8*i +: 8], ctrl};
      end
      grant_val <= (ph == 4'(GRANT_PH));
      if (ph == 4'(GRANT_PH)) grant_int <= grant_se;
    end
  end
endmodule
