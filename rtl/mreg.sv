// mreg: recycling-path cell handler of the maintenance-register block.
// Cells returned by the OPP arrive word by word from mreg_dskw. From each SOC
// the handler counts CELL_WORDS words and writes them into the cell-store slot
// reserved for this path (wr/widx/wdata, slot pointer ptr while ptr_avail).
// At the last word it decides, and one cycle later raises soc_mreg whatever the
// outcome; if the cell is kept it also raises req (commit to the cell store) and
// push, with the cell's descriptor on dout for the CYCB. A control cell
// (VPI 0, VCI 32) is kept if the control FIFO has room; a data cell if the
// recycling link enable rle is set and the data FIFO has room. A cell is always
// discarded if no slot was reserved or any of its words had a parity error,
// and an unassigned cell (VPI 0, VCI 0) is taken as an idle slot and dropped.
// The maintenance register itself (its fields, counters and the control-cell
// commands that load them) is outside this module; its fields arrive as inputs.
// Timing of soc_mreg/req and the rle rule follow the document's test-pin
// descriptions; the parity and idle-cell discard rules are this design's.
module mreg
  import ipp_pkg::*;
#(
  parameter int CELL_WORDS = ipp_pkg::IPP_CELL_WORDS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] data,
  input  logic        soc,
  input  logic        valid,
  input  logic        par_err,
  input  logic        rle,
  input  logic [IPP_PTR_W-1:0] ptr,
  input  logic        ptr_avail,
  input  logic        data_full,
  input  logic        control_full,
  output logic        wr,
  output logic [$clog2(CELL_WORDS)-1:0] widx,
  output logic [31:0] wdata,
  output logic        req,
  output logic        soc_mreg,
  output logic        push,
  output logic        push_ctl,
  output desc_t       dout
);
  localparam int IW = $clog2(CELL_WORDS);

  logic [IW-1:0] idx;
  logic          in_cell, bad, last, ctl, keep, idle;
  logic [31:0]   hdr, hdr_n;

  assign wr    = valid && (soc || (in_cell && idx != '0));
  assign widx  = soc ? '0 : idx;
  assign wdata = data;
  assign last  = wr && widx == IW'(CELL_WORDS - 1);
  assign hdr_n = (CELL_WORDS == 1) ? data : hdr;
  assign ctl   = is_ctrl_cell(hdr_n);
  assign idle  = (hdr_n[27:4] == 24'd0);
  assign keep  = ptr_avail && !(bad || par_err) && !idle &&
                 (ctl ? !control_full : (rle && !data_full));

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cell  <= 1'b0;
      idx      <= '0;
      bad      <= 1'b0;
      hdr      <= '0;
      req      <= 1'b0;
      soc_mreg <= 1'b0;
      push     <= 1'b0;
      push_ctl <= 1'b0;
      dout     <= '0;
    end else begin
      if (wr) begin
        if (widx == '0) begin
          hdr <= data;
          bad <= par_err;
        end else begin
          bad <= bad || par_err;
        end
        idx     <= widx + 1'b1;
        in_cell <= !last;
      end
      soc_mreg <= last;
      req      <= last && keep;
      push     <= last && keep;
      push_ctl <= ctl;
      dout     <= '{valid: 1'b1, ccd: {ctl, hdr_n[3:1]}, vxi: hdr_n[27:4], ptr: ptr};
    end
  end
endmodule
