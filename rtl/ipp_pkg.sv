// ipp_pkg: shared types, constants and functions of the Input Port Processor.
// A cell inside the chip is 16 words of 32 bits, one word per CLK, so one cell
// time is 16 CLK periods. Cells are held in the cell store; the queues (RCB,
// CYCB) and the translator (VXT) pass 35-bit descriptors that name a cell by its
// 6-bit cell-store pointer. The header layout is the ATM UNI header
// (GFC 31:28, VPI 27:20, VCI 19:4, PTI 3:1, CLP 0); the HEC sits in bits 31:24
// of the second word. The descriptor field order is this design's choice.
// Lint note: each header helper reads only its own field of the header, and
// IPP_CELLS/IPP_CELL_WORDS serve as parameter defaults in other files.
package ipp_pkg;

  localparam int IPP_CELL_WORDS = 16;
  localparam int IPP_CELLS      = 64;
  localparam int IPP_PTR_W      = 6;

  localparam logic [7:0]  CTRL_VPI = 8'd0;
  localparam logic [15:0] CTRL_VCI = 16'd32;

  // Cell descriptor queued by the RCB and CYCB and handled by the VXT.
  // ccd = {control cell flag, PTI}.
  typedef struct packed {
    logic              valid;
    logic [3:0]        ccd;
    logic [23:0]       vxi;   // {VPI, VCI}
    logic [IPP_PTR_W-1:0]  ptr;
  } desc_t;                   // 35 bits

  function automatic logic [7:0] hdr_vpi(input logic [31:0] h);
    return h[27:20];
  endfunction

  function automatic logic [15:0] hdr_vci(input logic [31:0] h);
    return h[19:4];
  endfunction

  function automatic logic is_ctrl_cell(input logic [31:0] h);
    return (h[27:20] == CTRL_VPI) && (h[19:4] == CTRL_VCI);
  endfunction

  // ATM HEC: CRC-8, generator x^8 + x^2 + x + 1, over the four header bytes,
  // MSB first, result XORed with 8'h55.
  function automatic logic [7:0] atm_hec(input logic [31:0] h);
    logic [7:0] crc;
    logic       fb;
    crc = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      fb  = crc[7] ^ h[i];
      crc = {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return crc ^ 8'h55;
  endfunction

endpackage
