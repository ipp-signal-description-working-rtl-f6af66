// rcv: receive selector in front of the VXT. On a transfer cycle (xfer) it
// registers either the CYCB descriptor (sel_cycb = GRANT_RCV_CYCB) or the RCB
// descriptor; in every other cycle its output valid bit is cleared, so the VXT
// sees each descriptor for exactly one cycle, one cycle after the transfer.
// The choice signal is the document's; registering the output is this design's.
module rcv
  import ipp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  xfer,
  input  logic  sel_cycb,
  input  desc_t data_rcb,
  input  desc_t data_cycb,
  output desc_t data_rcv
);
  always_ff @(posedge clk) begin
    if (rst || !xfer) begin
      data_rcv <= '0;
    end else begin
      data_rcv <= sel_cycb ? data_cycb : data_rcb;
    end
  end
endmodule
