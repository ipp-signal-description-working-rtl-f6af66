// cycb: recycling-path cell buffer and the arbiter in front of the VXT.
// Descriptors of recycled cells arrive from the MREG (push, with push_ctl
// choosing the queue): data cells go to a DATA_DEPTH-entry FIFO, control cells
// to a CTL_DEPTH-entry FIFO; data_full and control_full tell the MREG to
// discard. Once per cell time, at ph == DEC_PH, if the VXT's input holding area
// can take a cell (grant_vxt), one source is chosen: the control FIFO first,
// then the data FIFO, then the RCB. xfer pulses for that cycle; grant_rcv says
// the CYCB's own head (dout) is the one passed (it is popped), grant_rcb tells
// the RCB to send and pop its head. The FIFO sizes and the signal set follow
// the document; the priority order and the decision phase are this design's.
// Lint note: the FIFO occupancy counts are not needed here and stay unconnected.
module cycb
  import ipp_pkg::*;
#(
  parameter int DATA_DEPTH = 16,
  parameter int CTL_DEPTH  = 2,
  parameter int DEC_PH     = 9
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] ph,
  input  logic       push,
  input  logic       push_ctl,
  input  desc_t      din,
  output logic       data_full,
  output logic       control_full,
  input  logic       grant_vxt,
  output logic       xfer,
  output logic       grant_rcv,
  output logic       grant_rcb,
  output desc_t      dout
);
  desc_t d_head, c_head;
  logic  d_empty, c_empty, d_pop, c_pop;
  logic [$clog2(DATA_DEPTH+1)-1:0] d_cnt;
  logic [$clog2(CTL_DEPTH+1)-1:0]  c_cnt;

  sync_fifo #(.W($bits(desc_t)), .DEPTH(DATA_DEPTH)) u_data (
    .clk, .rst, .push(push && !push_ctl), .din, .pop(d_pop), .dout(d_head),
    .full(data_full), .empty(d_empty), .count(d_cnt));

  sync_fifo #(.W($bits(desc_t)), .DEPTH(CTL_DEPTH)) u_ctl (
    .clk, .rst, .push(push && push_ctl), .din, .pop(c_pop), .dout(c_head),
    .full(control_full), .empty(c_empty), .count(c_cnt));

  assign xfer      = grant_vxt && (ph == 4'(DEC_PH)) && !rst;
  assign c_pop     = xfer && !c_empty;
  assign d_pop     = xfer && c_empty && !d_empty;
  assign grant_rcv = xfer && !(c_empty && d_empty);
  assign grant_rcb = xfer && c_empty && d_empty;

  always_comb begin
    dout       = !c_empty ? c_head : d_head;
    dout.valid = !(c_empty && d_empty);
  end
endmodule
