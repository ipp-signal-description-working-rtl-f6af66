// cstr: cell store.
// Holds up to CELLS cells of CELL_WORDS 32-bit words in one RAM addressed by
// {pointer, word index}, and manages the free pointers as a bitmap. Two writers
// fill cells: the link receiver (rf_*) and the recycling-path handler (mr_*).
// Each always has a reserved slot: its pointer is taken from the free list
// before a cell arrives (lowest free pointer for the link side, highest for the
// recycling side), the cell's words are written into that slot, and a req pulse
// commits it; a new slot is then reserved. A cell that is never committed leaves
// its slot reserved for the next one. When a link cell is committed the store
// presents its descriptor to the RCB for one cycle (cellpres, ptr_rcb, vxi, ccd,
// clp). Pointers return to the free list when the RCB discards a descriptor
// (disc_req) or the VXT releases a sent or dropped cell (rel_req). The read port
// (rd_ptr, rd_idx) returns data one cycle later. ptr_avail_t drops if the free
// list is ever found empty while a slot is needed and stays low until reset or
// clear-error. The document gives the capacity, the 6-bit pointers and the
// signal set; the bitmap and the slot-reservation scheme are this design's.
// Lint note: only VPI, VCI and PTI/CLP of rf_hdr are used; GFC (31:28) is not
// carried in the descriptor.
module cstr
  import ipp_pkg::*;
#(
  parameter int CELLS      = ipp_pkg::IPP_CELLS,
  parameter int CELL_WORDS = ipp_pkg::IPP_CELL_WORDS,
  localparam int PW = $clog2(CELLS),
  localparam int IW = $clog2(CELL_WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr_err,
  // link side
  input  logic          rf_wr,
  input  logic [IW-1:0] rf_widx,
  input  logic [31:0]   rf_wdata,
  input  logic          rf_req,
  input  logic          rf_control,
  input  logic [31:0]   rf_hdr,
  output logic          rf_ready,     // a slot is reserved for the link side
  // recycling side
  input  logic          mr_wr,
  input  logic [IW-1:0] mr_widx,
  input  logic [31:0]   mr_wdata,
  input  logic          mr_req,
  output logic [PW-1:0] mr_ptr,
  output logic          mr_ptr_avail,
  // to the RCB
  output logic          cellpres,
  output logic [PW-1:0] ptr_rcb,
  output logic [23:0]   vxi,
  output logic [3:0]    ccd,
  output logic          clp,
  // frees
  input  logic          disc_req,
  input  logic [PW-1:0] disc_ptr,
  input  logic          rel_req,
  input  logic [PW-1:0] rel_ptr,
  // read port
  input  logic [PW-1:0] rd_ptr,
  input  logic [IW-1:0] rd_idx,
  output logic [31:0]   rd_data,
  // status
  output logic          ptr_avail_t,
  output logic [PW:0]   free_count
);
  logic [31:0]    ram [CELLS*CELL_WORDS];
  logic [CELLS-1:0] free_map, free_nxt;
  logic [PW-1:0]  rf_ptr;
  logic           rf_have, mr_have;
  logic [PW-1:0]  lo_idx, hi_idx;
  logic           any_free;

  // lowest and highest free pointers of the map after this cycle's frees
  always_comb begin
    free_nxt = free_map;
    if (disc_req) free_nxt[disc_ptr] = 1'b1;
    if (rel_req)  free_nxt[rel_ptr]  = 1'b1;
    lo_idx = '0;
    hi_idx = '0;
    any_free = |free_map;
    for (int i = CELLS - 1; i >= 0; i--) if (free_map[i]) lo_idx = PW'(i);
    for (int i = 0; i < CELLS; i++)      if (free_map[i]) hi_idx = PW'(i);
    free_count = '0;
    for (int i = 0; i < CELLS; i++) free_count = free_count + (PW+1)'(free_map[i]);
  end

  assign rf_ready     = rf_have;
  logic [PW-1:0] mr_ptr_q;
  assign mr_ptr       = mr_ptr_q;
  assign mr_ptr_avail = mr_have;

  always_ff @(posedge clk) begin
    if (rf_wr && rf_have) ram[{rf_ptr, rf_widx}] <= rf_wdata;
    if (mr_wr && mr_have) ram[{mr_ptr_q, mr_widx}] <= mr_wdata;
    rd_data <= ram[{rd_ptr, rd_idx}];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      free_map    <= '1;
      rf_have     <= 1'b0;
      mr_have     <= 1'b0;
      rf_ptr      <= '0;
      mr_ptr_q    <= '0;
      cellpres    <= 1'b0;
      ptr_avail_t <= 1'b1;
      ptr_rcb <= '0; vxi <= '0; ccd <= '0; clp <= 1'b0;
    end else begin
      logic [CELLS-1:0] m;
      logic need_rf, need_mr;
      m = free_nxt;
      cellpres <= 1'b0;
      need_rf = !rf_have || rf_req;
      need_mr = !mr_have || mr_req;

      if (rf_req && rf_have) begin
        cellpres <= 1'b1;
        ptr_rcb  <= rf_ptr;
        vxi      <= rf_hdr[27:4];
        ccd      <= {rf_control, rf_hdr[3:1]};
        clp      <= rf_hdr[0];
      end

      // reserve new slots from pointers that were free at the start of the cycle
      rf_have <= rf_have && !rf_req;
      mr_have <= mr_have && !mr_req;
      if (need_rf && any_free) begin
        rf_ptr  <= lo_idx;
        rf_have <= 1'b1;
        m[lo_idx] = 1'b0;
      end
      if (need_mr && any_free && !(need_rf && hi_idx == lo_idx)) begin
        mr_ptr_q <= hi_idx;
        mr_have  <= 1'b1;
        m[hi_idx] = 1'b0;
      end
      if ((need_rf || need_mr) && !any_free) ptr_avail_t <= 1'b0;
      else if (clr_err) ptr_avail_t <= 1'b1;
      free_map <= m;
    end
  end
endmodule
