// vxt: VPI/VCI translator with its input holding area.
// The translation table has TBL_SIZE 32-bit entries {CS[1:0], VPT, route[4:0],
// VXI_out[23:0]}. The first vpcount entries are VP entries, indexed by the
// cell's VPI; the rest are VC entries, indexed by vpcount + VCI. The table is
// written through tbl_we/tbl_addr/tbl_wdata and read one cycle after the address.
// A descriptor from the RCV (valid for one cycle) is accepted only when the
// holding area is empty (grant_cycb high). A data cell is then looked up:
//   - VPI >= vpcount: dropped, vxior;
//   - VP entry with VPT set: the VC entry is read, but VCI >= TBL_SIZE - vpcount
//     drops the cell (vxior); otherwise the VC entry gives the new VPI/VCI;
//   - VP entry without VPT: only the VPI is replaced;
//   - the entry's CS is 0 and the RCB was congested within the last dishd cell
//     times: dropped, cs0_disc.
// Control cells skip translation and the drop rules. A dropped cell's pointer
// is released to the cell store (rel_req/rel_ptr, one cycle). A kept cell waits
// in the holding area (hold_valid, hold_ptr, hold_ctl, and hold_hdr = DATA_VXTC =
// {route, PTI, VXI_out}) until the reformatter starts sending it (tx_start) and
// the SE grants it at the next grant sample (grant_val with grant); it is then
// released and the area empties. Without a grant it is sent again next cell
// time. Status outputs req_t/ptr_t, vxior, cs0_disc, data_t change at cell
// boundaries. The range and CS rules are the document's; the entry layout, the
// VC indexing and the grant handling are this design's.
// Lint note: the descriptor's valid bit is used when the descriptor arrives and
// not again while it is held.
module vxt
  import ipp_pkg::*;
#(
  parameter int TBL_SIZE = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  ph,
  input  desc_t       data_rcv,
  input  logic        cong,
  input  logic [7:0]  vpcount,
  input  logic [15:0] dishd,
  input  logic        tbl_we,
  input  logic [$clog2(TBL_SIZE)-1:0] tbl_addr,
  input  logic [31:0] tbl_wdata,
  input  logic        tx_start,
  input  logic        grant_val,
  input  logic        grant,
  output logic        grant_cycb,
  output logic        hold_valid,
  output logic [IPP_PTR_W-1:0] hold_ptr,
  output logic [31:0] hold_hdr,
  output logic        hold_ctl,
  output logic        rel_req,
  output logic [IPP_PTR_W-1:0] rel_ptr,
  output logic        req_t,
  output logic [IPP_PTR_W-1:0] ptr_t,
  output logic        vxior,
  output logic        cs0_disc,
  output logic        data_t
);
  localparam int TW = $clog2(TBL_SIZE);
  typedef enum logic [1:0] {EMPTY, LOOK_VP, LOOK_VC, FULL} st_t;

  st_t         st;
  desc_t       cur;
  logic [31:0] tbl [TBL_SIZE];
  logic [31:0] ent;
  logic [TW-1:0] rd_addr;
  logic        in_flight;
  logic [15:0] hold_cnt;
  logic        recent_cong;
  logic        ev_req, ev_ior, ev_cs0;
  logic        p_req, p_ior, p_cs0;
  logic [7:0]  vpi;
  logic [15:0] vci;

  assign vpi         = cur.vxi[23:16];
  assign vci         = cur.vxi[15:0];
  assign recent_cong = cong || hold_cnt != 0;
  assign grant_cycb  = (st == EMPTY) && !rst;
  assign hold_valid  = (st == FULL);
  assign hold_ptr    = cur.ptr;
  assign hold_ctl    = cur.ccd[3];

  always_ff @(posedge clk) begin
    if (tbl_we) tbl[tbl_addr] <= tbl_wdata;
    ent <= tbl[rd_addr];
  end

  // table read address for the next cycle
  always_comb begin
    rd_addr = '0;
    if (st == EMPTY) rd_addr = TW'(data_rcv.vxi[23:16]);
    else if (st == LOOK_VP) rd_addr = TW'(vpcount) + TW'(vci);
  end

  always_comb begin
    ev_req = (st == EMPTY) && data_rcv.valid;
    ev_ior = 1'b0;
    ev_cs0 = 1'b0;
    if (st == LOOK_VP) begin
      if (vpi >= vpcount) ev_ior = 1'b1;
      else if (ent[29] && 32'(vci) >= TBL_SIZE - 32'(vpcount)) ev_ior = 1'b1;
      else if (!ent[29] && ent[31:30] == 2'd0 && recent_cong) ev_cs0 = 1'b1;
    end
    if (st == LOOK_VC && ent[31:30] == 2'd0 && recent_cong) ev_cs0 = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= EMPTY;
      cur <= '0;
      hold_hdr <= '0;
      in_flight <= 1'b0;
      rel_req <= 1'b0;
      rel_ptr <= '0;
      hold_cnt <= '0;
      p_req <= 1'b0; p_ior <= 1'b0; p_cs0 <= 1'b0;
      req_t <= 1'b0; ptr_t <= '0; vxior <= 1'b0; cs0_disc <= 1'b0; data_t <= 1'b0;
    end else begin
      rel_req <= 1'b0;
      case (st)
        EMPTY: if (data_rcv.valid) begin
          cur   <= data_rcv;
          ptr_t <= data_rcv.ptr;
          if (data_rcv.ccd[3]) begin
            hold_hdr <= {5'd0, data_rcv.ccd[2:0], data_rcv.vxi};
            st       <= FULL;
          end else begin
            st <= LOOK_VP;
          end
        end
        LOOK_VP: begin
          if (ev_ior || ev_cs0) begin
            rel_req <= 1'b1;
            rel_ptr <= cur.ptr;
            st      <= EMPTY;
          end else if (ent[29]) begin
            st <= LOOK_VC;
          end else begin
            hold_hdr <= {ent[28:24], cur.ccd[2:0], ent[23:16], vci};
            st       <= FULL;
          end
        end
        LOOK_VC: begin
          if (ev_cs0) begin
            rel_req <= 1'b1;
            rel_ptr <= cur.ptr;
            st      <= EMPTY;
          end else begin
            hold_hdr <= {ent[28:24], cur.ccd[2:0], ent[23:0]};
            st       <= FULL;
          end
        end
        FULL: begin
          if (tx_start) in_flight <= 1'b1;
          if (grant_val && in_flight) begin
            in_flight <= 1'b0;
            if (grant) begin
              rel_req <= 1'b1;
              rel_ptr <= cur.ptr;
              st      <= EMPTY;
            end
          end
        end
        default: st <= EMPTY;
      endcase

      // cell-time status
      if (ph == 4'd15) begin
        req_t    <= p_req | ev_req;
        vxior    <= p_ior | ev_ior;
        cs0_disc <= p_cs0 | ev_cs0;
        data_t   <= (st != EMPTY);
        p_req <= 1'b0; p_ior <= 1'b0; p_cs0 <= 1'b0;
        if (cong) hold_cnt <= dishd;
        else if (hold_cnt != 0) hold_cnt <= hold_cnt - 1'b1;
      end else begin
        p_req <= p_req | ev_req;
        p_ior <= p_ior | ev_ior;
        p_cs0 <= p_cs0 | ev_cs0;
      end
    end
  end
endmodule
