// rcb: queue of link-cell descriptors on their way to the VXT.
// A descriptor arrives from the cell store with cellpres (one cycle) together
// with the cell's CLP bit. It is queued unless
//   - CLP is 1 and the queue holds more than thr cells (congestion): dropped,
//     ovf1 is raised for the next cell time;
//   - the queue is full (DEPTH): dropped, ovf0 for a CLP=0 cell.
// A dropped cell's pointer goes back to the cell store with disc_req/disc_ptr
// (one cycle). data_rcb shows the head descriptor, valid bit set when the queue
// is not empty; grant (one cycle) pops it. cong is high for every cell time in
// which the queue held more than thr cells at the previous boundary; ovf0, ovf1
// and data_t (non-idle head) also change only at cell boundaries (ph 15 -> 0).
// The discard rules and flags follow the document's test-pin descriptions; the
// 32-entry depth is inferred from its cell budget, the rest is this design's.
module rcb
  import ipp_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  ph,
  input  logic        cellpres,
  input  desc_t       din,
  input  logic        clp,
  input  logic [7:0]  thr,
  input  logic        grant,
  output desc_t       data_rcb,
  output logic        disc_req,
  output logic [IPP_PTR_W-1:0] disc_ptr,
  output logic        cong,
  output logic        ovf0,
  output logic        ovf1,
  output logic        data_t,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);

  desc_t         q [DEPTH];
  logic [AW-1:0] rp, wp;
  logic          is_cong, drop, drop1, drop0, push, pop;
  logic          p_ovf0, p_ovf1;

  assign is_cong = 32'(count) > 32'(thr);
  assign drop1   = cellpres && clp && (is_cong || 32'(count) == DEPTH);
  assign drop0   = cellpres && !clp && (32'(count) == DEPTH);
  assign drop    = drop0 || drop1;
  assign push    = cellpres && !drop;
  assign pop     = grant && count != 0;

  always_comb begin
    data_rcb       = q[rp];
    data_rcb.valid = (count != 0);
  end

  always_ff @(posedge clk) begin
    if (push) q[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rp <= '0; wp <= '0; count <= '0;
      disc_req <= 1'b0; disc_ptr <= '0;
      cong <= 1'b0; ovf0 <= 1'b0; ovf1 <= 1'b0; data_t <= 1'b0;
      p_ovf0 <= 1'b0; p_ovf1 <= 1'b0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
      disc_req <= drop;
      disc_ptr <= din.ptr;
      if (ph == 4'd15) begin
        cong   <= is_cong;
        ovf0   <= p_ovf0 | drop0;
        ovf1   <= p_ovf1 | drop1;
        data_t <= (count != 0);
        p_ovf0 <= 1'b0;
        p_ovf1 <= 1'b0;
      end else begin
        p_ovf0 <= p_ovf0 | drop0;
        p_ovf1 <= p_ovf1 | drop1;
      end
    end
  end
endmodule
