// resetreq_clrerr: drivers of the two open-drain switch-wide signals.
// RESET_REQ: a control-cell command (cmd_reset_req, accepted only while CTRL_EN
// is high) sets a request flop that pulls the wired-or reset line low. The line
// is released as soon as the RESET pin (reset_n) goes low: the output is the
// flop gated by the pin, an asynchronous path as the document describes, and
// the flop itself is cleared by the chip's cell-synchronised reset (rst) that
// follows. So the external reset logic is sure to see the request. CLR_ERR: a command sets clr_err_pd for CLR_CELLS cell times
// (default 255, the longer of the two holding times the document gives), then
// releases it. The count starts one boundary late, so the line is held for at
// least CLR_CELLS full cell times. Commands come from the maintenance-register logic; their encoding
// in a control cell is not part of this design. All inputs are in the CLK
// domain except reset_n; the cell counter advances at ph == 15.
module resetreq_clrerr #(
  parameter int CLR_CELLS = 255
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       reset_n,
  input  logic [3:0] ph,
  input  logic       ctrl_en,
  input  logic       cmd_reset_req,
  input  logic       cmd_clr_err,
  output logic       reset_req_pd,
  output logic       clr_err_pd
);
  logic [$clog2(CLR_CELLS+2)-1:0] clr_cnt;
  logic req_q;

  assign reset_req_pd = req_q && reset_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_q        <= 1'b0;
      clr_err_pd   <= 1'b0;
      clr_cnt      <= '0;
    end else begin
      if (ctrl_en && cmd_reset_req) req_q <= 1'b1;
      if (ctrl_en && cmd_clr_err) begin
        clr_err_pd <= 1'b1;
        clr_cnt    <= $bits(clr_cnt)'(CLR_CELLS + 1);
      end else if (clr_err_pd && ph == 4'd15) begin
        if (clr_cnt == 1) clr_err_pd <= 1'b0;
        clr_cnt <= clr_cnt - 1'b1;
      end
    end
  end
endmodule
