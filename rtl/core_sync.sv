// core_sync: cell-time synchronisation of the IPP core.
// CELL_CLK is high for one CLK period in every 16. The edge that samples it high
// starts a cell time: ph is 0 in the CLK period after that edge and counts to 15.
// RESET (active low) and the CLR_ERR pad level are sampled once per cell time,
// at the CLK edge two edges before the one that sees CELL_CLK high (ph == 13),
// and take effect at the next cell boundary, so every block sees reset and
// clear-error for whole cell times, aligned to ph 0. The sampling point follows
// the document's RESET and CLR_ERR timing; holding the result for whole cell
// times is this design's choice. Until the first CELL_CLK arrives, ph free-runs.
module core_sync (
  input  logic       clk,
  input  logic       cell_clk,
  input  logic       reset_n,
  input  logic       clr_err_n,
  output logic [3:0] ph,
  output logic       rst,
  output logic       clr_err
);
  logic rst_s, clr_s;

  always_ff @(posedge clk) begin
    if (cell_clk) ph <= 4'd0;
    else          ph <= ph + 4'd1;

    if (ph == 4'd13) begin
      rst_s <= ~reset_n;
      clr_s <= ~clr_err_n;
    end
    if (cell_clk) begin
      rst     <= rst_s;
      clr_err <= clr_s;
    end
  end
endmodule
