// sync2: two-flop synchroniser for a level signal entering the clk domain.
// Output follows the input two clk edges later. Used for static option pins and
// status levels that cross between the link, OPP and core clocks.
module sync2 (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic m;
  always_ff @(posedge clk) begin
    m <= d;
    q <= m;
  end
endmodule
