// async_fifo: dual-clock FIFO with Gray-coded pointers, used wherever the IPP
// moves a word stream from one clock to another (link strobe to CLK, CLK_OPP to
// CLK). Writes happen on wclk when wr is high and the FIFO is not full; reads on
// rclk when rd is high and it is not empty. rdata shows the oldest word
// (first-word fall-through from the array). level is the read-side fill count,
// lagging writes by the two-flop pointer synchroniser. Both resets are
// synchronous to their own clock.
module async_fifo #(
  parameter int W     = 33,
  parameter int DEPTH = 8            // power of two
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign wgray = b2g(wbin);
  assign rgray = b2g(rbin);
  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
  assign level = g2b(wgray_r2) - rbin;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr && !full) begin
        mem[wbin[AW-1:0]] <= wdata;
        wbin <= wbin + 1'b1;
      end
    end
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd && !empty) rbin <= rbin + 1'b1;
    end
  end
endmodule
