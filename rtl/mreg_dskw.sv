// mreg_dskw: input stage of the recycling path from the OPP.
// D_OPP, SOC_OPP and PARI_OPP arrive with their own clock CLK_OPP, which runs at
// the CLK rate with no fixed phase to it. They are captured on the falling edge
// of CLK_OPP, then written into a dual-clock FIFO on the following rising edge
// of CLK_OPP. On the CLK side reading starts once the FIFO is a quarter full and then
// continues every cycle, so the FIFO acts as an elastic buffer absorbing the
// phase difference and jitter. Each word read is registered onto data/soc with
// valid, and par_err is set when the word and its parity bit together hold an
// even number of ones (PARI_OPP is odd parity). lock is high once SOC arrives
// every CELL_WORDS words and drops on a missing or misplaced SOC. The falling-edge
// capture and the parity rule are the document's; the FIFO, its depth and the
// lock rule are this design's. rst is in the CLK domain; it is passed to the
// CLK_OPP side through a two-flop synchroniser.
// Lint note: the FIFO's full output is not used: reading starts at a quarter
// full and then keeps pace, so the FIFO never fills with the clocks in range.
module mreg_dskw #(
  parameter int FIFO_DEPTH = 16,
  parameter int CELL_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clk_opp,
  input  logic [31:0] d_opp,
  input  logic        soc_opp,
  input  logic        pari_opp,
  output logic [31:0] data,
  output logic        soc,
  output logic        valid,
  output logic        par_err,
  output logic        lock
);
  localparam int PW = $clog2(CELL_WORDS);

  logic [33:0] cap;
  logic        wrst;
  logic [33:0] rdata;
  logic        empty, running, rd;
  logic [$clog2(FIFO_DEPTH):0] level;
  logic [PW-1:0] pos;

  always_ff @(negedge clk_opp) cap <= {soc_opp, pari_opp, d_opp};

  sync2 u_rst_sync (.clk(clk_opp), .d(rst), .q(wrst));

  async_fifo #(.W(34), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk_opp), .wrst(wrst), .wr(1'b1), .wdata(cap), .full(),
    .rclk(clk), .rrst(rst), .rd(rd), .rdata(rdata), .empty(empty), .level(level));

  assign rd = running && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      valid   <= 1'b0;
      soc     <= 1'b0;
      par_err <= 1'b0;
      data    <= '0;
      lock    <= 1'b0;
      pos     <= '0;
    end else begin
      if (32'(level) >= FIFO_DEPTH / 4) running <= 1'b1;
      valid   <= rd;
      soc     <= rd && rdata[33];
      data    <= rdata[31:0];
      par_err <= rd && !(^rdata[32:0]);
      if (rd) begin
        if (rdata[33]) begin
          lock <= (pos == '0);
          pos  <= PW'(1);
        end else begin
          if (pos == '0) lock <= 1'b0;
          pos <= pos + 1'b1;
        end
      end
    end
  end
endmodule
