// rfrm_dskw: link input stage and upper-half deskew.
// The link delivers two 16-bit halves, each with its own strobe and SOC. The
// upper half is captured on STRB_H_LINK, re-registered on STRB_L_LINK (the two
// strobes are taken to run at the same rate with unknown phase) and passed
// through a delay line of DSKW_DEPTH stages. In 32-bit mode (width32 = 1) with
// D_SKEW_LINK set, the chip "hunts": each lower SOC that is not matched by an
// upper SOC at the selected delay steps the delay by one, until the two SOCs
// coincide; without D_SKEW_LINK the delay stays 0. In 16-bit mode the lower
// half alone carries the cell, two strobes per 32-bit word, first half-word in
// bits 31:16. A cell is CELL_WORDS words. lock is high once SOC arrives at the
// expected word spacing (and, in 32-bit mode, both SOCs coincide); it drops on
// a misplaced or unmatched SOC. The document names the hunting and lock signals;
// the delay-line organisation and the exact lock rule are this design's.
// Outputs are registered on strb_l: valid marks a complete 32-bit word, soc its
// first word of a cell. soc_l_t/soc_h_t are the aligned SOCs (test pins).
module rfrm_dskw #(
  parameter int DSKW_DEPTH = 4,
  parameter int CELL_WORDS = 16
) (
  input  logic        strb_l,
  input  logic        strb_h,
  input  logic        rst,          // synchronous to strb_l
  input  logic        width32,
  input  logic        d_skew,
  input  logic [15:0] d_l,
  input  logic        soc_l,
  input  logic [15:0] d_h,
  input  logic        soc_h,
  output logic [31:0] word,
  output logic        soc,
  output logic        valid,
  output logic        lock,
  output logic        soc_l_t,
  output logic        soc_h_t
);
  localparam int SW = $clog2(DSKW_DEPTH);
  localparam int PW = $clog2(2*CELL_WORDS);

  logic [16:0] h_cap, h_rs;
  logic [16:0] h_line [DSKW_DEPTH];
  logic [16:0] l_q;
  logic [SW-1:0] sel;
  logic [16:0]   h_del;
  logic [PW-1:0] pos;               // strobe position within a cell
  logic [PW-1:0] last_pos;
  logic [15:0]   hi_half;
  logic          hi_soc;
  logic [PW-1:0] p_cur;

  always_ff @(posedge strb_h) h_cap <= {soc_h, d_h};

  assign h_del    = h_line[sel];
  assign last_pos = width32 ? PW'(CELL_WORDS - 1) : PW'(2*CELL_WORDS - 1);
  assign p_cur    = l_q[16] ? '0 : pos;
  assign soc_l_t  = l_q[16];
  assign soc_h_t  = h_del[16];

  always_ff @(posedge strb_l) begin
    h_rs      <= h_cap;
    h_line[0] <= h_rs;
    for (int i = 1; i < DSKW_DEPTH; i++) h_line[i] <= h_line[i-1];
    l_q <= {soc_l, d_l};

    if (rst) begin
      sel   <= '0;
      pos   <= '0;
      lock  <= 1'b0;
      valid <= 1'b0;
      soc   <= 1'b0;
    end else begin
      // cell position and lock: pos is the position the current strobe should
      // have; a SOC restarts the count at 0
      pos <= (p_cur == last_pos) ? '0 : p_cur + 1'b1;
      if (l_q[16]) begin
        lock <= (pos == '0) && (!width32 || h_del[16]);
        if (width32 && d_skew && !h_del[16])
          sel <= (sel == SW'(DSKW_DEPTH - 1)) ? '0 : sel + 1'b1;
      end else if (pos == '0 || (width32 && h_del[16])) begin
        lock <= 1'b0;
      end
      if (!d_skew || !width32) sel <= '0;

      // word assembly
      if (width32) begin
        word  <= {h_del[15:0], l_q[15:0]};
        soc   <= l_q[16];
        valid <= 1'b1;
      end else if (p_cur[0] == 1'b0) begin
        hi_half <= l_q[15:0];
        hi_soc  <= l_q[16];
        valid   <= 1'b0;
      end else begin
        word  <= {hi_half, l_q[15:0]};
        soc   <= hi_soc;
        valid <= 1'b1;
      end
    end
  end
endmodule
