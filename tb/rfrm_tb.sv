// rfrm_tb: link cell receiver. Cells of random kind are sent back to back, one
// word per CLK: good data cells, cells with a corrupted HEC, unassigned cells
// and control cells (with CTRL_EN on and off). The testbench computes the HEC
// itself (bitwise CRC-8 long division) and predicts for each cell whether it is
// committed (req, control flag, header) and which one-cell-time status output
// must be high; it also checks that every word is written to the right index.
// A second part checks the hardware link enable (hle after hrent cell times of
// link up) and the software carrier-loss timeout pulse.
module rfrm_tb;
  import ipp_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] ph = 0;
  logic [31:0] word = 0;
  logic soc = 0, valid = 0, ctrl_en = 1, link_up = 0, sle = 1;
  logic [31:0] hrent = 2, sclt = 0;
  logic wr, req, control;
  logic [3:0] widx;
  logic [31:0] wdata, hdr;
  logic rxcc, badhec, badcell, badsigcell, hle, sletimeout;
  int checks = 0, failures = 0;

  rfrm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  // expectations
  int exp_req = 0, got_req = 0, exp_rx = 0, got_rx = 0, exp_bh = 0, got_bh = 0, exp_bc = 0, got_bc = 0;
  logic [31:0] exp_hdr_q[$];
  logic        exp_ctl_q[$];
  int next_idx = 0;

  always @(posedge clk) if (!rst) begin
    if (wr) begin
      chk(widx == 4'(next_idx), "write index");
      next_idx = (next_idx + 1) % 16;
    end
    if (req) begin
      got_req++;
      if (exp_hdr_q.size() > 0) begin
        logic [31:0] h;
        logic c;
        h = exp_hdr_q.pop_front();
        c = exp_ctl_q.pop_front();
        chk(hdr == h && control == c, $sformatf("committed header %h exp %h", hdr, h));
      end else chk(0, "unexpected req");
    end
    if (ph == 4'd0) begin
      got_rx += rxcc; got_bh += badhec; got_bc += badcell;
    end
  end

  task automatic send_cell(input logic [31:0] h, input bit bad_hec);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      valid = 1; soc = (k == 0);
      word = (k == 0) ? h : (k == 1) ? {ref_hec(h) ^ (bad_hec ? 8'h10 : 8'h00), 24'h123456} : $urandom;
    end
    @(negedge clk); valid = 0; soc = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20) @(negedge clk);
    rst = 0; link_up = 1;
    repeat (16 * 5) @(negedge clk);
    chk(hle, "hle after hrent cell times");
    // align the cell stream so at most one cell ends per cell time
    while (ph != 4'd3) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      int kind;
      logic [31:0] h;
      bit bh;
      kind = $urandom_range(0, 5);
      h = $urandom;
      bh = 0;
      if (n % 50 == 49) ctrl_en = !ctrl_en;
      case (kind)
        0: bh = 1;
        1: h[27:4] = 24'd0;                       // unassigned
        2: h[27:4] = {8'd0, 16'd32};              // control cell
        default: if (h[27:4] == 0 || h[27:4] == 32) h[27] = 1;
      endcase
      if (!bh && h[27:4] != 0) exp_rx++;
      if (bh) exp_bh++;
      if (!bh && kind == 2 && !ctrl_en) exp_bc++;
      if (!bh && h[27:4] != 0 && !(kind == 2 && !ctrl_en)) begin
        exp_req++; exp_hdr_q.push_back(h); exp_ctl_q.push_back(kind == 2);
      end
      send_cell(h, bh);
    end
    repeat (40) @(negedge clk);
    chk(got_req == exp_req, $sformatf("commits %0d exp %0d", got_req, exp_req));
    chk(got_rx == exp_rx, $sformatf("rxcc %0d exp %0d", got_rx, exp_rx));
    chk(got_bh == exp_bh, $sformatf("badhec %0d exp %0d", got_bh, exp_bh));
    chk(got_bc == exp_bc, $sformatf("badcell %0d exp %0d", got_bc, exp_bc));
    chk(exp_bc > 0 && exp_bh > 0, "all kinds sent");

    // cells are dropped while the software link enable is off
    sle = 0; got_req = 0;
    send_cell(32'h0123_4560, 0);
    repeat (20) @(negedge clk);
    chk(got_req == 0, "dropped with SLE off");
    sle = 1;

    // carrier loss: short outage (no timeout), then long outage (timeout)
    sclt = 5;
    for (int t = 0; t < 2; t++) begin
      int pulses, down, hle_seen;
      pulses = 0; hle_seen = 0; down = (t == 0) ? 3 : 9;
      link_up = 0;
      repeat (16 * down) @(negedge clk);
      chk(!hle, "hle low while link down");
      link_up = 1;
      repeat (16 * 6) begin
        @(negedge clk);
        if (ph == 4'd1) begin pulses += sletimeout; hle_seen += hle; end
      end
      chk(hle_seen > 0, "hle back");
      chk(pulses == t, $sformatf("sletimeout pulses %0d exp %0d", pulses, t));
    end
    chk(badsigcell == 0, "badsigcell unused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
