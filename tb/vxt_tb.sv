// vxt_tb: translator. The table is loaded with random VP entries (half of them
// pointing on to VC entries) and random VC entries. Descriptors are offered once
// per cell time whenever the holding area is empty, the way the CYCB/RCV do.
// A reference model, written from the lookup rules, predicts for each cell the
// translated header or the drop reason (VPI range, VCI range, CS 0 under recent
// congestion); the testbench drives tx_start and a random SE grant and checks
// that kept cells wait and are resent until granted, and that every pointer is
// released exactly once, in order.
module vxt_tb;
  import ipp_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] ph = 0;
  desc_t data_rcv = '0;
  logic cong = 0;
  logic [7:0] vpcount = 8;
  logic [15:0] dishd = 20;
  logic tbl_we = 0;
  logic [9:0] tbl_addr = 0;
  logic [31:0] tbl_wdata = 0;
  logic tx_start = 0, grant_val = 0, grant = 0;
  logic grant_cycb, hold_valid, hold_ctl, rel_req, req_t, vxior, cs0_disc, data_t;
  logic [IPP_PTR_W-1:0] hold_ptr, rel_ptr, ptr_t;
  logic [31:0] hold_hdr;
  int checks = 0, failures = 0;

  vxt dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  logic [31:0] tbl [1024];
  logic [IPP_PTR_W-1:0] relq[$];
  int since_cong = 100;
  int n_ior = 0, n_cs0 = 0, n_kept = 0, n_resend = 0, s_ior = 0, s_cs0 = 0, n_req = 0;

  always @(posedge clk) if (!rst) begin
    if (rel_req) begin
      if (relq.size() == 0) chk(0, "unexpected release");
      else chk(rel_ptr == relq.pop_front(), "release order");
    end
    if (ph == 4'd15) begin
      since_cong = cong ? 0 : since_cong + 1;
      #1;
      s_ior += vxior; s_cs0 += cs0_disc; n_req += req_t;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit recent;
    repeat (4) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      tbl_we = 1; tbl_addr = 10'(a);
      tbl_wdata = $urandom;
      tbl_wdata[29] = (a < 8) ? (a >= 4) : 1'b0;
      tbl[a] = tbl_wdata;
    end
    @(negedge clk); tbl_we = 0;
    for (int ncell = 0; ncell < 600; ncell++) begin
      desc_t d;
      bit drop, is_ior, kept;
      logic [31:0] eh, e;
      // congestion schedule
      cong = (ncell % 100) >= 40 && (ncell % 100) < 50;
      while (ph != 4'd9) @(negedge clk);
      @(negedge clk);   // ph 10: the RCV presents a descriptor
      recent = cong || since_cong < 32'(dishd);
      if (!grant_cycb) begin
        chk(hold_valid, "area busy only while holding");
        continue;
      end
      d = $urandom; d.valid = 1;
      d.ccd[3] = ($urandom_range(0, 9) == 0);
      d.vxi[23:16] = 8'($urandom_range(0, 9));
      if ($urandom_range(0, 9) == 0) d.vxi[15:0] = 16'(1016 + $urandom_range(0, 20));
      else d.vxi[15:0] = 16'($urandom_range(0, 1015));
      // reference
      drop = 0; is_ior = 0;
      if (d.ccd[3]) eh = {5'd0, d.ccd[2:0], d.vxi};
      else if (d.vxi[23:16] >= vpcount) begin drop = 1; is_ior = 1; end
      else begin
        e = tbl[d.vxi[23:16]];
        if (e[29]) begin
          if (d.vxi[15:0] >= 1024 - vpcount) begin drop = 1; is_ior = 1; end
          else e = tbl[vpcount + d.vxi[15:0]];
        end
        if (!drop) begin
          if (e[31:30] == 0 && recent) drop = 1;
          else if (tbl[d.vxi[23:16]][29]) eh = {e[28:24], d.ccd[2:0], e[23:0]};
          else eh = {e[28:24], d.ccd[2:0], e[23:16], d.vxi[15:0]};
        end
      end
      data_rcv = d;
      @(negedge clk); data_rcv = '0;
      if (drop) begin
        relq.push_back(d.ptr);
        if (is_ior) n_ior++; else n_cs0++;
        repeat (4) @(negedge clk);
        chk(!hold_valid && grant_cycb, "dropped cell leaves area empty");
        continue;
      end
      repeat (3) @(negedge clk);
      chk(hold_valid && hold_hdr == eh && hold_ptr == d.ptr && hold_ctl == d.ccd[3],
          $sformatf("held header %h exp %h", hold_hdr, eh));
      n_kept++;
      // send until granted
      kept = 1;
      while (kept) begin
        while (ph != 4'd15) @(negedge clk);
        tx_start = 1; @(negedge clk); tx_start = 0;
        while (ph != 4'd8) @(negedge clk);
        grant_val = 1; grant = ($urandom_range(0, 2) != 0);
        if (grant) relq.push_back(d.ptr); else n_resend++;
        kept = !grant;
        @(negedge clk); grant_val = 0;
        @(negedge clk);
        chk(hold_valid == kept, "held until granted");
      end
    end
    repeat (40) @(negedge clk);
    chk(relq.size() == 0, "all releases seen");
    chk(s_ior == n_ior && s_cs0 == n_cs0, $sformatf("flags ior %0d/%0d cs0 %0d/%0d", s_ior, n_ior, s_cs0, n_cs0));
    chk(n_req == n_ior + n_cs0 + n_kept, "req_t per cell");
    chk(n_ior > 0 && n_cs0 > 0 && n_resend > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
