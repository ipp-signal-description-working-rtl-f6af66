// rcb_tb: descriptor queue. Random descriptors with random CLP arrive while the
// testbench pops at random; a reference queue predicts which are kept (order
// must be preserved), which are dropped with DISC_REQ (CLP=1 above the threshold,
// any cell when full), the congestion flag and the per-cell-time overflow flags.
module rcb_tb;
  import ipp_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] ph = 0;
  logic cellpres = 0, clp = 0, grant = 0;
  desc_t din = '0, data_rcb;
  logic [7:0] thr = 8'd20;
  logic disc_req, cong, ovf0, ovf1, data_t;
  logic [IPP_PTR_W-1:0] disc_ptr;
  logic [5:0] count;
  int checks = 0, failures = 0;

  rcb dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  desc_t q[$];
  int n_ovf0 = 0, n_ovf1 = 0, s_ovf0 = 0, s_ovf1 = 0, n_cong = 0;
  bit pend_disc = 0, f0 = 0, f1 = 0;
  logic [IPP_PTR_W-1:0] pend_ptr;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int pop_pct;
      pop_pct = (cyc / 1500) % 2 ? 60 : 15;     // alternate filling and draining
      @(negedge clk);
      // check outputs before this edge's inputs
      chk(data_rcb.valid == (q.size() > 0), "head valid");
      if (q.size() > 0) chk(data_rcb[33:0] == q[0][33:0], "head order");
      chk(disc_req == pend_disc && (!pend_disc || disc_ptr == pend_ptr), "discard report");
      chk(32'(count) == q.size(), "count");
      if (ph == 4'd0) begin
        chk(ovf0 == f0 && ovf1 == f1, "overflow flags per cell time");
        f0 = 0; f1 = 0;
        n_cong += cong;
      end
      // new inputs
      cellpres = ($urandom_range(0, 99) < 40);
      clp = $urandom_range(0, 1);
      din = $urandom; din.valid = 1;
      grant = ($urandom_range(0, 99) < pop_pct);
      // reference, applied for this edge
      pend_disc = 0;
      if (cellpres) begin
        if (clp && (q.size() > thr || q.size() == 32)) begin pend_disc = 1; s_ovf1++; end
        else if (!clp && q.size() == 32) begin pend_disc = 1; s_ovf0++; end
        pend_ptr = din.ptr;
      end
      if (ph == 4'd15) begin
        // flags seen at ph 0 cover this cell time, including this edge
        f0 = f0 | (n_ovf0 != s_ovf0); f1 = f1 | (n_ovf1 != s_ovf1);
        n_ovf0 = s_ovf0; n_ovf1 = s_ovf1;
      end
      if (grant && q.size() > 0) void'(q.pop_front());
      if (cellpres && !pend_disc) q.push_back(din);
    end
    chk(s_ovf0 > 0 && s_ovf1 > 0 && n_cong > 0, $sformatf("all drop kinds seen %0d %0d %0d", s_ovf0, s_ovf1, n_cong));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
