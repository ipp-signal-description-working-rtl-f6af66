// cycb_tb: recycling buffer and arbiter. Data and control descriptors are
// pushed at random while the VXT grant is toggled; at each decision phase the
// testbench expects exactly one transfer when granted, control cells before
// data cells before the RCB, FIFO order within each class, and the full flags
// at 16 data and 2 control entries.
module cycb_tb;
  import ipp_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] ph = 0;
  logic push = 0, push_ctl = 0, grant_vxt = 0;
  desc_t din = '0, dout;
  logic data_full, control_full, xfer, grant_rcv, grant_rcb;
  int checks = 0, failures = 0;

  cycb dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  desc_t dq[$], cq[$];
  int n_rcb = 0, n_ctl = 0, n_dat = 0, n_dfull = 0, n_cfull = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 16 * 400; cyc++) begin
      int dsz, csz;
      @(negedge clk);
      dsz = dq.size(); csz = cq.size();
      chk(data_full == (dq.size() == 16) && control_full == (cq.size() == 2), "full flags");
      n_dfull += data_full; n_cfull += control_full;
      // decision phase
      if (ph == 4'd9 && grant_vxt) begin
        chk(xfer, "transfer at decision phase");
        if (cq.size() > 0) begin
          chk(grant_rcv && !grant_rcb && dout == cq[0], "control first");
          void'(cq.pop_front()); n_ctl++;
        end else if (dq.size() > 0) begin
          chk(grant_rcv && !grant_rcb && dout == dq[0], "data second");
          void'(dq.pop_front()); n_dat++;
        end else begin
          chk(!grant_rcv && grant_rcb, "rcb last");
          n_rcb++;
        end
      end else begin
        chk(!xfer && !grant_rcv && !grant_rcb, "no transfer outside decision");
      end
      push = ($urandom_range(0, 99) < ((cyc / 1600) % 2 ? 3 : 12));
      push_ctl = ($urandom_range(0, 3) == 0);
      din = $urandom; din.valid = 1;
      if (ph == 4'd0) grant_vxt = $urandom_range(0, 3) != 0;
      if (push) begin
        if (push_ctl && csz < 2) cq.push_back(din);
        if (!push_ctl && dsz < 16) dq.push_back(din);
      end
    end
    chk(n_rcb > 0 && n_ctl > 0 && n_dat > 0 && n_dfull > 0 && n_cfull > 0,
        $sformatf("all cases %0d %0d %0d %0d %0d", n_rcb, n_ctl, n_dat, n_dfull, n_cfull));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
