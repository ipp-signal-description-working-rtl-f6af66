// mreg_tb: recycling-path cell handler. Cells of 16 words (data or control,
// some with a parity error) arrive while RLE, the CYCB full flags and the
// cell-store slot availability are varied. For each cell the testbench checks
// the word writes, one soc_mreg pulse one cycle after the last word, and that
// req/push and the descriptor (pointer, VPI/VCI, control flag, PTI) appear
// exactly for the cells that the keep rule accepts.
module mreg_tb;
  import ipp_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] data = 0;
  logic soc = 0, valid = 0, par_err = 0, rle = 1;
  logic [IPP_PTR_W-1:0] ptr = 6'd5;
  logic ptr_avail = 1, data_full = 0, control_full = 0;
  logic wr, req, soc_mreg, push, push_ctl;
  logic [3:0] widx;
  logic [31:0] wdata;
  desc_t dout;
  int checks = 0, failures = 0;

  mreg dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  int n_keep = 0, n_drop = 0, n_ctl = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] h;
      bit ctl, perr, keep;
      int bad_k;
      h = $urandom;
      ctl = ($urandom_range(0, 3) == 0);
      if (ctl) h[27:4] = {8'd0, 16'd32}; else if (h[27:4] == 24'd32) h[27] = 1;
      if ($urandom_range(0, 15) == 0) h[27:4] = 24'd0;   // idle slot
      perr = ($urandom_range(0, 9) == 0);
      bad_k = $urandom_range(0, 15);
      rle = ($urandom_range(0, 5) != 0);
      data_full = ($urandom_range(0, 6) == 0);
      control_full = ($urandom_range(0, 3) == 0);
      ptr_avail = ($urandom_range(0, 9) != 0);
      ptr = 6'($urandom);
      keep = ptr_avail && !perr && (h[27:4] != 0) && (ctl ? !control_full : (rle && !data_full));
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        valid = 1; soc = (k == 0); data = (k == 0) ? h : $urandom;
        par_err = perr && (k == bad_k);
        #1;
        chk(wr && widx == 4'(k) && wdata == data, "word write");
        chk(!soc_mreg || k == 0, "soc_mreg only after last word");
      end
      @(negedge clk); valid = 0; soc = 0; par_err = 0;
      chk(soc_mreg, "soc_mreg once per cell");
      chk(req == keep && push == keep, $sformatf("keep %0d", keep));
      if (keep) begin
        chk(push_ctl == ctl && dout.valid && dout.ptr == ptr && dout.vxi == h[27:4] &&
            dout.ccd == {ctl, h[3:1]}, "descriptor");
        n_keep++; n_ctl += ctl;
      end else n_drop++;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    chk(n_keep > 50 && n_drop > 50 && n_ctl > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
