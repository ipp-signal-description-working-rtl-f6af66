// rfrm_dskw_tb: link deskew. In 32-bit mode the upper half is sent LEAD strobes
// ahead of the lower half (and on a strobe with a different phase); with
// D_SKEW_LINK set the block must hunt, lock, and then deliver words whose two
// halves belong to the same link word, with soc on word 0 of every cell. With
// D_SKEW_LINK clear the halves cannot be aligned and lock must stay low. In
// 16-bit mode consecutive half-words must be paired, first one on top.
module rfrm_dskw_tb;
  logic strb_l = 0, strb_h = 0, rst = 1, width32 = 1, d_skew = 1;
  logic [15:0] d_l = 0, d_h = 0;
  logic soc_l = 0, soc_h = 0;
  logic [31:0] word;
  logic soc, valid, lock, soc_l_t, soc_h_t;
  int checks = 0, failures = 0;
  int lead = 3;

  rfrm_dskw dut (.*);

  always #10 strb_l = ~strb_l;
  initial begin #7; forever #10 strb_h = ~strb_h; end

  // link sources: a strobe counter n; the lower half sends link word n,
  // the upper half link word n + lead
  int nl = 0, nh = 0;
  function automatic logic [15:0] lo_of(int n);
    int c = n / 16, k = n % 16;
    return {8'(c), 8'(k)};
  endfunction
  always @(negedge strb_l) begin
    if (width32) begin
      d_l <= lo_of(nl); soc_l <= (nl % 16 == 0);
    end else begin
      d_l <= {8'(nl / 32), 8'(nl % 32)}; soc_l <= (nl % 32 == 0);
    end
    nl++;
  end
  always @(negedge strb_h) begin
    d_h   <= ~lo_of(nh + lead) ^ 16'h00FF;   // = {~c, k}
    soc_h <= ((nh + lead) % 16 == 0);
    nh++;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  int nwords, nlock;
  initial begin
    repeat (100000) @(posedge strb_l);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 2; l <= 4; l++) begin
      lead = l; width32 = 1; d_skew = 1; rst = 1;
      repeat (4) @(posedge strb_l);
      nh = nl;
      rst = 0;
      repeat (16 * 12) @(posedge strb_l);
      chk(lock, $sformatf("lock with lead %0d", l));
      nwords = 0;
      repeat (16 * 8) begin
        @(posedge strb_l); #1;
        if (valid) begin
          nwords++;
          chk(word[31:24] == ~word[15:8] && word[23:16] == word[7:0], $sformatf("halves %h", word));
          chk(soc == (word[7:0] == 0), "soc on word 0");
          chk(lock, "lock held");
          chk(soc_l_t == soc_h_t, "test SOCs coincide");
        end
      end
      chk(nwords == 16 * 8, "one word per strobe");
    end
    // hunting disabled: no lock with a skew that needs a delay
    lead = 4; d_skew = 0; rst = 1;
    repeat (4) @(posedge strb_l);
    nh = nl; rst = 0;
    nlock = 0;
    repeat (16 * 10) begin @(posedge strb_l); #1; nlock += lock; end
    chk(nlock == 0, "no lock without D_SKEW");
    // 16-bit mode
    width32 = 0; rst = 1;
    repeat (4) @(posedge strb_l);
    nl = 0; rst = 0;
    repeat (32 * 4) @(posedge strb_l);
    nwords = 0;
    repeat (32 * 4) begin
      @(posedge strb_l); #1;
      if (valid) begin
        nwords++;
        chk(word[31:24] == word[15:8] && word[23:16] + 1 == word[7:0] && !word[16], $sformatf("16-bit pair %h", word));
        chk(soc == (word[23:16] == 0), "16-bit soc");
        chk(lock, "16-bit lock");
      end
    end
    chk(nwords == 64, "one word per two strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
