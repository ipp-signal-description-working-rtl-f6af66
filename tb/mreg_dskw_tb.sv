// mreg_dskw_tb: recycling-path input stage. The OPP side runs CLK_OPP at the
// CLK rate with a different phase; it sends cells of 16 words with SOC on word
// 0 and odd parity, occasionally corrupting the parity. The CLK-side output
// must reproduce the word stream in order without loss, flag exactly the
// corrupted words, mark word 0 with soc, and hold lock once SOCs are regular.
// Data is driven just after the rising edge of CLK_OPP so that the falling-edge
// capture sees stable values.
module mreg_dskw_tb;
  logic clk = 0, rst = 1, clk_opp = 0;
  logic [31:0] d_opp = 0;
  logic soc_opp = 0, pari_opp = 0;
  logic [31:0] data;
  logic soc, valid, par_err, lock;
  int checks = 0, failures = 0;

  mreg_dskw dut (.*);

  always #5 clk = ~clk;
  initial begin #3.3; forever #5 clk_opp = ~clk_opp; end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  int n_sent = 0;
  bit bad_sent[$];
  logic [31:0] sent[$];
  always @(posedge clk_opp) begin
    #1;
    d_opp    <= {16'hC0DE, 16'(n_sent)};
    soc_opp  <= (n_sent % 16 == 0);
    pari_opp <= ~^{16'hC0DE, 16'(n_sent)} ^ (n_sent % 37 == 5);
    n_sent++;
  end

  int n_got = 0, n_err = 0, n_lock = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expn;
    repeat (10) @(negedge clk);
    rst = 0;
    expn = -1;
    repeat (16 * 120) begin
      @(negedge clk);
      if (valid) begin
        if (expn < 0) expn = data[15:0];
        chk(data == {16'hC0DE, 16'(expn)}, $sformatf("word %h exp %0d", data, expn));
        chk(soc == (expn % 16 == 0), "soc");
        chk(par_err == (expn % 37 == 5), "parity error flag");
        n_err += par_err;
        n_got++; expn++;
        if (n_got > 40) begin chk(lock, "lock"); n_lock++; end
      end
    end
    chk(n_got > 16 * 110 && n_err > 10, $sformatf("stream %0d words %0d errors", n_got, n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
