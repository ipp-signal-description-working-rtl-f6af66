// resetreq_clrerr_tb: RESET_REQ must be set by a command only while CTRL_EN is
// high and stay set until the RESET pin falls (released at once, before the
// synchronised reset arrives); CLR_ERR must be held for at least CLR_CELLS
// full cell times (here 3, i.e. 48..63 CLK periods after the command) and then
// released. The phase counter is driven by the testbench.
module resetreq_clrerr_tb;
  localparam int N = 3;
  logic clk = 1'b0, rst = 1'b1, reset_n = 1'b1, ctrl_en = 1'b0, cmd_reset_req = 1'b0, cmd_clr_err = 1'b0;
  logic [3:0] ph = '0;
  logic reset_req_pd, clr_err_pd;
  int checks = 0, failures = 0;

  resetreq_clrerr #(.CLR_CELLS(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    @(negedge clk); cmd_reset_req = 1; cmd_clr_err = 1;   // ctrl_en low: ignored
    @(negedge clk); cmd_reset_req = 0; cmd_clr_err = 0;
    repeat (3) @(negedge clk);
    chk(!reset_req_pd && !clr_err_pd, "commands ignored without CTRL_EN");
    ctrl_en = 1;
    for (int trial = 0; trial < 4; trial++) begin
      int len;
      repeat ($urandom_range(0, 15)) @(negedge clk);
      cmd_reset_req = 1; cmd_clr_err = 1;
      @(negedge clk); cmd_reset_req = 0; cmd_clr_err = 0;
      len = 1;
      chk(reset_req_pd && clr_err_pd, "set by command");
      while (clr_err_pd && len < 200) begin @(negedge clk); len++; end
      chk(len >= 16 * N && len <= 16 * (N + 1), $sformatf("clr_err held %0d cycles", len));
      chk(reset_req_pd, "reset_req stays until reset");
    end
    repeat (3) @(negedge clk);
    chk(reset_req_pd, "reset_req held");
    #2 reset_n = 0;
    #1 chk(!reset_req_pd, "RESET pin releases reset_req at once");
    @(negedge clk); rst = 1;
    @(negedge clk); rst = 0; reset_n = 1;
    #1 chk(!reset_req_pd, "reset clears reset_req");
    repeat (20) @(negedge clk);
    chk(!reset_req_pd, "reset_req stays released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
