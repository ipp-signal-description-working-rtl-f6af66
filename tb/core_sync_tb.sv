// core_sync_tb: checks the cell phase derived from CELL_CLK and the once-per-
// cell-time sampling of RESET and CLR_ERR. A reference model counts CLK edges
// since CELL_CLK was seen high; RESET/CLR_ERR are driven with random levels that
// change every cycle, so only the level at the edge two before the CELL_CLK edge
// may decide the internal reset and clear-error of the following cell time.
module core_sync_tb;
  logic clk = 1'b0, cell_clk = 1'b0, reset_n = 1'b1, clr_err_n = 1'b1;
  logic [3:0] ph;
  logic rst, clr_err;
  int checks = 0, failures = 0;
  int cyc = 0;

  core_sync dut (.clk, .cell_clk, .reset_n, .clr_err_n, .ph, .rst, .clr_err);

  always #5 clk = ~clk;

  // reference
  int  eph;
  logic erst_s, eclr_s, erst, eclr;
  bit  started = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16 * 60; n++) begin
      @(negedge clk);
      cell_clk  = (n % 16 == 3);
      reset_n   = $urandom_range(0, 1);
      clr_err_n = $urandom_range(0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same edges
  int since;   // edges since the edge that sampled CELL_CLK high
  always @(posedge clk) begin
    logic r_s, c_s;
    r_s = erst_s; c_s = eclr_s;
    if (cell_clk) begin
      since = 0;
      if (started) begin erst = r_s; eclr = c_s; end
      started = 1;
    end else begin
      since = since + 1;
    end
    // the edge two before the next CELL_CLK edge is the 14th after the last one
    if (since == 14) begin erst_s = !reset_n; eclr_s = !clr_err_n; end
    #1;
    if (started && since >= 0) begin
      checks++;
      if (ph != 4'(since)) begin failures++; $display("ph %0d exp %0d", ph, since); end
    end
    if (started && cyc > 40) begin
      checks++;
      if (rst !== erst || clr_err !== eclr) begin
        failures++; $display("rst/clr %0b%0b exp %0b%0b at %0d", rst, clr_err, erst, eclr, cyc);
      end
    end
    cyc++;
  end
endmodule
