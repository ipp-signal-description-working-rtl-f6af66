// rcv_tb: receive selector. On transfer cycles the registered output must be
// the chosen source one cycle later; on all other cycles its valid bit is clear.
module rcv_tb;
  import ipp_pkg::*;
  logic clk = 0, rst = 1, xfer = 0, sel_cycb = 0;
  desc_t data_rcb = '0, data_cycb = '0, data_rcv, expd;
  int checks = 0, failures = 0;

  rcv dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    expd = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (data_rcv != expd) begin failures++; $display("FAIL %h exp %h", data_rcv, expd); end
      end
      xfer = $urandom_range(0, 1); sel_cycb = $urandom_range(0, 1);
      data_rcb = $urandom; data_cycb = $urandom;
      data_rcb.valid = $urandom_range(0, 1); data_cycb.valid = 1;
      expd = !xfer ? '0 : sel_cycb ? data_cycb : data_rcb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
