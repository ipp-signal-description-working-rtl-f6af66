// rfmt_sgen_tb: output reformatter. A behavioural cell-store RAM with a
// registered read port feeds the block; a new random cell (or an idle slot) is
// offered every cell time. For several CC_TAP values the testbench checks, on
// every CLK, the four 8-bit slices against the expected word (header for word 0,
// stored word otherwise), the four identical control nibbles, odd parity over
// each slice's 12 bits, that word 0 appears exactly 1 + CC_TAP edges after the
// CELL_CLK edge, the GRANT_SE sample taken at the eighth CLK of the cell time,
// and the all-0 / all-1 / only-LSB detectors on the cell-store bus.
module rfmt_sgen_tb;
  import ipp_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] ph = 0, tap = 0;
  logic hold_valid = 0, hold_ctl = 0;
  logic [IPP_PTR_W-1:0] hold_ptr = 0, rd_ptr;
  logic [31:0] hold_hdr = 0, cstr_data;
  logic [3:0] rd_idx;
  logic tx_start, grant_se = 0, grant_val, grant_int, all0, all1, all0but1;
  logic [3:0][7:0] d_ipp;
  logic [3:0][3:0] ctrl_ipp;
  logic [3:0] pari_ipp;
  int checks = 0, failures = 0;

  rfmt_sgen dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;   // ph 0 follows the edge that sees CELL_CLK

  logic [31:0] mem [64][16];
  always @(posedge clk) cstr_data <= mem[rd_ptr][rd_idx];

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  typedef struct { bit busy; bit ctl; logic [5:0] ptr; logic [31:0] hdr; } cell_t;
  cell_t pending, cur;
  logic g_sample;
  int n_first = 0, n_a0 = 0, n_a1 = 0, n_ab = 0, n_grant = 0;

  always @(posedge clk) if (!rst) begin
    if (tx_start) pending = '{hold_valid, hold_ctl, hold_ptr, hold_hdr};
    if (ph == 4'd7) g_sample = grant_se;
  end

  always @(negedge clk) if (!rst) begin
    logic [3:0] k;
    logic [31:0] w;
    logic [3:0] c;
    k = ph - 4'd1 - tap;
    if (k == 0) cur = pending;
    w = !cur.busy ? 32'd0 : (k == 0) ? cur.hdr : mem[cur.ptr][k];
    c = !cur.busy ? 4'd0 : {k == 15, cur.ctl, k == 0, 1'b1};
    for (int i = 0; i < 4; i++) begin
      chk(d_ipp[i] == w[8*i +: 8], $sformatf("slice %0d word %0d", i, k));
      chk(ctrl_ipp[i] == c, "control copy");
      chk(^{d_ipp[i], ctrl_ipp[i], pari_ipp[i]} == 1'b1, "odd parity");
    end
    if (ctrl_ipp[0][1]) begin
      n_first++;
      chk(ph == tap + 4'd1, "first word 1+CC_TAP edges after CELL_CLK");
    end
    if (grant_val) begin
      n_grant++;
      chk(ph == 4'd8 && grant_int == g_sample, "grant sampled in the eighth period");
    end
    chk(all0 == (cstr_data == 0) && all1 == (cstr_data == '1) && all0but1 == (cstr_data == 1), "ram test outputs");
    n_a0 += all0; n_a1 += all1; n_ab += all0but1;
    grant_se = $urandom_range(0, 1);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[p, k]) mem[p][k] = (p == 1) ? 32'd0 : (p == 2) ? '1 : (p == 3) ? 32'd1 : $urandom;
    cur = '{0, 0, 0, 0};
    pending = cur;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      tap = (t == 0) ? 4'd0 : (t == 1) ? 4'd5 : (t == 2) ? 4'd6 : 4'($urandom);
      rst = 1;
      cur = '{0, 0, 0, 0}; pending = cur;
      repeat (20) @(negedge clk);
      rst = 0;
      for (int n = 0; n < 40; n++) begin
        // change the offered cell right after it has been latched
        @(posedge clk iff tx_start);
        @(negedge clk);
        hold_valid = ($urandom_range(0, 4) != 0);
        hold_ptr = 6'($urandom);
        if (n % 10 < 3) hold_ptr = 6'(n % 10 + 1);
        hold_hdr = $urandom;
        hold_ctl = $urandom_range(0, 1);
      end
    end
    chk(n_first > 100 && n_grant > 100 && n_a0 > 0 && n_a1 > 0 && n_ab > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
