// cstr_tb: cell store. Cells are written through the link-side and the
// recycling-side ports with distinct word patterns, committed, and read back
// through the read port (one-cycle latency); the descriptor sent to the RCB is
// compared with the header. Then the link side fills the store without freeing:
// every committed pointer must be distinct, the store must run out after the
// expected number of cells and PTRAVAIL must drop and stay low until
// clear-error, even after all pointers are freed again through both free ports.
module cstr_tb;
  localparam int PW = 6;
  logic clk = 0, rst = 1, clr_err = 0;
  logic rf_wr = 0, rf_req = 0, rf_control = 0, rf_ready;
  logic [3:0] rf_widx = 0;
  logic [31:0] rf_wdata = 0, rf_hdr = 0;
  logic mr_wr = 0, mr_req = 0, mr_ptr_avail;
  logic [3:0] mr_widx = 0;
  logic [31:0] mr_wdata = 0;
  logic [PW-1:0] mr_ptr;
  logic cellpres, clp;
  logic [PW-1:0] ptr_rcb;
  logic [23:0] vxi;
  logic [3:0] ccd;
  logic disc_req = 0, rel_req = 0;
  logic [PW-1:0] disc_ptr = 0, rel_ptr = 0, rd_ptr = 0;
  logic [3:0] rd_idx = 0;
  logic [31:0] rd_data;
  logic ptr_avail_t;
  logic [PW:0] free_count;
  int checks = 0, failures = 0;

  cstr dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s @%0t", m, $time); end
  endtask

  function automatic logic [31:0] pat(input int n, input int k);
    return {8'hA5, 8'(n), 8'(k), 8'(n * 7 + k)};
  endfunction

  logic got_pres;
  logic [PW-1:0] got_ptr;
  logic [23:0] got_vxi;
  logic [3:0] got_ccd;
  logic got_clp;
  always @(posedge clk) begin
    #1;
    if (cellpres) begin got_pres = 1; got_ptr = ptr_rcb; got_vxi = vxi; got_ccd = ccd; got_clp = clp; end
  end

  task automatic rf_cell(input int n, input logic [31:0] h, input bit ctl, input bit commit);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); rf_wr = 1; rf_widx = 4'(k); rf_wdata = pat(n, k);
    end
    @(negedge clk); rf_wr = 0; rf_req = commit; rf_hdr = h; rf_control = ctl; got_pres = 0;
    @(negedge clk); rf_req = 0;
    @(negedge clk);
  endtask

  task automatic read_cell(input logic [PW-1:0] p, input int n);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); rd_ptr = p; rd_idx = 4'(k);
      @(negedge clk);
      chk(rd_data == pat(n, k), $sformatf("read p%0d k%0d %h exp %h", p, k, rd_data, pat(n, k)));
    end
  endtask

  logic [PW-1:0] held[$];
  bit used[64];
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    chk(rf_ready && mr_ptr_avail && ptr_avail_t, "slots reserved after reset");
    // link-side cells
    for (int n = 1; n <= 6; n++) begin
      logic [31:0] h;
      h = $urandom;
      rf_cell(n, h, n[0], 1);
      chk(got_pres && got_vxi == h[27:4] && got_ccd == {n[0], h[3:1]} && got_clp == h[0], "descriptor");
      held.push_back(got_ptr);
      read_cell(got_ptr, n);
    end
    // an uncommitted cell leaves no descriptor, the next one is stored intact
    rf_cell(20, 32'h1, 0, 0);
    chk(!got_pres, "no descriptor without commit");
    rf_cell(21, 32'h2, 0, 1);
    chk(got_pres, "descriptor after reuse");
    read_cell(got_ptr, 21);
    held.push_back(got_ptr);
    // recycling-side cells
    for (int n = 30; n < 33; n++) begin
      logic [PW-1:0] p;
      p = mr_ptr;
      for (int k = 0; k < 16; k++) begin
        @(negedge clk); mr_wr = 1; mr_widx = 4'(k); mr_wdata = pat(n, k);
      end
      @(negedge clk); mr_wr = 0; mr_req = 1;
      @(negedge clk); mr_req = 0;
      @(negedge clk);
      chk(mr_ptr != p, "new recycling slot");
      read_cell(p, n);
      held.push_back(p);
    end
    // distinctness of held pointers
    foreach (held[i]) begin
      chk(!used[held[i]], "distinct pointers");
      used[held[i]] = 1;
    end
    // fill the store
    begin
      int commits;
      commits = 0;
      while (rf_ready && commits < 100) begin
        rf_cell(40 + commits, $urandom, 0, 1);
        chk(got_pres && !used[got_ptr], "fill pointer distinct");
        used[got_ptr] = 1; held.push_back(got_ptr);
        commits++;
      end
      chk(held.size() == 63, $sformatf("cells held when full %0d", held.size()));
      @(negedge clk);
      chk(!ptr_avail_t, "PTRAVAIL low when exhausted");
    end
    // free everything, alternating the two free ports
    while (held.size() > 0) begin
      @(negedge clk);
      disc_req = 1; disc_ptr = held.pop_front();
      rel_req = held.size() > 0;
      if (rel_req) rel_ptr = held.pop_front();
    end
    @(negedge clk); disc_req = 0; rel_req = 0;
    repeat (3) @(negedge clk);
    chk(rf_ready && free_count == 62, $sformatf("all free again (%0d)", free_count));
    chk(!ptr_avail_t, "PTRAVAIL sticky");
    clr_err = 1; @(negedge clk); clr_err = 0; @(negedge clk);
    chk(ptr_avail_t, "PTRAVAIL cleared by CLR_ERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
