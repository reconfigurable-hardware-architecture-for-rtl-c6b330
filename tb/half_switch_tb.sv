// half_switch_tb: drives the switch logic of one memory half (8 rows, 4-word
// descriptors, 4 ports) with random interest point requests and random
// descriptor writes, and checks every cycle against a reference model kept
// in the testbench: round-robin grants, in-order row hand-out, the one-cycle
// rd_valid/rd_row, the write multiplexer, and the exhausted and complete
// flags. A second job with no interest points must grant nothing.
module half_switch_tb;
  import surf_pkg::*;
  localparam int ROWS = 8, DW = 4, NP = 4, AW = $clog2(ROWS), WW = $clog2(DW);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW:0] count = '0;
  logic [NP-1:0] req = '0, gnt, wr_req = '0, wr_gnt;
  logic ip_re, rd_valid, dm_we, exhausted, complete;
  logic [AW-1:0] ip_raddr, rd_row;
  logic [NP-1:0][AW-1:0] wr_row = '0;
  logic [NP-1:0][WW-1:0] wr_word = '0;
  desc_word_t [NP-1:0] wr_data = '0;
  logic [AW+WW-1:0] dm_waddr;
  desc_word_t dm_wdata;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  half_switch #(.ROWS(ROWS), .DESC_WORDS(DW), .NPORT(NP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference round-robin pick
  function automatic int rr_pick(logic [NP-1:0] r, int prio);
    for (int k = 0; k < NP; k++)
      if (r[(prio + k) % NP]) return (prio + k) % NP;
    return -1;
  endfunction

  int ptr_ref, done_ref, rp_rd, rp_wr, cnt;
  int exp_row; bit exp_valid;
  int n_both_req = 0;

  task automatic job(int n, int cycles);
    @(negedge clk);
    start = 1'b1; count = (AW+1)'(n);
    @(negedge clk);
    start = 1'b0;
    cnt = n; ptr_ref = 0; done_ref = 0; exp_valid = 0;
    for (int c = 0; c < cycles; c++) begin
      int wi, ri;
      req = NP'($urandom);
      if ($countones(req) > 1) n_both_req++;
      wr_req = NP'($urandom);
      for (int p = 0; p < NP; p++) begin
        wr_row[p]  = AW'($urandom);
        wr_data[p] = $urandom;
        wr_word[p] = WW'($urandom % (DW - 1));
        if (done_ref < ptr_ref && $urandom % 3 == 0) wr_word[p] = WW'(DW - 1);
      end
      #1;
      // registered outputs from the previous cycle
      check(rd_valid == exp_valid, "rd_valid");
      if (exp_valid) check(rd_row == AW'(exp_row), $sformatf("rd_row %0d exp %0d", rd_row, exp_row));
      check(exhausted == (ptr_ref >= cnt), "exhausted");
      check(complete == (done_ref == cnt), "complete");
      // this cycle's grants
      ri = (ptr_ref < cnt) ? rr_pick(req, rp_rd) : -1;
      check(gnt == ((ri >= 0) ? NP'(1) << ri : '0), $sformatf("rd grant %b exp %0d", gnt, ri));
      check(ip_re == (ri >= 0), "ip_re");
      if (ri >= 0) check(ip_raddr == AW'(ptr_ref), "ip_raddr");
      wi = rr_pick(wr_req, rp_wr);
      check(wr_gnt == ((wi >= 0) ? NP'(1) << wi : '0), $sformatf("wr grant %b exp %0d", wr_gnt, wi));
      check(dm_we == (wi >= 0), "dm_we");
      if (wi >= 0) begin
        check(dm_waddr == {wr_row[wi], wr_word[wi]} && dm_wdata == wr_data[wi], "write mux");
        if (wr_word[wi] == WW'(DW - 1)) done_ref++;
        rp_wr = (wi + 1) % NP;
      end
      exp_valid = ri >= 0;
      if (ri >= 0) begin exp_row = ptr_ref; ptr_ref++; rp_rd = (ri + 1) % NP; end
      @(negedge clk);
    end
    req = '0; wr_req = '0;
  endtask

  initial begin
    rp_rd = 0; rp_wr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    job(5, 60);
    check(exhausted, "job 1 exhausted");
    job(8, 120);
    check(complete && exhausted, "job 2 complete");
    job(0, 10);
    check(n_both_req > 0, "contention seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
