// acc_port_tb: one accelerator port (8 rows, 4-word descriptors) between a
// model of the four memory-half switches and a model of the accelerator,
// both in this testbench. The halves grant requests at random and return a
// random record and row one cycle later; the accelerator accepts points and
// offers descriptor words with random delays; the switches accept writes at
// random. The coupling target changes at random and halves run dry at
// random. Checked for every interest point: the record handed to the
// accelerator is the one granted, every descriptor word goes to the half the
// point came from, with its row and word index and unchanged data; requests
// only go to the current coupling, and the coupling never changes while the
// port holds a point.
module acc_port_tb;
  import surf_pkg::*;
  localparam int ROWS = 8, DW = 4, AW = $clog2(ROWS), WW = $clog2(DW);

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  half_id_t sel_target = '0, sel;
  logic busy;
  logic [N_HALF-1:0] exhausted = '0, req, gnt = '0, wr_req, wr_gnt = '0;
  logic [N_HALF-1:0][AW-1:0] rd_row = '0;
  ip_t [N_HALF-1:0] rd_ip = '0;
  logic [AW-1:0] wr_row;
  logic [WW-1:0] wr_word;
  desc_word_t wr_data;
  logic acc_ip_valid, acc_ip_ready = 1'b0, acc_d_valid = 1'b0, acc_d_ready;
  ip_t acc_ip;
  desc_word_t acc_d_data = '0;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  acc_port #(.ROWS(ROWS), .DESC_WORDS(DW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scoreboard for the point in flight
  int  exp_h, exp_row, gnt_h = -1;
  ip_t exp_ip;
  bit  in_desc = 0;
  int  w = 0;
  ip_t cur;
  int  n_points = 0, n_defer = 0, n_dry = 0, n_wstall = 0;
  half_id_t sel_prev;
  logic busy_prev;

  function automatic desc_word_t word_of(ip_t ip, int k);
    return ip[31:0] ^ ip[63:32] ^ 32'(k * 7919);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // coupling must not change while a point is held
      if (busy_prev) check(sel == sel_prev, "coupling changed while busy");
      if (busy && sel != sel_target) n_defer++;
      // record of the grant made in the previous cycle
      for (int h = 0; h < N_HALF; h++) begin
        rd_ip[h]  = ip_t'({$urandom, $urandom});
        rd_row[h] = AW'($urandom);
      end
      if (gnt_h >= 0) begin
        exp_h = gnt_h; exp_ip = rd_ip[gnt_h]; exp_row = int'(rd_row[gnt_h]);
      end
      // random environment
      if ($urandom % 40 == 0) sel_target = half_id_t'($urandom);
      if ($urandom % 60 == 0) begin exhausted = N_HALF'($urandom); n_dry++; end
      if ($urandom % 25 == 0) exhausted = '0;
      acc_ip_ready = !in_desc && ($urandom % 2 == 0);
      acc_d_valid  = in_desc && ($urandom % 3 != 0);
      acc_d_data   = word_of(cur, w);
      #1;
      check($onehot0(req), "req one-hot");
      if (req != '0) check(req == N_HALF'(1) << sel, "req goes to coupled half");
      gnt = req & ~exhausted & N_HALF'($urandom);
      wr_gnt = wr_req & N_HALF'($urandom);
      #1;
      gnt_h = -1;
      for (int h = 0; h < N_HALF; h++) if (gnt[h]) gnt_h = h;
      if (acc_ip_valid && acc_ip_ready) begin
        check(acc_ip == exp_ip, $sformatf("record to accelerator %h exp %h", acc_ip, exp_ip));
        cur = acc_ip; in_desc = 1; w = 0;
      end
      if (in_desc && acc_d_valid && !acc_d_ready) n_wstall++;
      if (in_desc && acc_d_valid) check(wr_req == N_HALF'(1) << exp_h, "write goes to source half");
      if (in_desc && acc_d_valid && acc_d_ready) begin
        check(wr_gnt == N_HALF'(1) << exp_h && wr_row == AW'(exp_row) && wr_word == WW'(w)
              && wr_data == word_of(cur, w),
              $sformatf("write h%0d row %0d word %0d", exp_h, wr_row, wr_word));
        w++;
        if (w == DW) begin in_desc = 0; n_points++; end
      end
      sel_prev = sel; busy_prev = busy;
    end
    check(n_points > 100, $sformatf("points processed: %0d", n_points));
    check(n_defer > 0, "deferred coupling change seen");
    check(n_wstall > 0, "write stall seen");
    run = 1'b0;
    repeat (50) @(negedge clk);
    check(req == '0, "no request when not running");
    $display("points %0d, deferred %0d, dry events %0d, write stalls %0d", n_points, n_defer, n_dry, n_wstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
