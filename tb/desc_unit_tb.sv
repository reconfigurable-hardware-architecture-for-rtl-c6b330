// desc_unit_tb: one extraction unit's memory side (8 rows per half, 4-word
// descriptors, 4 ports). The host loads 13 interest points; the test then
// draws them out of each half through the switch logic and checks that half
// 0 holds the even-numbered points and half 1 the odd ones, in order, with
// 7 and 6 points (exhausted after that). It then writes a descriptor for
// every point through a port into the half it came from, checks the
// complete flags, and reads all descriptors back through the host port by
// point number. A second load with 16 points fills both halves completely.
module desc_unit_tb;
  import surf_pkg::*;
  localparam int ROWS = 8, DW = 4, NP = 4, AW = $clog2(ROWS), WW = $clog2(DW);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic ip_we = 1'b0;
  logic [AW:0] ip_waddr = '0;
  ip_t ip_wdata = '0;
  logic [AW+1:0] ip_count = '0;
  logic [AW+WW:0] d_raddr = '0;
  desc_word_t d_rdata;
  logic [1:0][NP-1:0] req = '0, gnt, wr_req = '0, wr_gnt;
  logic [1:0][AW-1:0] rd_row;
  ip_t [1:0] rd_ip;
  logic [NP-1:0][AW-1:0] wr_row = '0;
  logic [NP-1:0][WW-1:0] wr_word = '0;
  desc_word_t [NP-1:0] wr_data = '0;
  logic [1:0] exhausted, complete;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  desc_unit #(.ROWS(ROWS), .DESC_WORDS(DW), .NPORT(NP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic desc_word_t dword(int i, int w);
    return 32'(i * 1000 + w) ^ 32'hA5A5_0000;
  endfunction

  ip_t pts [2*ROWS];

  task automatic job(int n);
    int got [2];
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      pts[i] = ip_t'({$urandom, $urandom});
      ip_we = 1'b1; ip_waddr = (AW+1)'(i); ip_wdata = pts[i];
    end
    @(negedge clk);
    ip_we = 1'b0; ip_count = (AW+2)'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(complete == ((n == 0) ? 2'b11 : (n == 1) ? 2'b10 : 2'b00), "complete after start");
    // draw all points out of both halves at once, port 1 on half 0, port 2 on half 1
    got = '{0, 0};
    for (int c = 0; c < 2 * ROWS + 4; c++) begin
      logic [1:0] g;
      req[0] = NP'(2); req[1] = NP'(4);
      #1;
      g = {gnt[1][2], gnt[0][1]};
      @(negedge clk);
      for (int h = 0; h < 2; h++)
        if (g[h]) begin
          check(rd_ip[h] == pts[2 * got[h] + h] && rd_row[h] == AW'(got[h]),
                $sformatf("half %0d row %0d record", h, got[h]));
          got[h]++;
        end
    end
    req = '0;
    check(got[0] == (n + 1) / 2 && got[1] == n / 2, $sformatf("split %0d/%0d of %0d", got[0], got[1], n));
    check(exhausted == 2'b11, "both halves exhausted");
    // write descriptors: point i via port 3 into half i[0], row i>>1
    for (int i = 0; i < n; i++)
      for (int w = 0; w < DW; w++) begin
        wr_req = '0; wr_req[i % 2] = NP'(8); wr_row[3] = AW'(i / 2); wr_word[3] = WW'(w); wr_data[3] = dword(i, w);
        #1;
        check(wr_gnt[i % 2] == NP'(8), "lone writer granted");
        @(negedge clk);
      end
    wr_req = '0;
    check(complete == 2'b11, "both halves complete");
    // read back by point number
    for (int i = 0; i < n; i++)
      for (int w = 0; w < DW; w++) begin
        d_raddr = {(AW+1)'(i), WW'(w)};
        @(negedge clk);
        check(d_rdata == dword(i, w), $sformatf("descriptor %0d word %0d read %h", i, w, d_rdata));
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    job(13);
    job(16);
    job(1);
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
