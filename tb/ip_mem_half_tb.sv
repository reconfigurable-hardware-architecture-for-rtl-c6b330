// ip_mem_half_tb: fills an input-memory half (full 4096-row size) with random
// interest point records, reads every row back and checks the one-cycle read
// latency and that rdata holds while re is low.
module ip_mem_half_tb;
  import surf_pkg::*;
  localparam int ROWS = 4096, AW = $clog2(ROWS);
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  ip_t wdata = '0, rdata;
  ip_t ref_mem [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ip_mem_half #(.ROWS(ROWS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk);
      ref_mem[i] = ip_t'({$urandom, $urandom});
      we = 1'b1; waddr = AW'(i); wdata = ref_mem[i];
    end
    @(negedge clk); we = 1'b0;
    for (int k = 0; k < 2 * ROWS; k++) begin
      int i;
      i = (k < ROWS) ? k : int'($urandom % ROWS);
      re = 1'b1; raddr = AW'(i);
      @(negedge clk);
      check(rdata == ref_mem[i], $sformatf("row %0d read %h", i, rdata));
    end
    // hold: re low, address changes, data must stay
    re = 1'b0; raddr = 0;
    @(negedge clk);
    begin
      ip_t held;
      re = 1'b1; raddr = AW'(5); @(negedge clk); held = rdata;
      check(held == ref_mem[5], "read row 5");
      re = 1'b0; raddr = AW'(6); @(negedge clk);
      check(rdata == held, "rdata held while re low");
      // write-then-read of the same row
      we = 1'b1; waddr = AW'(6); wdata = ~ref_mem[6]; @(negedge clk); we = 1'b0;
      re = 1'b1; @(negedge clk);
      check(rdata == ~ref_mem[6], "read after overwrite");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
