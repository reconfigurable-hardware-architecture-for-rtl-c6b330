// desc_mem_half_tb: writes random descriptor words into an output-memory half
// (reduced to 16 rows of 64 words), in scrambled order, and reads them back
// by {row, word} address with one cycle of read latency.
module desc_mem_half_tb;
  import surf_pkg::*;
  localparam int ROWS = 16, DW = 64, DEPTH = ROWS * DW, AW = $clog2(DEPTH);
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  desc_word_t wdata = '0, rdata;
  desc_word_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  desc_mem_half #(.ROWS(ROWS), .DESC_WORDS(DW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // addresses visited in the order i*37 mod DEPTH (37 odd: a permutation)
    for (int k = 0; k < DEPTH; k++) begin
      int i;
      i = (k * 37) % DEPTH;
      @(negedge clk);
      ref_mem[i] = $urandom;
      we = 1'b1; waddr = AW'(i); wdata = ref_mem[i];
    end
    @(negedge clk); we = 1'b0;
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < DW; w++) begin
        raddr = {4'(r), 6'(w)};
        @(negedge clk);
        check(rdata == ref_mem[r * DW + w], $sformatf("row %0d word %0d read %h", r, w, rdata));
      end
    // simultaneous write and read of different addresses
    we = 1'b1; waddr = AW'(3); wdata = 32'hCAFE_F00D; raddr = AW'(700);
    @(negedge clk); we = 1'b0;
    check(rdata == ref_mem[700], "read during write");
    raddr = AW'(3); @(negedge clk);
    check(rdata == 32'hCAFE_F00D, "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
