// ip_mem_half: one half of an extraction unit's input memory, holding the
// interest points the unit still has to describe.
//
// A simple dual-port RAM of ROWS interest point records (4096 x 64 bits,
// 32 kB, half of the unit's 64 kB input memory). The write port is loaded by
// the host before a run; the read port is driven by the half's switch logic.
// Reads are synchronous: rdata holds mem[raddr] one clock after re is high
// and keeps its value otherwise. Both the split into halves and the size
// follow the architecture; the port arrangement is this design's choice.
module ip_mem_half
  import surf_pkg::*;
#(
  parameter int ROWS = surf_pkg::DEF_ROWS,
  localparam int AW  = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ip_t           wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output ip_t           rdata
);

  ip_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
