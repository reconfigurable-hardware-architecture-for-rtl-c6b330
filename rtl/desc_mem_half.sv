// desc_mem_half: one half of an extraction unit's output memory, holding the
// descriptors computed for the interest points of the matching input half.
//
// A simple dual-port RAM of ROWS descriptors of DESC_WORDS 32-bit words
// (4096 x 64 x 32 bits = 1 MB, half of the unit's 2 MB output memory),
// addressed as {row, word}. The write port is driven by the half's switch
// logic; the read port serves the host. The read is synchronous: rdata holds
// mem[raddr] one clock after raddr is presented. Size and split follow the
// architecture; the word width and addressing are this design's choice.
module desc_mem_half
  import surf_pkg::*;
#(
  parameter int ROWS       = surf_pkg::DEF_ROWS,
  parameter int DESC_WORDS = surf_pkg::DEF_DESC_WORDS,
  localparam int DEPTH     = ROWS * DESC_WORDS,
  localparam int AW        = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  desc_word_t    wdata,
  input  logic [AW-1:0] raddr,
  output desc_word_t    rdata
);

  desc_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
