// desc_unit: memory side of one descriptor extraction unit.
//
// A unit serves one input image. Its 64 kB input memory (interest points)
// and 2 MB output memory (descriptors) are each split into two halves of
// equal size, and each half pair has its own switch logic, so the two halves
// can be served by different accelerators at the same time. The unit's
// accelerator slots are not inside: they reach the halves through the
// fabric's port multiplexers, which is what lets the other unit's
// accelerators work here after reconfiguration.
//
// Host side: interest point i is written with ip_waddr = i and lands in half
// i[0], row i>>1, so the halves always hold equal shares (half 0 one more
// for an odd count). ip_count is the number of interest points, sampled at
// start. Descriptor word w of interest point i is read with d_raddr = {i, w};
// d_rdata follows one cycle later. The interleaving of the halves is this
// design's choice; the split into halves and the sizes follow the
// architecture.
module desc_unit
  import surf_pkg::*;
#(
  parameter int ROWS       = surf_pkg::DEF_ROWS,
  parameter int DESC_WORDS = surf_pkg::DEF_DESC_WORDS,
  parameter int NPORT      = surf_pkg::N_ACC,
  localparam int AW        = $clog2(ROWS),
  localparam int WW        = $clog2(DESC_WORDS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  // host
  input  logic                          ip_we,
  input  logic [AW:0]                   ip_waddr,
  input  ip_t                           ip_wdata,
  input  logic [AW+1:0]                 ip_count,
  input  logic [AW+WW:0]                d_raddr,
  output desc_word_t                    d_rdata,
  // per half: interest point requests from the ports
  input  logic [1:0][NPORT-1:0]         req,
  output logic [1:0][NPORT-1:0]         gnt,
  output logic [1:0][AW-1:0]            rd_row,
  output ip_t  [1:0]                    rd_ip,
  // per half: descriptor writes from the ports
  input  logic [1:0][NPORT-1:0]         wr_req,
  input  logic [NPORT-1:0][AW-1:0]      wr_row,
  input  logic [NPORT-1:0][WW-1:0]      wr_word,
  input  desc_word_t [NPORT-1:0]        wr_data,
  output logic [1:0][NPORT-1:0]         wr_gnt,
  // per half status
  output logic [1:0]                    exhausted,
  output logic [1:0]                    complete
);

  logic [AW:0] half_count [2];
  assign half_count[0] = (AW+1)'((ip_count + 1'b1) >> 1);
  assign half_count[1] = (AW+1)'(ip_count >> 1);

  desc_word_t d_rdata_h [2];
  logic       rd_half_q;

  for (genvar h = 0; h < 2; h++) begin : g_half
    logic          ip_re;
    logic [AW-1:0] ip_raddr;
    logic          dm_we;
    logic [AW+WW-1:0] dm_waddr;
    desc_word_t    dm_wdata;
    logic          rd_valid_unused;

    ip_mem_half #(.ROWS(ROWS)) u_ipm (
      .clk,
      .we    (ip_we && ip_waddr[0] == 1'(h)),
      .waddr (ip_waddr[AW:1]),
      .wdata (ip_wdata),
      .re    (ip_re),
      .raddr (ip_raddr),
      .rdata (rd_ip[h])
    );

    desc_mem_half #(.ROWS(ROWS), .DESC_WORDS(DESC_WORDS)) u_dm (
      .clk,
      .we    (dm_we),
      .waddr (dm_waddr),
      .wdata (dm_wdata),
      .raddr ({d_raddr[AW+WW:WW+1], d_raddr[WW-1:0]}),
      .rdata (d_rdata_h[h])
    );

    half_switch #(.ROWS(ROWS), .DESC_WORDS(DESC_WORDS), .NPORT(NPORT)) u_sw (
      .clk, .rst_n, .start,
      .count     (half_count[h]),
      .req       (req[h]),
      .gnt       (gnt[h]),
      .ip_re, .ip_raddr,
      .rd_valid  (rd_valid_unused),
      .rd_row    (rd_row[h]),
      .wr_req    (wr_req[h]),
      .wr_row, .wr_word, .wr_data,
      .wr_gnt    (wr_gnt[h]),
      .dm_we, .dm_waddr, .dm_wdata,
      .exhausted (exhausted[h]),
      .complete  (complete[h])
    );
  end

  always_ff @(posedge clk) rd_half_q <= d_raddr[WW];
  assign d_rdata = d_rdata_h[rd_half_q];

  a_count_fits: assert property (@(posedge clk) disable iff (!rst_n) start |-> ip_count <= (AW+2)'(2 * ROWS));

endmodule
