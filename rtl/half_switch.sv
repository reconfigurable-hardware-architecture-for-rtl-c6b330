// half_switch: switch logic of one memory half (input half + output half).
//
// Any of the NPORT accelerator ports may be coupled to this half at a time:
// normally one, after reconfiguration two. The switch hands out the half's
// interest points in row order: each cycle it grants one requesting port
// (round-robin), reads the next row of the input half and returns the record
// one cycle later (rd_valid, rd_row; the record itself is the input memory's
// rdata). Descriptor words from the ports are written into the output half
// at {row, word}, one port per cycle, again round-robin; a port that loses
// simply holds its word.
//
// exhausted: every interest point of the half has been handed out.
// complete : every interest point's last descriptor word has been written.
// start loads the number of interest points in the half and clears the
// pointers; it is only given while the fabric is idle.
//
// The architecture names this block only as switch logic; the in-order
// shared pointer and the round-robin arbitration are this design's choices.
module half_switch
  import surf_pkg::*;
#(
  parameter int ROWS       = surf_pkg::DEF_ROWS,
  parameter int DESC_WORDS = surf_pkg::DEF_DESC_WORDS,
  parameter int NPORT      = surf_pkg::N_ACC,
  localparam int AW        = $clog2(ROWS),
  localparam int WW        = $clog2(DESC_WORDS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [AW:0]               count,
  // interest point requests
  input  logic [NPORT-1:0]          req,
  output logic [NPORT-1:0]          gnt,
  output logic                      ip_re,
  output logic [AW-1:0]             ip_raddr,
  output logic                      rd_valid,
  output logic [AW-1:0]             rd_row,
  // descriptor writes
  input  logic [NPORT-1:0]          wr_req,
  input  logic [NPORT-1:0][AW-1:0]  wr_row,
  input  logic [NPORT-1:0][WW-1:0]  wr_word,
  input  desc_word_t [NPORT-1:0]    wr_data,
  output logic [NPORT-1:0]          wr_gnt,
  output logic                      dm_we,
  output logic [AW+WW-1:0]          dm_waddr,
  output desc_word_t                dm_wdata,
  // status
  output logic                      exhausted,
  output logic                      complete
);

  logic [AW:0] count_q, ptr, done_cnt;
  logic [NPORT-1:0] rd_gnt_raw;
  logic avail;

  assign avail     = ptr < count_q;
  assign exhausted = !avail;
  assign complete  = done_cnt == count_q;

  rr_arbiter #(.N(NPORT)) u_rd_arb (.clk, .rst_n, .req(req & {NPORT{avail}}), .gnt(rd_gnt_raw));
  rr_arbiter #(.N(NPORT)) u_wr_arb (.clk, .rst_n, .req(wr_req), .gnt(wr_gnt));

  assign gnt      = rd_gnt_raw;
  assign ip_re    = |rd_gnt_raw;
  assign ip_raddr = ptr[AW-1:0];

  // write mux: select the winning port's word
  logic last_word;
  always_comb begin
    dm_we     = |wr_gnt;
    dm_waddr  = '0;
    dm_wdata  = '0;
    last_word = 1'b0;
    for (int p = 0; p < NPORT; p++)
      if (wr_gnt[p]) begin
        dm_waddr  = {wr_row[p], wr_word[p]};
        dm_wdata  = wr_data[p];
        last_word = wr_word[p] == WW'(DESC_WORDS - 1);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q  <= '0;
      ptr      <= '0;
      done_cnt <= '0;
      rd_valid <= 1'b0;
      rd_row   <= '0;
    end else begin
      rd_valid <= ip_re;
      if (ip_re) rd_row <= ptr[AW-1:0];
      if (start) begin
        count_q  <= count;
        ptr      <= '0;
        done_cnt <= '0;
      end else begin
        if (ip_re) ptr <= ptr + 1'b1;
        if (dm_we && last_word) done_cnt <= done_cnt + 1'b1;
      end
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) start |-> count <= (AW+1)'(ROWS));
  a_done_le_ptr: assert property (@(posedge clk) disable iff (!rst_n) done_cnt <= ptr);

endmodule
