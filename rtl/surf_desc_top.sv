// surf_desc_top: reconfigurable two-image SURF descriptor extraction fabric.
//
// Two descriptor extraction units process the interest points of image A
// (unit 0) and image B (unit 1) side by side, each with two accelerator
// modules. When the images have different numbers of interest points, the
// unit with fewer finishes first and, in a fixed architecture, its
// accelerators would then sit idle. Here each unit's input and output
// memories are split into halves with their own switch logic, and a
// multiplexer in front of every accelerator lets the reconfiguration unit
// couple the idle unit's accelerators to one half of the busy unit's
// memories, while the busy unit's own accelerators finish its other half.
// All four accelerators thus stay busy to the end, and the job takes about
// (N_A + N_B) / 4 interest point times instead of max(N_A, N_B) / 2.
//
// The SURF accelerator modules themselves are outside this module: each of
// the four acc_* port groups, indexed {unit, slot}, connects one. An
// accelerator accepts an interest point record (acc_ip_valid/acc_ip_ready)
// and returns its DESC_WORDS descriptor words in order (acc_d_valid/
// acc_d_ready); it may take any number of cycles.
//
// Host per unit u: write interest point i with ip_we[u], ip_waddr[u] = i;
// set ip_count[u]; pulse start (both units start together). busy stays high
// until every descriptor is written, then done pulses. Descriptor word w of
// point i is read at d_raddr[u] = {i, w}, data one cycle later. mode and
// coupling show the current reconfiguration.
//
// The split memories, the multiplexers, the switch logic and the
// reconfiguration unit follow the architecture; handshakes, record layout,
// arbitration and the host interface are this design's own.
module surf_desc_top
  import surf_pkg::*;
#(
  parameter int ROWS       = surf_pkg::DEF_ROWS,
  parameter int DESC_WORDS = surf_pkg::DEF_DESC_WORDS,
  localparam int AW        = $clog2(ROWS),
  localparam int WW        = $clog2(DESC_WORDS)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output mode_e                           mode,
  output half_id_t [N_ACC-1:0]            coupling,
  // host, per unit
  input  logic [N_UNITS-1:0]              ip_we,
  input  logic [N_UNITS-1:0][AW:0]        ip_waddr,
  input  ip_t  [N_UNITS-1:0]              ip_wdata,
  input  logic [N_UNITS-1:0][AW+1:0]      ip_count,
  input  logic [N_UNITS-1:0][AW+WW:0]     d_raddr,
  output desc_word_t [N_UNITS-1:0]        d_rdata,
  // accelerator modules, per {unit, slot}
  output logic [N_ACC-1:0]                acc_ip_valid,
  output ip_t  [N_ACC-1:0]                acc_ip,
  input  logic [N_ACC-1:0]                acc_ip_ready,
  input  logic [N_ACC-1:0]                acc_d_valid,
  input  desc_word_t [N_ACC-1:0]          acc_d_data,
  output logic [N_ACC-1:0]                acc_d_ready
);

  // half-side signals, indexed [half {unit,half}][port]
  logic [N_HALF-1:0][N_ACC-1:0] h_req, h_gnt, h_wr_req, h_wr_gnt;
  logic [N_HALF-1:0][AW-1:0]    h_rd_row;
  ip_t  [N_HALF-1:0]            h_rd_ip;
  logic [N_HALF-1:0]            h_exhausted, h_complete;
  // port-side signals, indexed [port][half]
  logic [N_ACC-1:0][N_HALF-1:0] p_req, p_gnt, p_wr_req, p_wr_gnt;
  logic [N_ACC-1:0][AW-1:0]     p_wr_row;
  logic [N_ACC-1:0][WW-1:0]     p_wr_word;
  desc_word_t [N_ACC-1:0]       p_wr_data;
  half_id_t [N_ACC-1:0]         sel_target;
  logic [N_ACC-1:0]             p_busy;

  // the switch fabric is a transpose between the two views
  always_comb begin
    for (int h = 0; h < N_HALF; h++)
      for (int p = 0; p < N_ACC; p++) begin
        h_req[h][p]    = p_req[p][h];
        h_wr_req[h][p] = p_wr_req[p][h];
        p_gnt[p][h]    = h_gnt[h][p];
        p_wr_gnt[p][h] = h_wr_gnt[h][p];
      end
  end

  reconf_unit u_reconf (
    .clk, .rst_n, .start,
    .exhausted  (h_exhausted),
    .complete   (h_complete),
    .run        (busy),
    .done,
    .mode,
    .sel_target
  );

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    desc_unit #(.ROWS(ROWS), .DESC_WORDS(DESC_WORDS), .NPORT(N_ACC)) u_unit (
      .clk, .rst_n,
      .start     (start && !busy),
      .ip_we     (ip_we[u]),
      .ip_waddr  (ip_waddr[u]),
      .ip_wdata  (ip_wdata[u]),
      .ip_count  (ip_count[u]),
      .d_raddr   (d_raddr[u]),
      .d_rdata   (d_rdata[u]),
      .req       (h_req[2*u +: 2]),
      .gnt       (h_gnt[2*u +: 2]),
      .rd_row    (h_rd_row[2*u +: 2]),
      .rd_ip     (h_rd_ip[2*u +: 2]),
      .wr_req    (h_wr_req[2*u +: 2]),
      .wr_row    (p_wr_row),
      .wr_word   (p_wr_word),
      .wr_data   (p_wr_data),
      .wr_gnt    (h_wr_gnt[2*u +: 2]),
      .exhausted (h_exhausted[2*u +: 2]),
      .complete  (h_complete[2*u +: 2])
    );
  end

  for (genvar a = 0; a < N_ACC; a++) begin : g_port
    acc_port #(.ROWS(ROWS), .DESC_WORDS(DESC_WORDS)) u_port (
      .clk, .rst_n,
      .run          (busy),
      .sel_target   (sel_target[a]),
      .sel          (coupling[a]),
      .busy         (p_busy[a]),
      .exhausted    (h_exhausted),
      .req          (p_req[a]),
      .gnt          (p_gnt[a]),
      .rd_row       (h_rd_row),
      .rd_ip        (h_rd_ip),
      .wr_req       (p_wr_req[a]),
      .wr_row       (p_wr_row[a]),
      .wr_word      (p_wr_word[a]),
      .wr_data      (p_wr_data[a]),
      .wr_gnt       (p_wr_gnt[a]),
      .acc_ip_valid (acc_ip_valid[a]),
      .acc_ip       (acc_ip[a]),
      .acc_ip_ready (acc_ip_ready[a]),
      .acc_d_valid  (acc_d_valid[a]),
      .acc_d_data   (acc_d_data[a]),
      .acc_d_ready  (acc_d_ready[a])
    );
  end

  // no accelerator may still hold an interest point when the job ends
  a_idle_at_done: assert property (@(posedge clk) disable iff (!rst_n) done |-> p_busy == '0);

endmodule
