// acc_port: the multiplexer in front of one accelerator module.
//
// The reconfiguration unit tells each port which of the four memory halves
// its accelerator is coupled to (sel_target). The port takes a new coupling
// only between interest points, so an interest point always returns its
// descriptor to the output half it came from, even if the coupling changes
// while the accelerator is working on it.
//
// Sequence for one interest point:
//   IDLE  take sel_target; if the fabric runs and that half still has
//         interest points, go on to REQ
//   REQ   request from the coupled half until granted (back to IDLE if the
//         half runs dry or the coupling changes first)
//   WAIT  the half's record and row arrive one cycle after the grant
//   IP    offer the record to the accelerator (valid/ready)
//   DESC  pass DESC_WORDS descriptor words from the accelerator (valid/ready)
//         to the coupled half's switch as writes to {row, word}; the
//         accelerator is stalled while the switch serves another port
// One interest point is in flight per accelerator. The port-level protocol
// is this design's choice; the architecture gives only the multiplexing.
module acc_port
  import surf_pkg::*;
#(
  parameter int ROWS       = surf_pkg::DEF_ROWS,
  parameter int DESC_WORDS = surf_pkg::DEF_DESC_WORDS,
  localparam int AW        = $clog2(ROWS),
  localparam int WW        = $clog2(DESC_WORDS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,
  input  half_id_t                  sel_target,
  output half_id_t                  sel,
  output logic                      busy,
  // towards the four memory halves, indexed {unit, half}
  input  logic [N_HALF-1:0]         exhausted,
  output logic [N_HALF-1:0]         req,
  input  logic [N_HALF-1:0]         gnt,
  input  logic [N_HALF-1:0][AW-1:0] rd_row,
  input  ip_t  [N_HALF-1:0]         rd_ip,
  output logic [N_HALF-1:0]         wr_req,
  output logic [AW-1:0]             wr_row,
  output logic [WW-1:0]             wr_word,
  output desc_word_t                wr_data,
  input  logic [N_HALF-1:0]         wr_gnt,
  // towards the accelerator module
  output logic                      acc_ip_valid,
  output ip_t                       acc_ip,
  input  logic                      acc_ip_ready,
  input  logic                      acc_d_valid,
  input  desc_word_t                acc_d_data,
  output logic                      acc_d_ready
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_IP, S_DESC} state_e;
  state_e state;

  logic [AW-1:0] row;
  logic [WW-1:0] wcnt;

  wire [1:0] s = sel;   // index of the coupled half

  assign busy         = state inside {S_WAIT, S_IP, S_DESC};
  assign acc_ip_valid = state == S_IP;
  assign wr_row       = row;
  assign wr_word      = wcnt;
  assign wr_data      = acc_d_data;

  always_comb begin
    req         = '0;
    wr_req      = '0;
    acc_d_ready = 1'b0;
    if (state == S_REQ) req[s] = 1'b1;
    if (state == S_DESC) begin
      wr_req[s]   = acc_d_valid;
      acc_d_ready = wr_gnt[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      sel    <= '0;
      row    <= '0;
      wcnt   <= '0;
      acc_ip <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          sel <= sel_target;
          if (run && !exhausted[sel_target]) state <= S_REQ;
        end
        S_REQ: begin
          if (gnt[s])
            state <= S_WAIT;
          else if (exhausted[s] || sel_target != sel)
            state <= S_IDLE;
        end
        S_WAIT: begin
          acc_ip <= rd_ip[s];
          row    <= rd_row[s];
          state  <= S_IP;
        end
        S_IP: begin
          wcnt <= '0;
          if (acc_ip_ready) state <= S_DESC;
        end
        S_DESC: begin
          if (acc_d_valid && wr_gnt[s]) begin
            wcnt <= wcnt + 1'b1;
            if (wcnt == WW'(DESC_WORDS - 1)) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_req_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req));
  a_gnt_when_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
  a_wgnt_when_req: assert property (@(posedge clk) disable iff (!rst_n) (wr_gnt & ~wr_req) == '0);

endmodule
