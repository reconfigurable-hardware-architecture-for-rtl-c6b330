// surf_acc_model: behavioural model of one SURF accelerator module, for
// simulation only (not synthesizable logic).
//
// It accepts one interest point at a time (ip_valid/ip_ready), spends
// LAT cycles (plus up to JIT random extra cycles) "computing", then
// returns DESC_WORDS descriptor words in order (d_valid/d_ready). With
// GAPS set it also drops d_valid at random between words. The words are
// surf_tb_pkg::ref_desc_word(ip, w), so a testbench can recompute them.
// It counts the interest points it has finished in n_done.
module surf_acc_model
  import surf_pkg::*;
  import surf_tb_pkg::*;
#(
  parameter int DESC_WORDS = 64,
  parameter int LAT        = 20,
  parameter int JIT        = 0,
  parameter bit GAPS       = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ip_valid,
  input  ip_t        ip,
  output logic       ip_ready,
  output logic       d_valid,
  output desc_word_t d_data,
  input  logic       d_ready,
  output int         n_done
);

  typedef enum logic [1:0] {M_IDLE, M_CALC, M_OUT} mstate_e;
  mstate_e st;
  ip_t     cur;
  int      wait_cnt, w;
  logic    gap;

  assign ip_ready = st == M_IDLE;
  assign d_valid  = st == M_OUT && !gap;
  assign d_data   = ref_desc_word(cur, w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; cur <= '0; wait_cnt <= 0; w <= 0; gap <= 1'b0; n_done <= 0;
    end else begin
      gap <= GAPS ? ($urandom % 4 == 0) : 1'b0;
      unique case (st)
        M_IDLE: if (ip_valid) begin
          cur      <= ip;
          wait_cnt <= LAT + ((JIT > 0) ? int'($urandom % (JIT + 1)) : 0);
          st       <= M_CALC;
        end
        M_CALC: begin
          if (wait_cnt <= 1) begin st <= M_OUT; w <= 0; end
          wait_cnt <= wait_cnt - 1;
        end
        M_OUT: if (d_valid && d_ready) begin
          if (w == DESC_WORDS - 1) begin
            st <= M_IDLE; n_done <= n_done + 1;
          end
          w <= w + 1;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
