// reconf_unit: reconfiguration unit of the two-unit descriptor extraction
// fabric.
//
// It runs one extraction job for both images and decides how the four
// accelerators are coupled to the four memory halves. At start every
// accelerator works on its own unit's memories, slot k on half k. When one
// unit has handed out all its interest points while the other has not, that
// unit's accelerators would fall idle; the fabric is then reconfigured: the
// busy unit's two accelerators share its half 0 and the idle unit's two
// accelerators share the busy unit's half 1. Because the two halves of a
// unit are drained at the same rate before the switch, both halves keep two
// accelerators busy until the job ends. The mode holds until the next start.
//
// Interface: start (one-cycle pulse while idle) begins a job; run is high
// from the cycle after start until every half has written all its
// descriptors; done pulses for one cycle as run falls. exhausted/complete
// come from the four half switches, indexed {unit, half}. sel_target gives
// each accelerator, indexed {unit, slot}, the half it should be coupled to.
//
// The coupling pattern follows the architecture; the exact trigger
// condition (all interest points of a unit handed out) is this design's
// choice.
module reconf_unit
  import surf_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic     [N_HALF-1:0]  exhausted,
  input  logic     [N_HALF-1:0]  complete,
  output logic                   run,
  output logic                   done,
  output mode_e                  mode,
  output half_id_t [N_ACC-1:0]   sel_target
);

  logic a_dry, b_dry;
  assign a_dry = exhausted[0] & exhausted[1];
  assign b_dry = exhausted[2] & exhausted[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      mode <= MODE_NORMAL;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run  <= 1'b1;
          mode <= MODE_NORMAL;
        end
      end else if (&complete) begin
        run  <= 1'b0;
        done <= 1'b1;
      end else if (mode == MODE_NORMAL) begin
        if (a_dry && !b_dry)      mode <= MODE_A_HELPS_B;
        else if (b_dry && !a_dry) mode <= MODE_B_HELPS_A;
      end
    end
  end

  // Coupling of accelerator {unit u, slot k} to a half {unit, half}.
  always_comb begin
    for (int a = 0; a < N_ACC; a++) begin
      logic u, k;
      u = a[1];
      k = a[0];
      unique case (mode)
        MODE_A_HELPS_B: sel_target[a] = u ? '{unit: 1'b1, half: 1'b0}
                                          : '{unit: 1'b1, half: 1'b1};
        MODE_B_HELPS_A: sel_target[a] = u ? '{unit: 1'b0, half: 1'b1}
                                          : '{unit: 1'b0, half: 1'b0};
        default:        sel_target[a] = '{unit: u, half: k};
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !run);

endmodule
