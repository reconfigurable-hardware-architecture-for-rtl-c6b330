// surf_desc_top_tb: end-to-end test of the reconfigurable extraction fabric
// at reduced sizes (32 interest points per memory half, 8-word descriptors)
// with four accelerator models.
//
// Each case loads N_A and N_B random interest points into the two units,
// starts a job, waits for done and reads back every descriptor word of both
// units, comparing it with the reference hash of its interest point. It also
// checks the job time: with all four accelerators kept busy the job should
// take about ceil((N_A+N_B)/4) interest point times, and for unequal counts
// clearly less than the max(N_A,N_B)/2 a fixed two-unit design would need.
// The mechanisms of the fabric are counted and each must occur: either unit
// helping the other, a job that never needs to reconfigure, an accelerator
// coupled across units, a coupling change deferred until the accelerator
// finished its interest point, a descriptor write stalled by the switch
// arbitration, and a unit with no interest points at all.
module surf_desc_top_tb;
  import surf_pkg::*;
  import surf_tb_pkg::*;

  localparam int ROWS = 32, DW = 8, LAT = 24;
  localparam int AW = $clog2(ROWS), WW = $clog2(DW);
  localparam int T_IP = LAT + DW + 6;   // cycles per interest point, plain model

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  mode_e mode;
  half_id_t [N_ACC-1:0] coupling;
  logic [N_UNITS-1:0] ip_we = '0;
  logic [N_UNITS-1:0][AW:0] ip_waddr = '0;
  ip_t  [N_UNITS-1:0] ip_wdata = '0;
  logic [N_UNITS-1:0][AW+1:0] ip_count = '0;
  logic [N_UNITS-1:0][AW+WW:0] d_raddr = '0;
  desc_word_t [N_UNITS-1:0] d_rdata;
  logic [N_ACC-1:0] acc_ip_valid, acc_ip_ready, acc_d_valid, acc_d_ready;
  ip_t  [N_ACC-1:0] acc_ip;
  desc_word_t [N_ACC-1:0] acc_d_data;
  int n_done [N_ACC];

  always #5 clk = ~clk;

  surf_desc_top #(.ROWS(ROWS), .DESC_WORDS(DW)) dut (.*);

  for (genvar a = 0; a < N_ACC; a++) begin : g_acc
    // slot 3 has random latency and output bubbles, the others are regular
    surf_acc_model #(.DESC_WORDS(DW), .LAT(LAT), .JIT(a == 3 ? 6 : 0), .GAPS(a == 3))
      u_acc (.clk, .rst_n, .ip_valid(acc_ip_valid[a]), .ip(acc_ip[a]),
             .ip_ready(acc_ip_ready[a]), .d_valid(acc_d_valid[a]), .d_data(acc_d_data[a]),
             .d_ready(acc_d_ready[a]), .n_done(n_done[a]));
  end

  int checks = 0, failures = 0;
  int n_a_helps_b = 0, n_b_helps_a = 0, n_normal = 0, n_cross = 0, n_defer = 0,
      n_stall = 0, n_empty = 0;

  ip_t pts [N_UNITS][2*ROWS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism monitors
  for (genvar a = 0; a < N_ACC; a++) begin : g_mon
    always @(posedge clk) if (rst_n && busy) begin
      if (coupling[a].unit != 1'(a >> 1)) n_cross++;
      if (dut.g_port[a].u_port.busy && coupling[a] != dut.sel_target[a]) n_defer++;
      if (acc_d_valid[a] && !acc_d_ready[a]) n_stall++;
    end
  end

  task automatic run_case(int na, int nb);
    int cycles, ideal, base, tot_before, tot_after;
    int n [N_UNITS];
    mode_e final_mode;
    n[0] = na; n[1] = nb;
    if (na == 0 || nb == 0) n_empty++;
    // load
    for (int u = 0; u < N_UNITS; u++) begin
      for (int i = 0; i < n[u]; i++) begin
        pts[u][i] = rand_ip();
        @(negedge clk);
        ip_we[u] = 1'b1; ip_waddr[u] = (AW+1)'(i); ip_wdata[u] = pts[u][i];
        @(negedge clk);
        ip_we[u] = 1'b0;
      end
      ip_count[u] = (AW+2)'(n[u]);
    end
    tot_before = n_done[0] + n_done[1] + n_done[2] + n_done[3];
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    final_mode = mode;
    check(done, $sformatf("case %0d/%0d: done seen", na, nb));
    @(negedge clk);
    check(!busy, "busy low after done");
    tot_after = n_done[0] + n_done[1] + n_done[2] + n_done[3];
    check(tot_after - tot_before == na + nb,
          $sformatf("case %0d/%0d: accelerators finished %0d points", na, nb, tot_after - tot_before));
    case (final_mode)
      MODE_A_HELPS_B: n_a_helps_b++;
      MODE_B_HELPS_A: n_b_helps_a++;
      default:        n_normal++;
    endcase
    if (na != nb && na > 1 && nb > 1)
      check(final_mode == (na < nb ? MODE_A_HELPS_B : MODE_B_HELPS_A),
            $sformatf("case %0d/%0d: smaller unit helps larger", na, nb));
    // timing
    ideal = ((na + nb + 3) / 4) * T_IP;
    base  = (((na > nb ? na : nb) + 1) / 2) * T_IP;
    check(cycles <= ideal + ideal / 8 + 2 * T_IP,
          $sformatf("case %0d/%0d: %0d cycles, ideal %0d", na, nb, cycles, ideal));
    if ((na > nb ? na - nb : nb - na) >= 8)
      check(cycles < base, $sformatf("case %0d/%0d: %0d cycles not below fixed %0d", na, nb, cycles, base));
    $display("case A=%0d B=%0d: %0d cycles (ideal %0d, fixed-unit %0d), final mode %s",
             na, nb, cycles, ideal, base, final_mode.name());
    // read back
    for (int u = 0; u < N_UNITS; u++)
      for (int i = 0; i < n[u]; i++)
        for (int w = 0; w < DW; w++) begin
          @(negedge clk);
          d_raddr[u] = {(AW+1)'(i), WW'(w)};
          @(negedge clk);
          check(d_rdata[u] == ref_desc_word(pts[u][i], w),
                $sformatf("unit %0d point %0d word %0d: %h", u, i, w, d_rdata[u]));
        end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_case(12, 12);
    run_case(40, 10);
    run_case(7, 33);
    run_case(64, 64);
    run_case(0, 9);
    run_case(5, 0);
    run_case(0, 0);
    run_case(64, 3);
    check(n_a_helps_b > 0, "mechanism: unit A helped unit B");
    check(n_b_helps_a > 0, "mechanism: unit B helped unit A");
    check(n_normal > 0,    "mechanism: job without reconfiguration");
    check(n_cross > 0,     "mechanism: accelerator coupled to the other unit");
    check(n_defer > 0,     "mechanism: coupling change deferred to end of point");
    check(n_stall > 0,     "mechanism: descriptor write stalled by arbitration");
    check(n_empty > 0,     "mechanism: unit without interest points");
    $display("mechanisms: A-helps-B %0d, B-helps-A %0d, normal %0d, cross-coupled cycles %0d, deferred %0d, stalls %0d, empty units %0d",
             n_a_helps_b, n_b_helps_a, n_normal, n_cross, n_defer, n_stall, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
