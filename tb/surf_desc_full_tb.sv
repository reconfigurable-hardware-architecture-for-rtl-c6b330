// surf_desc_full_tb: the fabric at its full size (4096 interest points per
// memory half, 64-word descriptors) running the seven image pairs of the
// evaluation: image A with 4796 interest points against image B with 4796,
// 2420, 1594, 1204, 958, 503 and 241.
//
// Every job loads both units, runs to done, and reads back and checks every
// descriptor word of both images. The accelerator models take LAT cycles
// per point, far less than a real SURF accelerator (about 900k cycles at the
// reported 3.99 ns clock), so the job times are
// compared as ratios: the 1:1 job, which needs no reconfiguration, gives the
// time per interest point of a unit, and from it the time a fixed
// (non-reconfigurable) pair of units would need, max(N_A, N_B)/2 points. The
// measured saving against that is checked to lie within 2 percentage points
// of the expected (N_A - N_B) / (2 N_A): 0, 24.77, 33.36, 37.44, 40.00,
// 44.71 and 47.45 %.
module surf_desc_full_tb;
  import surf_pkg::*;
  import surf_tb_pkg::*;

  localparam int ROWS = DEF_ROWS, DW = DEF_DESC_WORDS, LAT = 4000;
  localparam int AW = $clog2(ROWS), WW = $clog2(DW);
  localparam int NA = 4796;
  localparam int NCASE = 7;
  localparam int NB [NCASE] = '{4796, 2420, 1594, 1204, 958, 503, 241};
  localparam real SAVE_PCT [NCASE] = '{0.0, 24.77, 33.36, 37.44, 40.00, 44.71, 47.45};

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

  surf_desc_top dut (.*);

  for (genvar a = 0; a < N_ACC; a++) begin : g_acc
    surf_acc_model #(.DESC_WORDS(DW), .LAT(LAT)) u_acc (
      .clk, .rst_n, .ip_valid(acc_ip_valid[a]), .ip(acc_ip[a]), .ip_ready(acc_ip_ready[a]),
      .d_valid(acc_d_valid[a]), .d_data(acc_d_data[a]), .d_ready(acc_d_ready[a]),
      .n_done(n_done[a]));
  end

  int checks = 0, failures = 0, word_errs = 0;
  int n_switch = 0, n_normal = 0;
  ip_t pts [N_UNITS][2*ROWS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_job(int na, int nb, output int cycles);
    int n [N_UNITS];
    n[0] = na; n[1] = nb;
    for (int i = 0; i < (na > nb ? na : nb); i++) begin
      @(negedge clk);
      for (int u = 0; u < N_UNITS; u++) begin
        ip_we[u] = i < n[u];
        ip_waddr[u] = (AW+1)'(i);
        if (i < n[u]) begin pts[u][i] = rand_ip(); ip_wdata[u] = pts[u][i]; end
      end
    end
    @(negedge clk);
    ip_we = '0;
    ip_count[0] = (AW+2)'(na); ip_count[1] = (AW+2)'(nb);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 30_000_000) begin
      @(negedge clk);
      cycles++;
    end
    check(done, $sformatf("job %0d/%0d done", na, nb));
    if (mode == MODE_NORMAL) n_normal++; else n_switch++;
    // read back every word of both images
    for (int u = 0; u < N_UNITS; u++)
      for (int i = 0; i < n[u]; i++)
        for (int w = 0; w < DW; w++) begin
          d_raddr[u] = {(AW+1)'(i), WW'(w)};
          @(negedge clk);
          if (d_rdata[u] != ref_desc_word(pts[u][i], w)) begin
            word_errs++;
            if (word_errs < 10) $display("FAIL: unit %0d point %0d word %0d", u, i, w);
          end
        end
    check(word_errs == 0, $sformatf("job %0d/%0d descriptors: %0d wrong words", na, nb, word_errs));
  endtask

  initial begin
    int cyc, cyc11;
    real t_ip, base, save;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCASE; c++) begin
      run_job(NA, NB[c], cyc);
      if (c == 0) begin
        cyc11 = cyc;
        t_ip = real'(cyc) / (NA / 2.0);   // one unit's time per interest point pair slot
      end
      base = t_ip * ((NA > NB[c] ? NA : NB[c]) / 2.0);
      save = 100.0 * (1.0 - real'(cyc) / base);
      $display("A=%0d B=%0d ratio 1:%0.2f  cycles %0d  fixed-pair %0.0f  saving %0.2f%% (expected %0.2f%%)  mode %s",
               NA, NB[c], real'(NB[c]) / NA, cyc, base, save, SAVE_PCT[c], mode.name());
      check(save > SAVE_PCT[c] - 2.0 && save < SAVE_PCT[c] + 2.0,
            $sformatf("saving %0.2f%% vs %0.2f%%", save, SAVE_PCT[c]));
    end
    check(n_switch == NCASE - 1 && n_normal == 1, "reconfigured in every unequal job only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
