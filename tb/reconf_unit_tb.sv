// reconf_unit_tb: plays the progress flags of the four memory halves into the
// reconfiguration unit and checks the start/run/done sequence, the mode
// decision (unit A done first, unit B done first, both together) and the
// coupling it gives each accelerator in every mode.
module reconf_unit_tb;
  import surf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_HALF-1:0] exhausted = '0, complete = '0;
  logic run, done;
  mode_e mode;
  half_id_t [N_ACC-1:0] sel_target;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  reconf_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected coupling {unit, half} of accelerator a = {unit, slot}, per mode
  function automatic logic [1:0] exp_sel(mode_e m, int a);
    case (m)
      MODE_A_HELPS_B: return (a >= 2) ? 2'b10 : 2'b11;
      MODE_B_HELPS_A: return (a >= 2) ? 2'b01 : 2'b00;
      default:        return 2'(a);
    endcase
  endfunction

  task automatic check_sel(mode_e m);
    for (int a = 0; a < N_ACC; a++)
      check(sel_target[a] == exp_sel(m, a), $sformatf("mode %s acc %0d coupled to %b", m.name(), a, sel_target[a]));
  endtask

  // one job: the halves of unit `first` run dry at t1, the rest at t2
  task automatic job(logic [N_HALF-1:0] dry_first, mode_e exp_mode);
    @(negedge clk);
    exhausted = '0; complete = '0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(run && mode == MODE_NORMAL, "run, normal after start");
    check_sel(MODE_NORMAL);
    repeat (3) @(negedge clk);
    check(mode == MODE_NORMAL, "still normal while both busy");
    exhausted = dry_first;
    @(negedge clk);
    check(mode == exp_mode, $sformatf("mode %s, expected %s", mode.name(), exp_mode.name()));
    check_sel(exp_mode);
    exhausted = '1;             // everything handed out
    complete = dry_first & 4'b0101;  // some halves finished, not all
    repeat (2) @(negedge clk);
    check(mode == exp_mode && run && !done, "mode held, still running");
    complete = '1;
    @(negedge clk);
    check(!run && done, "done pulse as run falls");
    @(negedge clk);
    check(!done, "done is one cycle");
    check(mode == exp_mode, "mode kept after job");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!run && mode == MODE_NORMAL, "reset state");
    check_sel(MODE_NORMAL);
    rst_n = 1'b1;
    job(4'b0011, MODE_A_HELPS_B);
    job(4'b1100, MODE_B_HELPS_A);
    job(4'b1111, MODE_NORMAL);
    job(4'b0001, MODE_NORMAL);   // only one half of A dry: no switch yet
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
