// tb_rate_targets: runs the closed loop at each Commit Rate Target used for
// the multimedia benchmarks (0.33, 0.5, 1 and 2 instructions per cycle), once
// with a 128-entry and once with a 32-entry base queue, eight runs side by
// side on one synthetic instruction stream model (see rate_target_run).
// Every run must pass its own functional checks. For each run it prints the
// share of cycles with a target miss, the share spent in the two smallest
// modes and the estimated wakeup/arbitration power saved against the full
// queue under a 50/50 (DISTR1) and a 70/30 (DISTR2) wakeup/arbitration
// split. The loop must save power at the lowest target (0.33) in both sizes,
// and save more at 0.33 than at 2.
module tb_rate_targets;
  localparam int NRUN = 8;
  localparam int CYC  = 20000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NRUN-1:0] fin;
  int  ck [NRUN], fl [NRUN];
  real miss [NRUN], d1 [NRUN], d2 [NRUN], low [NRUN], ipc [NRUN];
  localparam int RATES [4] = '{85, 128, 256, 512};

  always #5 clk = ~clk;

  for (genvar g = 0; g < NRUN; g++) begin : g_run
    rate_target_run #(.NE((g < 4) ? 128 : 32), .RATE(RATES[g % 4]), .CYCLES(CYC)) u_run (
      .clk(clk), .rst_n(rst_n), .finished(fin[g]), .checks(ck[g]), .failures(fl[g]),
      .miss_pct(miss[g]), .save_d1(d1[g]), .save_d2(d2[g]), .low_mode_pct(low[g]), .ipc(ipc[g]));
  end

  initial begin
    repeat (CYC + 30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin == '1);
    $display("entries  target  IPC    miss%%   low-mode%%  DISTR1 saved  DISTR2 saved");
    for (int g = 0; g < NRUN; g++) begin
      checks += ck[g];
      failures += fl[g];
      $display("%7d  %6.2f  %5.2f  %5.2f   %8.1f  %11.1f%%  %11.1f%%", (g < 4) ? 128 : 32,
               real'(RATES[g % 4]) / 256.0, ipc[g], miss[g], low[g], d1[g], d2[g]);
    end
    checks += 3;
    if (!(d1[0] > 0.0)) begin failures++; $display("FAIL 128 entries, target 0.33: no power saved"); end
    if (!(d1[4] > 0.0)) begin failures++; $display("FAIL 32 entries, target 0.33: no power saved"); end
    if (!(d1[0] > d1[3])) begin failures++; $display("FAIL saving at 0.33 not above saving at 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
