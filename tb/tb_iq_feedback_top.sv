// tb_iq_feedback_top: end-to-end run of the closed loop at its default size
// (128-entry queue, 8-wide dispatch/issue/retire, 20-entry commit buffer,
// interval [3, 8]).
//
// Around the design sit behavioural models of the rest of the processor: a
// front end that renames a synthetic instruction stream with register
// dependencies, execution units that broadcast results after 1, 3, 12 or 150
// cycles, and a 512-entry reorder buffer that retires in order into the
// commit buffer. The run has three phases:
//   A  target 0.5 instructions/cycle, plenty of parallelism: the buffer
//      overfills and the controller walks the queue down through both stages;
//   B  target 2.0: the buffer runs dry, targets are missed and the queue is
//      grown again;
//   C  target 0.33 with long dependence chains and 150-cycle loads;
// then the stream stops and everything drains.
// Checked every cycle: no instruction issues before its operands were
// broadcast, every instruction issues once, instructions leave the commit
// buffer in program order, mode changes are single steps taken while the
// queue is empty, dispatch is stopped during a drain, the queue geometry
// matches the mode, and e(t) matches the interval rule. At the end every
// dispatched instruction must have left the buffer, and each mechanism
// (stage-one and stage-two downsizing, upsizing, the smallest mode, target
// misses, a full commit buffer, dispatch stalls, chained placement, drain
// holds, full-width issue) must have happened. It prints the share of time
// per mode and the estimated wakeup/arbitration power against the full queue.
module tb_iq_feedback_top;
  import iq_pkg::*;
  localparam int DW = 8, IW = 8, WB = 8, RW = 8, MD = 8, NE = 128, NMODES = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] disp_valid = '0;
  iq_instr_t [DW-1:0] disp_instr;
  logic [3:0] disp_accepted, disp_chained;
  logic [IW-1:0] iss_valid;
  iq_instr_t [IW-1:0] iss_instr;
  logic [WB-1:0] wb_valid = '0;
  logic [WB-1:0][TAG_W-1:0] wb_tag;
  logic [RW-1:0] ret_valid = '0;
  logic [RW-1:0][ROB_W-1:0] ret_rob;
  logic [4:0] cb_free, cb_occupancy;
  logic [RATE_W-1:0] rate_target = 12'h080;
  logic [MD-1:0] commit_valid;
  logic [MD-1:0][ROB_W-1:0] commit_rob;
  logic target_miss, dispatch_hold, reconfig_pulse;
  logic signed [E_W-1:0] error;
  logic signed [M_W-1:0] m_out;
  logic signed [15:0] pi_integral;
  logic [2:0] mode;
  logic [7:0] iq_occupancy, active_fifos, active_entries;
  logic [NE-1:0] precharge_en, wakeup_en;

  iq_feedback_top dut (
    .clk(clk), .rst_n(rst_n),
    .disp_valid(disp_valid), .disp_instr(disp_instr), .disp_accepted(disp_accepted),
    .disp_chained(disp_chained), .iss_valid(iss_valid), .iss_instr(iss_instr),
    .wb_valid(wb_valid), .wb_tag(wb_tag), .ret_valid(ret_valid), .ret_rob(ret_rob),
    .cb_free(cb_free), .rate_target(rate_target), .commit_valid(commit_valid),
    .commit_rob(commit_rob), .target_miss(target_miss), .cb_occupancy(cb_occupancy),
    .error(error), .m_out(m_out), .pi_integral(pi_integral), .mode(mode), .dispatch_hold(dispatch_hold),
    .reconfig_pulse(reconfig_pulse), .iq_occupancy(iq_occupancy),
    .active_fifos(active_fifos), .active_entries(active_entries),
    .precharge_en(precharge_en), .wakeup_en(wakeup_en));

  always #5 clk = ~clk;

  localparam int MAX_CYCLES = 60000;
  initial begin
    repeat (MAX_CYCLES + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- models ----
  iq_instr_t window[$];
  bit   ready [1024];
  bit   done  [512];
  bit   issued[512];
  int   rob_q[$];
  int   ex_tag[$], ex_dv[$], ex_rob[$], ex_cnt[$];
  int   recent[$];
  int   next_tag, next_rob, expect_commit, n_dispatched, n_committed;
  int   phase;
  // coverage and statistics
  int   n_down1 = 0, n_down2 = 0, n_up = 0, n_min_mode = 0, n_miss = 0, n_cb_full = 0;
  int   n_stall = 0, n_chained = 0, n_hold = 0, n_full_issue = 0, n_due = 0;
  longint mode_cycles[NMODES];
  longint arb_sum = 0, wake_sum = 0, cyc = 0;

  function automatic void fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endfunction

  function automatic int pick_latency();
    int r;
    r = $urandom % 100;
    if (phase == 2) return (r < 55) ? 1 : (r < 75) ? 3 : (r < 92) ? 12 : 150;
    return (r < 80) ? 1 : (r < 95) ? 3 : 12;
  endfunction

  task automatic gen_instr();
    iq_instr_t x;
    int dep_pct;
    dep_pct = (phase == 2) ? 90 : 25;
    x.dest = TAG_W'(next_tag);
    x.dest_valid = ($urandom % 10) != 0;
    x.src1 = (recent.size() > 0 && ($urandom % 100) < dep_pct) ? TAG_W'(recent[$]) : TAG_W'((next_tag + 700) % 1024);
    x.src2 = (recent.size() > 1 && ($urandom % 100) < dep_pct / 3) ? TAG_W'(recent[$urandom % recent.size()])
                                                                  : TAG_W'((next_tag + 700) % 1024);
    x.src1_rdy = 1'b0; x.src2_rdy = 1'b0;
    x.rob = ROB_W'(next_rob);
    if (x.dest_valid) begin
      ready[next_tag] = 1'b0;
      recent.push_back(next_tag);
      if (recent.size() > 4) void'(recent.pop_front());
    end
    next_tag = (next_tag + 1) % 1024;
    next_rob = (next_rob + 1) % 512;
    window.push_back(x);
  endtask

  initial begin
    int k, nvalid, cyc_in_phase, prev_mode, exp_e, nr, occ_i;
    bit feeding;
    for (int i = 0; i < 1024; i++) ready[i] = 1'b1;
    for (int i = 0; i < NMODES; i++) mode_cycles[i] = 0;
    next_tag = 0; next_rob = 0; expect_commit = 0; n_dispatched = 0; n_committed = 0;
    phase = 0; feeding = 1; cyc_in_phase = 0; prev_mode = 0;
    disp_instr = '0; wb_tag = '0; ret_rob = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < MAX_CYCLES; t++) begin
      @(negedge clk);
      cyc_in_phase++;
      if (phase == 0 && cyc_in_phase == 12000) begin phase = 1; cyc_in_phase = 0; rate_target = 12'h200; end
      if (phase == 1 && cyc_in_phase == 8000)  begin phase = 2; cyc_in_phase = 0; rate_target = 12'h055; end
      if (phase == 2 && cyc_in_phase == 12000) begin phase = 3; cyc_in_phase = 0; feeding = 0; end
      if (phase == 3 && window.size() == 0 && rob_q.size() == 0 && int'(cb_occupancy) == 0) break;
      // execution results: broadcast up to WB tags whose latency has elapsed
      wb_valid = '0; k = 0;
      for (int j = 0; j < ex_tag.size(); j++)
        if (ex_cnt[j] <= 0 && ex_cnt[j] > -1000) begin
          if (ex_dv[j] != 0) begin
            if (k < WB) begin
              wb_valid[k] = 1'b1; wb_tag[k] = TAG_W'(ex_tag[j]); k++;
              ex_cnt[j] = -1000;
            end
          end else ex_cnt[j] = -1000;
        end
      // dispatch group (ROB capacity 512)
      if (feeding) while (window.size() < DW && rob_q.size() + window.size() < 500) gen_instr();
      disp_valid = '0;
      nvalid = 0;
      for (int i = 0; i < DW; i++) begin
        if (i < window.size()) begin
          disp_valid[i] = 1'b1; nvalid++;
          disp_instr[i] = window[i];
          disp_instr[i].src1_rdy = ready[window[i].src1];
          disp_instr[i].src2_rdy = ready[window[i].src2];
        end else disp_instr[i] = '0;
      end
      // retirement into the commit buffer, in order, at most cb_free
      ret_valid = '0; nr = 0;
      while (nr < RW && nr < int'(cb_free) && nr < rob_q.size() && done[rob_q[nr]]) begin
        ret_valid[nr] = 1'b1; ret_rob[nr] = ROB_W'(rob_q[nr]); nr++;
      end
      #1;
      // ---- checks on this cycle ----
      cyc++;
      mode_cycles[mode]++;
      arb_sum += active_fifos; wake_sum += active_entries;
      checks += 5;
      if ($countones(precharge_en) != int'(active_fifos)) fail($sformatf("t=%0d precharge_en count", t));
      if ($countones(wakeup_en) != int'(active_entries)) fail($sformatf("t=%0d wakeup_en count", t));
      if (int'(active_fifos) != (NE >> mode)) fail($sformatf("t=%0d active_fifos=%0d mode=%0d", t, active_fifos, mode));
      if (int'(active_entries) != ((mode == 0) ? NE : 2 * (NE >> mode)))
        fail($sformatf("t=%0d active_entries=%0d mode=%0d", t, active_entries, mode));
      occ_i = int'(cb_occupancy);
      exp_e = (occ_i < 3) ? 3 - occ_i : (occ_i > 8) ? 8 - occ_i : 0;
      if (int'(error) != exp_e) fail($sformatf("t=%0d e=%0d exp %0d", t, error, exp_e));
      if (int'(mode) != prev_mode) begin
        checks += 2;
        if (!(int'(mode) == prev_mode + 1 || int'(mode) == prev_mode - 1))
          fail($sformatf("t=%0d mode jumped %0d -> %0d", t, prev_mode, mode));
        if (int'(iq_occupancy) != 0) fail($sformatf("t=%0d mode changed with %0d held", t, iq_occupancy));
        if (int'(mode) > prev_mode && prev_mode == 0) n_down1++;
        else if (int'(mode) > prev_mode) n_down2++;
        else n_up++;
        $display("cycle %0d: mode %0d -> %0d (%0d FIFOs), rate target %0.2f", t, prev_mode, mode,
                 active_fifos, real'(rate_target) / 256.0);
        prev_mode = int'(mode);
      end
      if (int'(mode) == NMODES - 1) n_min_mode++;
      if (dispatch_hold) begin
        n_hold++;
        checks++;
        if (disp_accepted != 0) fail($sformatf("t=%0d dispatch during drain", t));
      end else if (int'(disp_accepted) < nvalid) n_stall++;
      n_chained += int'(disp_chained);
      if (target_miss) n_miss++;
      if (cb_free == 0) n_cb_full++;
      if (iss_valid == '1) n_full_issue++;
      for (int j = 0; j < IW; j++) if (iss_valid[j]) begin
        checks += 2;
        if (!(ready[iss_instr[j].src1] && ready[iss_instr[j].src2]))
          fail($sformatf("t=%0d rob %0d issued before its operands", t, iss_instr[j].rob));
        if (issued[iss_instr[j].rob]) fail($sformatf("t=%0d rob %0d issued twice", t, iss_instr[j].rob));
        issued[iss_instr[j].rob] = 1'b1;
        ex_tag.push_back(int'(iss_instr[j].dest)); ex_dv.push_back(int'(iss_instr[j].dest_valid));
        ex_rob.push_back(int'(iss_instr[j].rob)); ex_cnt.push_back(pick_latency());
      end
      for (int j = 0; j < MD; j++) if (commit_valid[j]) begin
        checks++;
        if (int'(commit_rob[j]) != expect_commit)
          fail($sformatf("t=%0d committed rob %0d, expected %0d", t, commit_rob[j], expect_commit));
        expect_commit = (expect_commit + 1) % 512;
        n_committed++;
      end
      // ---- model update for the coming edge ----
      for (int i = 0; i < int'(disp_accepted); i++) begin
        iq_instr_t x;
        x = window.pop_front();
        rob_q.push_back(int'(x.rob));
        done[x.rob] = 1'b0; issued[x.rob] = 1'b0;
        n_dispatched++;
      end
      for (int i = 0; i < nr; i++) void'(rob_q.pop_front());
      for (int w = 0; w < WB; w++) if (wb_valid[w]) ready[wb_tag[w]] = 1'b1;
      for (int j = ex_tag.size() - 1; j >= 0; j--) begin
        if (ex_cnt[j] == -1000) begin
          done[ex_rob[j]] = 1'b1;
          ex_tag.delete(j); ex_dv.delete(j); ex_rob.delete(j); ex_cnt.delete(j);
        end else ex_cnt[j]--;
      end
      // re-issued issue flags are cleared at dispatch; ready of issued dests cleared at rename
      @(posedge clk);
    end
    // ---- end of run ----
    checks += 2;
    if (n_committed != n_dispatched) fail($sformatf("dispatched %0d but committed %0d", n_dispatched, n_committed));
    if (phase != 3) fail("run did not reach the drain phase");
    begin
      string names[10] = '{"stage-one downsize", "stage-two downsize", "upsize", "smallest mode",
                           "target miss", "commit buffer full", "dispatch stall", "chained placement",
                           "drain hold", "full-width issue"};
      int cnts[10];
      cnts = '{n_down1, n_down2, n_up, n_min_mode, n_miss, n_cb_full, n_stall, n_chained, n_hold, n_full_issue};
      for (int i = 0; i < 10; i++) begin
        checks++;
        $display("  %-20s %0d", names[i], cnts[i]);
        if (cnts[i] == 0) fail($sformatf("mechanism never exercised: %s", names[i]));
      end
    end
    for (int i = 0; i < NMODES; i++)
      $display("  mode %0d (%0d x %0d): %0.1f%% of cycles", i, NE >> i, (i == 0) ? 1 : 2,
               100.0 * real'(mode_cycles[i]) / real'(cyc));
    $display("  instructions %0d, target misses in %0.2f%% of cycles", n_committed, 100.0 * real'(n_miss) / real'(cyc));
    $display("  wakeup/arbitration power vs full queue: DISTR1 %0.1f%%, DISTR2 %0.1f%% saved",
             100.0 * (1.0 - (0.5 * real'(wake_sum) + 0.5 * real'(arb_sum)) / (real'(NE) * real'(cyc))),
             100.0 * (1.0 - (0.7 * real'(wake_sum) + 0.3 * real'(arb_sum)) / (real'(NE) * real'(cyc))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
