// rate_target_run: one closed-loop run used by tb_rate_targets. Wraps
// iq_feedback_top (NE entries) with behavioural models of the rest of the
// processor: a front end producing a renamed instruction stream in which
// about 30% of instructions depend on the previous result, execution with
// latencies of 1, 3, 12 and 150 cycles (80%, 15%, 4.5%, 0.5%), and an in-order 512-entry reorder
// buffer retiring into the commit buffer. The Commit Rate Target is fixed at
// RATE (Q4.8). After CYCLES cycles the stream stops and the pipeline drains.
// Checks operand readiness at issue, single issue, program-order release and
// that everything dispatched is released; reports mode residency, the share
// of cycles with a target miss, the instructions per cycle the stream
// delivered and the estimated wakeup/arbitration power.
module rate_target_run
  import iq_pkg::*;
#(
  parameter int unsigned NE     = 128,
  parameter int unsigned RATE   = 128,
  parameter int unsigned CYCLES = 20000,
  parameter int unsigned MISS_PERMIL = 0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output real  miss_pct,
  output real  save_d1,
  output real  save_d2,
  output real  low_mode_pct,
  output real  ipc
);
  localparam int W = 8;
  localparam int NMODES = $clog2(NE) + 1;
  logic [W-1:0] disp_valid;
  iq_instr_t [W-1:0] disp_instr;
  logic [3:0] disp_accepted, disp_chained;
  logic [W-1:0] iss_valid;
  iq_instr_t [W-1:0] iss_instr;
  logic [W-1:0] wb_valid;
  logic [W-1:0][TAG_W-1:0] wb_tag;
  logic [W-1:0] ret_valid;
  logic [W-1:0][ROB_W-1:0] ret_rob;
  logic [4:0] cb_free, cb_occupancy;
  logic [W-1:0] commit_valid;
  logic [W-1:0][ROB_W-1:0] commit_rob;
  logic target_miss, dispatch_hold, reconfig_pulse;
  logic signed [E_W-1:0] error;
  logic signed [M_W-1:0] m_out;
  logic signed [15:0] pi_integral;
  logic [$clog2(NMODES)-1:0] mode;
  logic [$clog2(NE+1)-1:0] iq_occupancy, active_fifos, active_entries;
  logic [NE-1:0] precharge_en, wakeup_en;

  iq_feedback_top #(.NUM_ENTRIES(NE)) dut (
    .clk(clk), .rst_n(rst_n),
    .disp_valid(disp_valid), .disp_instr(disp_instr), .disp_accepted(disp_accepted),
    .disp_chained(disp_chained), .iss_valid(iss_valid), .iss_instr(iss_instr),
    .wb_valid(wb_valid), .wb_tag(wb_tag), .ret_valid(ret_valid), .ret_rob(ret_rob),
    .cb_free(cb_free), .rate_target(RATE_W'(RATE)), .commit_valid(commit_valid),
    .commit_rob(commit_rob), .target_miss(target_miss), .cb_occupancy(cb_occupancy),
    .error(error), .m_out(m_out), .pi_integral(pi_integral), .mode(mode), .dispatch_hold(dispatch_hold),
    .reconfig_pulse(reconfig_pulse), .iq_occupancy(iq_occupancy),
    .active_fifos(active_fifos), .active_entries(active_entries),
    .precharge_en(precharge_en), .wakeup_en(wakeup_en));

  iq_instr_t window[$];
  bit ready [1024];
  bit done [512];
  bit issued [512];
  int rob_q[$];
  int ex_tag[$], ex_dv[$], ex_rob[$], ex_cnt[$];
  int last_dest;

  task automatic gen_instr(ref int next_tag, ref int next_rob);
    iq_instr_t x;
    x.dest = TAG_W'(next_tag);
    x.dest_valid = ($urandom % 10) != 0;
    x.src1 = (last_dest >= 0 && ($urandom % 100) < 30) ? TAG_W'(last_dest) : TAG_W'((next_tag + 700) % 1024);
    x.src2 = TAG_W'((next_tag + 700) % 1024);
    x.src1_rdy = 1'b0; x.src2_rdy = 1'b0;
    x.rob = ROB_W'(next_rob);
    if (x.dest_valid) begin ready[next_tag] = 1'b0; last_dest = next_tag; end
    next_tag = (next_tag + 1) % 1024;
    next_rob = (next_rob + 1) % 512;
    window.push_back(x);
  endtask

  function automatic int pick_latency();
    int r;
    r = $urandom % 1000;
    return (r < MISS_PERMIL) ? 150 : (r < 800) ? 1 : (r < 970) ? 3 : 12;
  endfunction

  initial begin
    int next_tag, next_rob, expect_commit, n_disp, n_comm, k, nr, n_miss;
    longint arb_sum, wake_sum, cyc, low_cyc;
    bit feeding;
    finished = 0; checks = 0; failures = 0;
    disp_valid = '0; disp_instr = '0; wb_valid = '0; wb_tag = '0; ret_valid = '0; ret_rob = '0;
    for (int i = 0; i < 1024; i++) ready[i] = 1'b1;
    next_tag = 0; next_rob = 0; expect_commit = 0; n_disp = 0; n_comm = 0; n_miss = 0;
    arb_sum = 0; wake_sum = 0; cyc = 0; low_cyc = 0; last_dest = -1; feeding = 1;
    @(posedge rst_n);
    for (int t = 0; t < CYCLES + 5000; t++) begin
      @(negedge clk);
      if (t == CYCLES) feeding = 0;
      if (!feeding && window.size() == 0 && rob_q.size() == 0 && cb_occupancy == 0) break;
      wb_valid = '0; k = 0;
      for (int j = 0; j < ex_tag.size(); j++)
        if (ex_cnt[j] <= 0 && ex_cnt[j] > -1000) begin
          if (ex_dv[j] == 0) ex_cnt[j] = -1000;
          else if (k < W) begin wb_valid[k] = 1'b1; wb_tag[k] = TAG_W'(ex_tag[j]); k++; ex_cnt[j] = -1000; end
        end
      if (feeding) while (window.size() < W && rob_q.size() + window.size() < 500) gen_instr(next_tag, next_rob);
      disp_valid = '0;
      for (int i = 0; i < W; i++) begin
        if (i < window.size()) begin
          disp_valid[i] = 1'b1;
          disp_instr[i] = window[i];
          disp_instr[i].src1_rdy = ready[window[i].src1];
          disp_instr[i].src2_rdy = ready[window[i].src2];
        end else disp_instr[i] = '0;
      end
      ret_valid = '0; nr = 0;
      while (nr < W && nr < int'(cb_free) && nr < rob_q.size() && done[rob_q[nr]]) begin
        ret_valid[nr] = 1'b1; ret_rob[nr] = ROB_W'(rob_q[nr]); nr++;
      end
      #1;
      if (feeding) begin
        cyc++;
        arb_sum += active_fifos; wake_sum += active_entries;
        if (int'(mode) >= NMODES - 2) low_cyc++;
        if (target_miss) n_miss++;
      end
      for (int j = 0; j < W; j++) if (iss_valid[j]) begin
        checks += 2;
        if (!(ready[iss_instr[j].src1] && ready[iss_instr[j].src2])) begin
          failures++; $display("FAIL NE=%0d rate=%0d: rob %0d issued early", NE, RATE, iss_instr[j].rob);
        end
        if (issued[iss_instr[j].rob]) begin
          failures++; $display("FAIL NE=%0d rate=%0d: rob %0d issued twice", NE, RATE, iss_instr[j].rob);
        end
        issued[iss_instr[j].rob] = 1'b1;
        ex_tag.push_back(int'(iss_instr[j].dest)); ex_dv.push_back(int'(iss_instr[j].dest_valid));
        ex_rob.push_back(int'(iss_instr[j].rob)); ex_cnt.push_back(pick_latency());
      end
      for (int j = 0; j < W; j++) if (commit_valid[j]) begin
        checks++;
        if (int'(commit_rob[j]) != expect_commit) begin
          failures++; $display("FAIL NE=%0d rate=%0d: released rob %0d, expected %0d", NE, RATE, commit_rob[j], expect_commit);
        end
        expect_commit = (expect_commit + 1) % 512;
        n_comm++;
      end
      for (int i = 0; i < int'(disp_accepted); i++) begin
        iq_instr_t x;
        x = window.pop_front();
        rob_q.push_back(int'(x.rob));
        done[x.rob] = 1'b0; issued[x.rob] = 1'b0;
        n_disp++;
      end
      for (int i = 0; i < nr; i++) void'(rob_q.pop_front());
      for (int w = 0; w < W; w++) if (wb_valid[w]) ready[wb_tag[w]] = 1'b1;
      for (int j = ex_tag.size() - 1; j >= 0; j--) begin
        if (ex_cnt[j] == -1000) begin
          done[ex_rob[j]] = 1'b1;
          ex_tag.delete(j); ex_dv.delete(j); ex_rob.delete(j); ex_cnt.delete(j);
        end else ex_cnt[j]--;
      end
    end
    checks++;
    if (n_comm != n_disp || n_disp == 0) begin
      failures++; $display("FAIL NE=%0d rate=%0d: dispatched %0d, released %0d", NE, RATE, n_disp, n_comm);
    end
    miss_pct     = 100.0 * real'(n_miss) / real'(cyc);
    low_mode_pct = 100.0 * real'(low_cyc) / real'(cyc);
    save_d1 = 100.0 * (1.0 - (0.5 * real'(wake_sum) + 0.5 * real'(arb_sum)) / (real'(NE) * real'(cyc)));
    save_d2 = 100.0 * (1.0 - (0.7 * real'(wake_sum) + 0.3 * real'(arb_sum)) / (real'(NE) * real'(cyc)));
    ipc = real'(n_disp) / real'(cyc);
    finished = 1;
  end
endmodule
