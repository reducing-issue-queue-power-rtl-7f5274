// tb_fifo_issue_queue: runs a 16-entry queue (4-wide dispatch, 2-wide issue,
// 4 wakeup ports) through every mode, from sixteen 1-entry FIFOs to one
// 2-entry FIFO, with a random dependent instruction stream and an execution
// model that broadcasts results after 1 to 4 cycles. Between modes dispatch
// stops until the queue is empty, as the reconfiguration controller does.
// A cycle-accurate reference model kept here (one queue per FIFO, placement
// by the steering rule, lowest-index-first select of ready heads, wakeup by
// tag) predicts every cycle's accepted count, chained count, issued
// instructions, occupancy and active counts; all are compared. It also
// checks that no instruction issues before its sources were broadcast, and
// that exactly one slot of each active FIFO has its request/grant lines
// precharged and only entries of active FIFOs have wakeup enabled.
module tb_fifo_issue_queue;
  import iq_pkg::*;
  localparam int N = 16, MS = 2, DW = 4, IW = 2, WB = 4, NM = 5;
  int checks = 0, failures = 0;
  int n_chained = 0, n_stall = 0, n_full_issue = 0, n_modes = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] mode = '0;
  logic disp_enable = 1'b1;
  logic [DW-1:0] disp_valid = '0;
  iq_instr_t [DW-1:0] disp_instr;
  logic [2:0] disp_accepted, disp_chained;
  logic [WB-1:0] wb_valid = '0;
  logic [WB-1:0][TAG_W-1:0] wb_tag;
  logic [IW-1:0] iss_valid;
  iq_instr_t [IW-1:0] iss_instr;
  logic empty;
  logic [4:0] occupancy, active_fifos, active_entries;
  logic [N-1:0] precharge_en, wakeup_en;

  fifo_issue_queue #(.NUM_ENTRIES(N), .MAX_FIFO_SIZE(MS), .DISPATCH_WIDTH(DW),
                     .ISSUE_WIDTH(IW), .WB_WIDTH(WB)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .disp_enable(disp_enable),
    .disp_valid(disp_valid), .disp_instr(disp_instr), .disp_accepted(disp_accepted),
    .disp_chained(disp_chained), .wb_valid(wb_valid), .wb_tag(wb_tag),
    .iss_valid(iss_valid), .iss_instr(iss_instr), .empty(empty), .occupancy(occupancy),
    .active_fifos(active_fifos), .active_entries(active_entries),
    .precharge_en(precharge_en), .wakeup_en(wakeup_en));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  iq_instr_t q [N][$];
  iq_instr_t window[$];
  bit        ready [1024];
  int        exec_tag[$], exec_cnt[$];
  int        recent[$];
  int        next_tag, next_rob;

  function automatic void fail(string s);
    failures++;
    $display("FAIL %s", s);
  endfunction

  task automatic gen_instr();
    iq_instr_t x;
    x.dest = TAG_W'(next_tag);
    x.dest_valid = ($urandom % 8) != 0;
    x.src1 = (recent.size() > 0 && ($urandom % 3) != 0) ? TAG_W'(recent[$urandom % recent.size()])
                                                        : TAG_W'((next_tag + 600) % 1024);
    x.src2 = (recent.size() > 0 && ($urandom % 3) == 0) ? TAG_W'(recent[$urandom % recent.size()])
                                                        : TAG_W'((next_tag + 600) % 1024);
    x.src1_rdy = 1'b0; x.src2_rdy = 1'b0;
    x.rob = ROB_W'(next_rob);
    if (x.dest_valid) begin
      ready[next_tag] = 1'b0;
      recent.push_back(next_tag);
      if (recent.size() > 6) void'(recent.pop_front());
    end
    next_tag = (next_tag + 1) % 1024;
    next_rob = (next_rob + 1) % 512;
    window.push_back(x);
  endtask

  initial begin
    int F, S, md, phase_t, occ, e_acc, e_ch, nreq, k, sel;
    bit dispatching, blocked, fd;
    int cnt_w[N]; int tdest_w[N]; bit tdv_w[N];
    int slot_f[DW];
    iq_instr_t e_iss[IW]; int e_issf[IW]; int e_n;
    for (int i = 0; i < 1024; i++) ready[i] = 1'b1;
    next_tag = 0; next_rob = 0;
    md = 0; phase_t = 0; dispatching = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12000; t++) begin
      @(negedge clk);
      F = N >> md; S = (md == 0) ? 1 : 2;
      // phase control: dispatch for 300 cycles, then drain, then next mode
      phase_t++;
      if (dispatching && phase_t >= 300) dispatching = 0;
      occ = 0;
      for (int f = 0; f < N; f++) occ += q[f].size();
      if (!dispatching && occ == 0 && window.size() == 0) begin
        md = (md + 1 + (($urandom % 3 == 0) ? 1 : 0)) % NM;
        mode = 3'(md); n_modes++;
        F = N >> md; S = (md == 0) ? 1 : 2;
        dispatching = 1; phase_t = 0;
      end
      // wakeup broadcasts of this cycle
      wb_valid = '0;
      k = 0;
      for (int j = 0; j < exec_tag.size(); j++)
        if (exec_cnt[j] <= 0 && k < WB) begin
          wb_valid[k] = 1'b1; wb_tag[k] = TAG_W'(exec_tag[j]); exec_cnt[j] = 1000; k++;
        end
      // dispatch group
      if (dispatching) while (window.size() < DW) gen_instr();
      disp_valid = '0;
      for (int i = 0; i < DW; i++) begin
        if (i < window.size()) begin
          disp_valid[i] = 1'b1;
          disp_instr[i] = window[i];
          disp_instr[i].src1_rdy = ready[window[i].src1];
          disp_instr[i].src2_rdy = ready[window[i].src2];
        end else disp_instr[i] = '0;
      end
      #1;
      // ---- expected select ----
      e_n = 0; nreq = 0;
      for (int f = 0; f < F; f++)
        if (q[f].size() > 0 && q[f][0].src1_rdy && q[f][0].src2_rdy) begin
          nreq++;
          if (e_n < IW) begin e_iss[e_n] = q[f][0]; e_issf[e_n] = f; e_n++; end
        end
      if (nreq > IW) n_full_issue++;
      for (int j = 0; j < IW; j++) begin
        checks++;
        if (iss_valid[j] != (j < e_n)) fail($sformatf("t=%0d iss_valid[%0d]=%0d exp %0d", t, j, iss_valid[j], j < e_n));
        else if (j < e_n && iss_instr[j] != e_iss[j]) fail($sformatf("t=%0d iss_instr[%0d] rob=%0d exp %0d", t, j, iss_instr[j].rob, e_iss[j].rob));
        if (iss_valid[j] && !(ready[iss_instr[j].src1] && ready[iss_instr[j].src2]))
          fail($sformatf("t=%0d issued before operands broadcast", t));
      end
      // ---- expected steering ----
      for (int f = 0; f < N; f++) begin
        cnt_w[f] = q[f].size();
        tdest_w[f] = (q[f].size() > 0) ? int'(q[f][$].dest) : -1;
        tdv_w[f] = (q[f].size() > 0) ? q[f][$].dest_valid : 1'b0;
      end
      blocked = 0; e_acc = 0; e_ch = 0;
      for (int i = 0; i < DW; i++) begin
        sel = -1; fd = 0;
        for (int f = 0; f < F && sel < 0; f++)
          if (cnt_w[f] > 0 && cnt_w[f] < S && tdv_w[f] &&
              ((!disp_instr[i].src1_rdy && tdest_w[f] == int'(disp_instr[i].src1)) ||
               (!disp_instr[i].src2_rdy && tdest_w[f] == int'(disp_instr[i].src2)))) begin
            sel = f; fd = 1;
          end
        for (int f = 0; f < F && sel < 0; f++) if (cnt_w[f] == 0) sel = f;
        if (!disp_valid[i] || sel < 0) blocked = 1;
        slot_f[i] = blocked ? -1 : sel;
        if (!blocked) begin
          cnt_w[sel]++; tdest_w[sel] = int'(disp_instr[i].dest); tdv_w[sel] = disp_instr[i].dest_valid;
          e_acc++; if (fd) e_ch++;
        end
      end
      if (e_acc < int'($countones(disp_valid))) n_stall++;
      n_chained += e_ch;
      checks += 5;
      if (int'(disp_accepted) != e_acc) fail($sformatf("t=%0d accepted=%0d exp %0d", t, disp_accepted, e_acc));
      if (int'(disp_chained) != e_ch) fail($sformatf("t=%0d chained=%0d exp %0d", t, disp_chained, e_ch));
      if (int'(occupancy) != occ || empty != (occ == 0)) fail($sformatf("t=%0d occupancy=%0d exp %0d", t, occupancy, occ));
      if (int'(active_fifos) != F) fail($sformatf("t=%0d active_fifos=%0d exp %0d", t, active_fifos, F));
      if (int'(active_entries) != F * S) fail($sformatf("t=%0d active_entries=%0d exp %0d", t, active_entries, F*S));
      // one precharged head slot inside each active FIFO, none elsewhere;
      // wakeup enabled exactly on the entries of active FIFOs
      for (int f = 0; f < N; f++) begin
        int hits;
        hits = 0;
        for (int e = 0; e < N; e++) if (precharge_en[e] && e / S == f) hits++;
        checks++;
        if (hits != ((f < F) ? 1 : 0)) fail($sformatf("t=%0d FIFO %0d has %0d precharged slots", t, f, hits));
      end
      for (int e = 0; e < N; e++) begin
        checks++;
        if (wakeup_en[e] != (e < F * S)) fail($sformatf("t=%0d wakeup_en[%0d]", t, e));
      end
      // ---- model update (the edge that follows) ----
      for (int f = 0; f < N; f++)
        for (int j = 0; j < q[f].size(); j++)
          for (int w = 0; w < WB; w++) if (wb_valid[w]) begin
            if (wb_tag[w] == q[f][j].src1) q[f][j].src1_rdy = 1'b1;
            if (wb_tag[w] == q[f][j].src2) q[f][j].src2_rdy = 1'b1;
          end
      for (int j = 0; j < e_n; j++) begin
        void'(q[e_issf[j]].pop_front());
        if (e_iss[j].dest_valid) begin exec_tag.push_back(int'(e_iss[j].dest)); exec_cnt.push_back(1 + $urandom % 4); end
      end
      for (int i = 0; i < DW; i++) if (slot_f[i] >= 0) begin
        iq_instr_t x;
        x = disp_instr[i];
        for (int w = 0; w < WB; w++) if (wb_valid[w]) begin
          if (wb_tag[w] == x.src1) x.src1_rdy = 1'b1;
          if (wb_tag[w] == x.src2) x.src2_rdy = 1'b1;
        end
        q[slot_f[i]].push_back(x);
      end
      for (int i = 0; i < e_acc; i++) void'(window.pop_front());
      for (int w = 0; w < WB; w++) if (wb_valid[w]) ready[wb_tag[w]] = 1'b1;
      for (int j = exec_tag.size() - 1; j >= 0; j--)
        if (exec_cnt[j] == 1000) begin exec_tag.delete(j); exec_cnt.delete(j); end
        else exec_cnt[j]--;
      @(posedge clk);
    end
    checks++;
    if (n_chained == 0 || n_stall == 0 || n_full_issue == 0 || n_modes < NM) begin
      fail($sformatf("coverage chained=%0d stalls=%0d full_issue=%0d modes=%0d", n_chained, n_stall, n_full_issue, n_modes));
    end
    $display("chained=%0d stall_cycles=%0d issue_limited=%0d mode_changes=%0d", n_chained, n_stall, n_full_issue, n_modes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
