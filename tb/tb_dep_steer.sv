// tb_dep_steer: random FIFO fill and tail tags for every mode geometry of a
// 32-entry queue, with random dispatch groups whose sources often name a
// FIFO tail or an earlier slot of the same group. A reference placement,
// computed here with queues, gives for each slot: chained behind a pending
// producer at a tail with room, else the lowest empty FIFO, else stall of
// this and later slots. Slot results and the accepted count are compared.
module tb_dep_steer;
  import iq_pkg::*;
  localparam int N = 32, MS = 2, DW = 8;
  int checks = 0, failures = 0, chained = 0, stalls = 0;
  logic [5:0] num_fifos;
  logic [1:0] fifo_size;
  logic enable;
  logic [N-1:0][1:0] cnt;
  logic [N-1:0][TAG_W-1:0] tdest;
  logic [N-1:0] tdv;
  logic [DW-1:0] dv;
  iq_instr_t [DW-1:0] di;
  logic [DW-1:0] ok, ch;
  logic [DW-1:0][4:0] sf;
  logic [DW-1:0][1:0] sp;
  logic [3:0] acc;

  dep_steer #(.NUM_ENTRIES(N), .MAX_FIFO_SIZE(MS), .DISPATCH_WIDTH(DW)) dut (
    .num_fifos(num_fifos), .fifo_size(fifo_size), .enable(enable), .fifo_cnt(cnt),
    .tail_dest(tdest), .tail_dv(tdv), .disp_valid(dv), .disp_instr(di),
    .slot_ok(ok), .slot_fifo(sf), .slot_pos(sp), .slot_chained(ch), .accepted(acc));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int md, F, S, nvalid, e_acc, sel, pend;
    int c[N]; int td[N]; bit tv[N];
    bit blocked, fd;
    for (int t = 0; t < 4000; t++) begin
      md = t % 6;
      F = N >> md; S = (md == 0) ? 1 : 2;
      num_fifos = 6'(F); fifo_size = 2'(S);
      enable = (t % 50) != 7;
      for (int f = 0; f < N; f++) begin
        cnt[f]   = (f < F) ? 2'($urandom % (S + 1)) : 2'd0;
        tdest[f] = TAG_W'($urandom % 64);
        tdv[f]   = ($urandom % 8) != 0;
      end
      nvalid = $urandom % (DW + 1);
      for (int i = 0; i < DW; i++) begin
        dv[i] = i < nvalid;
        di[i].dest = TAG_W'(64 + t % 16 * 8 + i);
        di[i].dest_valid = 1'b1;
        di[i].src1 = (($urandom % 3) == 0 && i > 0) ? di[i-1].dest : TAG_W'($urandom % 64);
        di[i].src2 = TAG_W'($urandom % 64);
        di[i].src1_rdy = ($urandom % 4) == 0;
        di[i].src2_rdy = ($urandom % 2) == 0;
        di[i].rob = ROB_W'(i);
      end
      #1;
      // reference
      for (int f = 0; f < N; f++) begin c[f] = cnt[f]; td[f] = tdest[f]; tv[f] = tdv[f]; end
      blocked = !enable; e_acc = 0;
      for (int i = 0; i < DW; i++) begin
        int exp_f; bit exp_ok, exp_ch; int exp_pos;
        exp_ok = 0; exp_ch = 0; exp_f = 0; exp_pos = 0;
        fd = 0; sel = -1;
        for (int f = 0; f < F && sel < 0; f++)
          if (c[f] > 0 && c[f] < S && tv[f] &&
              ((!di[i].src1_rdy && td[f] == di[i].src1) || (!di[i].src2_rdy && td[f] == di[i].src2))) begin
            sel = f; fd = 1;
          end
        for (int f = 0; f < F && sel < 0; f++) if (c[f] == 0) sel = f;
        if (!dv[i] || sel < 0) blocked = 1;
        if (!blocked) begin
          exp_ok = 1; exp_ch = fd; exp_f = sel; exp_pos = c[sel];
          c[sel]++; td[sel] = di[i].dest; tv[sel] = di[i].dest_valid; e_acc++;
          if (fd) chained++;
        end else if (dv[i] && enable) stalls++;
        checks++;
        if (ok[i] != exp_ok || (exp_ok && (ch[i] != exp_ch || int'(sf[i]) != exp_f || int'(sp[i]) != exp_pos))) begin
          failures++;
          $display("FAIL t=%0d slot %0d ok=%0d/%0d fifo=%0d/%0d pos=%0d/%0d ch=%0d/%0d",
                   t, i, ok[i], exp_ok, sf[i], exp_f, sp[i], exp_pos, ch[i], exp_ch);
        end
      end
      checks++;
      if (int'(acc) != e_acc) begin failures++; $display("FAIL t=%0d accepted=%0d exp=%0d", t, acc, e_acc); end
    end
    checks++;
    if (chained == 0 || stalls == 0) begin failures++; $display("FAIL chained=%0d stalls=%0d", chained, stalls); end
    $display("chained=%0d stalled_slots=%0d", chained, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
