// fifo_issue_queue: issue queue split into FIFOs whose number and size are
// set by a mode, so that only FIFO heads take part in arbitration.
//
// Storage is NUM_ENTRIES entries. In mode m there are NUM_ENTRIES>>m FIFOs of
// S = 2^min(m, log2 MAX_FIFO_SIZE) entries; FIFO f owns entries f*S..f*S+S-1
// and is a small circular buffer (head pointer and fill count). Mode 0 is the
// conventional queue, every entry its own FIFO and every entry visible to the
// arbiter; higher modes expose only the heads (stage one) and then switch off
// whole FIFOs (stage two). The partitioning, head-only arbitration and
// disabling of whole FIFOs follow the published scheme; the entry layout is this
// design's own.
//
// Each cycle:
//  * dispatch: dep_steer places up to DISPATCH_WIDTH renamed instructions,
//    in order, behind a pending producer or into an empty FIFO;
//    disp_accepted says how many were taken. disp_enable low stops dispatch.
//  * wakeup: WB_WIDTH result tags are compared with the source tags of the
//    entries of active FIFOs only; a match sets the ready bit at the clock
//    edge. A tag broadcast in the cycle an instruction is written is caught
//    as well.
//  * issue: a FIFO whose head has both operands ready requests; head_arbiter
//    grants up to ISSUE_WIDTH; granted heads appear on iss_* in the same
//    cycle (combinationally from registered state) and are popped at the edge.
// The mode input may change only while the queue is empty (checked by an
// assertion); the reconfiguration controller drains the queue first.
// precharge_en marks the entries whose request and grant lines are
// precharged this cycle (the head slot of each active FIFO; all others are
// inhibited), and wakeup_en the entries whose tag comparators are enabled
// (those of active FIFOs). active_fifos and active_entries are their counts,
// the two terms of the power estimate.
module fifo_issue_queue
  import iq_pkg::*;
#(
  parameter int unsigned NUM_ENTRIES    = 128,
  parameter int unsigned MAX_FIFO_SIZE  = 2,
  parameter int unsigned DISPATCH_WIDTH = 8,
  parameter int unsigned ISSUE_WIDTH    = 8,
  parameter int unsigned WB_WIDTH       = 8,
  localparam int unsigned ENT_LOG2  = $clog2(NUM_ENTRIES),
  localparam int unsigned SZ_LOG2   = $clog2(MAX_FIFO_SIZE),
  localparam int unsigned MODE_W    = (ENT_LOG2 > 0) ? $clog2(ENT_LOG2 + 1) : 1,
  localparam int unsigned FIDX_W    = (NUM_ENTRIES > 1) ? ENT_LOG2 : 1,
  localparam int unsigned CNT_W     = $clog2(MAX_FIFO_SIZE + 1),
  localparam int unsigned HP_W      = (SZ_LOG2 > 0) ? SZ_LOG2 : 1,
  localparam int unsigned OCC_W     = $clog2(NUM_ENTRIES + 1),
  localparam int unsigned ACC_W     = $clog2(DISPATCH_WIDTH + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [MODE_W-1:0]                  mode,
  input  logic                               disp_enable,
  input  logic [DISPATCH_WIDTH-1:0]          disp_valid,
  input  iq_instr_t [DISPATCH_WIDTH-1:0]     disp_instr,
  output logic [ACC_W-1:0]                   disp_accepted,
  output logic [ACC_W-1:0]                   disp_chained,
  input  logic [WB_WIDTH-1:0]                wb_valid,
  input  logic [WB_WIDTH-1:0][TAG_W-1:0]     wb_tag,
  output logic [ISSUE_WIDTH-1:0]             iss_valid,
  output iq_instr_t [ISSUE_WIDTH-1:0]        iss_instr,
  output logic                               empty,
  output logic [OCC_W-1:0]                   occupancy,
  output logic [OCC_W-1:0]                   active_fifos,
  output logic [OCC_W-1:0]                   active_entries,
  output logic [NUM_ENTRIES-1:0]             precharge_en,
  output logic [NUM_ENTRIES-1:0]             wakeup_en
);

  iq_instr_t                          ent [NUM_ENTRIES];
  logic [NUM_ENTRIES-1:0][CNT_W-1:0]  cnt;
  logic [NUM_ENTRIES-1:0][HP_W-1:0]   head;

  // ---- mode geometry ----
  int unsigned fl2, sl2;
  logic [OCC_W-1:0]  num_fifos;
  logic [CNT_W-1:0]  fifo_size;
  logic [HP_W-1:0]   size_mask;

  always_comb begin
    fl2       = mode_fifos_log2(int'(mode), ENT_LOG2);
    sl2       = mode_size_log2(int'(mode), SZ_LOG2);
    num_fifos = OCC_W'(1 << fl2);
    fifo_size = CNT_W'(1 << sl2);
    size_mask = HP_W'((1 << sl2) - 1);
  end

  assign active_fifos   = num_fifos;
  assign active_entries = OCC_W'(1 << (fl2 + sl2));

  // ---- head and tail positions ----
  logic [NUM_ENTRIES-1:0][FIDX_W-1:0] hidx, tidx;
  logic [NUM_ENTRIES-1:0]             req;
  logic [NUM_ENTRIES-1:0][TAG_W-1:0]  tail_dest;
  logic [NUM_ENTRIES-1:0]             tail_dv;

  always_comb begin
    for (int f = 0; f < NUM_ENTRIES; f++) begin
      hidx[f] = FIDX_W'((f << sl2) | int'(HP_W'(head[f] & size_mask)));
      tidx[f] = FIDX_W'((f << sl2) | int'(HP_W'(HP_W'(head[f] + HP_W'(cnt[f]) - 1'b1) & size_mask)));
      req[f]  = (f < int'(num_fifos)) && (cnt[f] != '0) &&
                ent[hidx[f]].src1_rdy && ent[hidx[f]].src2_rdy;
      tail_dest[f] = ent[tidx[f]].dest;
      tail_dv[f]   = ent[tidx[f]].dest_valid;
    end
  end

  // ---- request/grant precharge and wakeup enables ----
  always_comb begin
    precharge_en = '0;
    for (int f = 0; f < NUM_ENTRIES; f++)
      if (f < int'(num_fifos)) precharge_en[hidx[f]] = 1'b1;
    for (int e = 0; e < NUM_ENTRIES; e++) wakeup_en[e] = (e < int'(active_entries));
  end

  // ---- select ----
  logic [NUM_ENTRIES-1:0]              grant;
  logic [ISSUE_WIDTH-1:0][FIDX_W-1:0]  gnt_idx;

  head_arbiter #(.NUM_REQ(NUM_ENTRIES), .ISSUE_WIDTH(ISSUE_WIDTH)) u_arb (
    .req(req), .grant(grant), .gnt_valid(iss_valid), .gnt_idx(gnt_idx)
  );

  always_comb begin
    for (int k = 0; k < ISSUE_WIDTH; k++) iss_instr[k] = ent[hidx[gnt_idx[k]]];
  end

  // ---- dispatch steering ----
  logic [DISPATCH_WIDTH-1:0]             slot_ok, slot_chained;
  logic [DISPATCH_WIDTH-1:0][FIDX_W-1:0] slot_fifo;
  logic [DISPATCH_WIDTH-1:0][CNT_W-1:0]  slot_pos;

  dep_steer #(.NUM_ENTRIES(NUM_ENTRIES), .MAX_FIFO_SIZE(MAX_FIFO_SIZE),
              .DISPATCH_WIDTH(DISPATCH_WIDTH)) u_steer (
    .num_fifos(num_fifos), .fifo_size(fifo_size), .enable(disp_enable),
    .fifo_cnt(cnt), .tail_dest(tail_dest), .tail_dv(tail_dv),
    .disp_valid(disp_valid), .disp_instr(disp_instr),
    .slot_ok(slot_ok), .slot_fifo(slot_fifo), .slot_pos(slot_pos),
    .slot_chained(slot_chained), .accepted(disp_accepted)
  );

  always_comb begin
    disp_chained = '0;
    for (int i = 0; i < DISPATCH_WIDTH; i++)
      if (slot_ok[i] && slot_chained[i]) disp_chained = disp_chained + 1'b1;
  end

  // write position of each placed slot, and FIFO fill increments
  logic [DISPATCH_WIDTH-1:0][FIDX_W-1:0] widx;
  logic [NUM_ENTRIES-1:0][CNT_W-1:0]     added;
  iq_instr_t [DISPATCH_WIDTH-1:0]        wdata;

  always_comb begin
    added = '0;
    for (int i = 0; i < DISPATCH_WIDTH; i++) begin
      widx[i] = FIDX_W'((int'(slot_fifo[i]) << sl2) |
                int'(HP_W'(HP_W'(head[slot_fifo[i]] + HP_W'(slot_pos[i])) & size_mask)));
      wdata[i] = disp_instr[i];
      for (int w = 0; w < WB_WIDTH; w++) begin
        if (wb_valid[w] && wb_tag[w] == disp_instr[i].src1) wdata[i].src1_rdy = 1'b1;
        if (wb_valid[w] && wb_tag[w] == disp_instr[i].src2) wdata[i].src2_rdy = 1'b1;
      end
      if (slot_ok[i]) added[slot_fifo[i]] = added[slot_fifo[i]] + 1'b1;
    end
  end

  // ---- state ----
  always_ff @(posedge clk) begin
    // wakeup in active entries only
    for (int e = 0; e < NUM_ENTRIES; e++) begin
      if (wakeup_en[e]) begin
        for (int w = 0; w < WB_WIDTH; w++) begin
          if (wb_valid[w] && wb_tag[w] == ent[e].src1) ent[e].src1_rdy <= 1'b1;
          if (wb_valid[w] && wb_tag[w] == ent[e].src2) ent[e].src2_rdy <= 1'b1;
        end
      end
    end
    for (int i = 0; i < DISPATCH_WIDTH; i++)
      if (slot_ok[i]) ent[widx[i]] <= wdata[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      head <= '0;
    end else begin
      for (int f = 0; f < NUM_ENTRIES; f++) begin
        cnt[f]  <= cnt[f] - CNT_W'(grant[f]) + added[f];
        head[f] <= head[f] + HP_W'(grant[f]);
      end
    end
  end

  always_comb begin
    occupancy = '0;
    for (int f = 0; f < NUM_ENTRIES; f++) occupancy = occupancy + OCC_W'(cnt[f]);
  end
  assign empty = (occupancy == '0);

  // the geometry may change only while nothing is stored
  logic [MODE_W-1:0] mode_q;
  always_ff @(posedge clk) mode_q <= mode;
  a_mode_change_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                        (mode != mode_q) |-> empty)
    else $error("issue queue mode changed while instructions were held");

endmodule
