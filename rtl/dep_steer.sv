// dep_steer: dependency-based FIFO placement for one dispatch group.
//
// Each dispatch slot, in program order, is given a FIFO of the current mode:
//   1. a FIFO whose tail instruction produces one of the slot's pending
//      (not yet ready) source operands and which still has room, so the
//      dependent waits behind its producer and stays out of arbitration;
//   2. otherwise an empty FIFO;
//   3. otherwise the slot, and every slot after it, stalls this cycle.
// Placing dependents behind their producers is the published scheme's rule; the
// empty-FIFO fallback, the in-order stall and lowest-index choice come from
// the dependence-FIFO scheme it builds on and are this design's choices.
// Slots are processed one after another on a working copy of the FIFO fill
// and tail tags, so a slot can chain behind an earlier slot of the same group.
//
// Purely combinational. Inputs are the registered FIFO state of the queue;
// outputs say, per slot, whether it is placed, in which FIFO, at which
// position from the head (the fill before it arrives), and whether it was
// chained behind its producer.
module dep_steer
  import iq_pkg::*;
#(
  parameter int unsigned NUM_ENTRIES    = 128,
  parameter int unsigned MAX_FIFO_SIZE  = 2,
  parameter int unsigned DISPATCH_WIDTH = 8,
  localparam int unsigned FIDX_W = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1,
  localparam int unsigned CNT_W  = $clog2(MAX_FIFO_SIZE + 1),
  localparam int unsigned ACC_W  = $clog2(DISPATCH_WIDTH + 1)
) (
  input  logic [$clog2(NUM_ENTRIES+1)-1:0]   num_fifos,   // FIFOs in the current mode
  input  logic [CNT_W-1:0]                   fifo_size,   // entries per FIFO
  input  logic                               enable,
  input  logic [NUM_ENTRIES-1:0][CNT_W-1:0]  fifo_cnt,
  input  logic [NUM_ENTRIES-1:0][TAG_W-1:0]  tail_dest,
  input  logic [NUM_ENTRIES-1:0]             tail_dv,
  input  logic [DISPATCH_WIDTH-1:0]          disp_valid,
  input  iq_instr_t [DISPATCH_WIDTH-1:0]     disp_instr,
  output logic [DISPATCH_WIDTH-1:0]          slot_ok,
  output logic [DISPATCH_WIDTH-1:0][FIDX_W-1:0] slot_fifo,
  output logic [DISPATCH_WIDTH-1:0][CNT_W-1:0]  slot_pos,
  output logic [DISPATCH_WIDTH-1:0]          slot_chained,
  output logic [ACC_W-1:0]                   accepted
);

  logic [NUM_ENTRIES-1:0][CNT_W-1:0] cnt_w;
  logic [NUM_ENTRIES-1:0][TAG_W-1:0] tdest_w;
  logic [NUM_ENTRIES-1:0]            tdv_w;
  logic                              blocked;
  logic                              found_dep, found_empty;
  logic [FIDX_W-1:0]                 dep_f, empty_f, sel;

  always_comb begin
    cnt_w    = fifo_cnt;
    tdest_w  = tail_dest;
    tdv_w    = tail_dv;
    blocked  = !enable;
    accepted = '0;
    slot_ok      = '0;
    slot_fifo    = '0;
    slot_pos     = '0;
    slot_chained = '0;
    found_dep = 1'b0; found_empty = 1'b0;
    dep_f = '0; empty_f = '0; sel = '0;
    for (int i = 0; i < DISPATCH_WIDTH; i++) begin
      found_dep   = 1'b0;
      found_empty = 1'b0;
      dep_f       = '0;
      empty_f     = '0;
      for (int f = 0; f < NUM_ENTRIES; f++) begin
        if (f < int'(num_fifos)) begin
          if (!found_dep && cnt_w[f] != '0 && cnt_w[f] < fifo_size && tdv_w[f] &&
              ((!disp_instr[i].src1_rdy && tdest_w[f] == disp_instr[i].src1) ||
               (!disp_instr[i].src2_rdy && tdest_w[f] == disp_instr[i].src2))) begin
            found_dep = 1'b1;
            dep_f     = FIDX_W'(f);
          end
          if (!found_empty && cnt_w[f] == '0) begin
            found_empty = 1'b1;
            empty_f     = FIDX_W'(f);
          end
        end
      end
      sel = found_dep ? dep_f : empty_f;
      if (!disp_valid[i] || !(found_dep || found_empty)) blocked = 1'b1;
      if (!blocked) begin
        slot_ok[i]      = 1'b1;
        slot_fifo[i]    = sel;
        slot_pos[i]     = cnt_w[sel];
        slot_chained[i] = found_dep;
        cnt_w[sel]      = cnt_w[sel] + 1'b1;
        tdest_w[sel]    = disp_instr[i].dest;
        tdv_w[sel]      = disp_instr[i].dest_valid;
        accepted        = accepted + 1'b1;
      end
    end
  end

endmodule
