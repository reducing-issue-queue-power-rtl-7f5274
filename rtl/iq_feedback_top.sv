// iq_feedback_top: power-aware issue queue under closed-loop control.
//
// The issue queue (fifo_issue_queue) is split into FIFOs whose number and
// size follow a mode; only FIFO heads are arbitrated, and in the low-power
// modes whole FIFOs are switched off. Retired instructions pass through a
// small commit buffer that releases them at the application's Commit Rate
// Target. compare_logic measures how far the buffer's occupancy is from the
// interval [C_LOW, C_HIGH], pi_controller turns that error into m(t), and
// reconfig_ctrl steps the queue one mode at a time (draining it first).
// Too little occupancy means the queue is too small, too much means power is
// being wasted on entries the application does not need.
//
// The rest of the processor connects through ports: renamed instructions
// arrive on disp_* (disp_accepted of them, in order, are taken per cycle),
// issued instructions leave on iss_*, execution results return as wakeup
// tags on wb_*, and the reorder buffer retires into the commit buffer on
// ret_* without exceeding cb_free. Instructions leave on commit_*. mode,
// active_fifos and active_entries report the configuration and the two
// activity terms of the power estimate (request/grant lines precharged,
// entries taking part in wakeup); precharge_en and wakeup_en are the
// per-entry enables behind those counts.
// Latencies: dispatch writes at the clock edge; an entry can issue in the
// cycle after it is written and after its last operand's broadcast; a
// retired instruction can leave the commit buffer the cycle after it is
// written; occupancy reaches the controller combinationally, and m(t) acts
// on the mode through reconfig_ctrl's registered state.
module iq_feedback_top
  import iq_pkg::*;
#(
  parameter int unsigned NUM_ENTRIES    = 128,
  parameter int unsigned MAX_FIFO_SIZE  = 2,
  parameter int unsigned DISPATCH_WIDTH = 8,
  parameter int unsigned ISSUE_WIDTH    = 8,
  parameter int unsigned WB_WIDTH       = 8,
  parameter int unsigned RETIRE_WIDTH   = 8,
  parameter int unsigned CB_DEPTH       = 20,
  parameter int unsigned MAX_DRAIN      = 8,
  parameter int unsigned C_LOW          = 3,
  parameter int unsigned C_HIGH         = 8,
  parameter int          KP             = 1,
  parameter int unsigned KI_SHIFT       = 6,
  parameter int          M_THRESH       = 16,
  parameter int unsigned HOLDOFF        = 256,
  localparam int unsigned NUM_MODES = $clog2(NUM_ENTRIES) + 1,
  localparam int unsigned MODE_W    = (NUM_MODES > 1) ? $clog2(NUM_MODES) : 1,
  localparam int unsigned OCC_W     = $clog2(NUM_ENTRIES + 1),
  localparam int unsigned CB_OCC_W  = $clog2(CB_DEPTH + 1),
  localparam int unsigned ACC_W     = $clog2(DISPATCH_WIDTH + 1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // dispatch
  input  logic [DISPATCH_WIDTH-1:0]            disp_valid,
  input  iq_instr_t [DISPATCH_WIDTH-1:0]       disp_instr,
  output logic [ACC_W-1:0]                     disp_accepted,
  output logic [ACC_W-1:0]                     disp_chained,
  // issue and wakeup
  output logic [ISSUE_WIDTH-1:0]               iss_valid,
  output iq_instr_t [ISSUE_WIDTH-1:0]          iss_instr,
  input  logic [WB_WIDTH-1:0]                  wb_valid,
  input  logic [WB_WIDTH-1:0][TAG_W-1:0]       wb_tag,
  // retirement into the commit buffer
  input  logic [RETIRE_WIDTH-1:0]              ret_valid,
  input  logic [RETIRE_WIDTH-1:0][ROB_W-1:0]   ret_rob,
  output logic [CB_OCC_W-1:0]                  cb_free,
  input  logic [RATE_W-1:0]                    rate_target,
  output logic [MAX_DRAIN-1:0]                 commit_valid,
  output logic [MAX_DRAIN-1:0][ROB_W-1:0]      commit_rob,
  output logic                                 target_miss,
  // feedback loop and configuration
  output logic [CB_OCC_W-1:0]                  cb_occupancy,
  output logic signed [E_W-1:0]                error,
  output logic signed [M_W-1:0]                m_out,
  output logic signed [15:0]                   pi_integral,
  output logic [MODE_W-1:0]                    mode,
  output logic                                 dispatch_hold,
  output logic                                 reconfig_pulse,
  output logic [OCC_W-1:0]                     iq_occupancy,
  output logic [OCC_W-1:0]                     active_fifos,
  output logic [OCC_W-1:0]                     active_entries,
  output logic [NUM_ENTRIES-1:0]               precharge_en,
  output logic [NUM_ENTRIES-1:0]               wakeup_en
);

  logic        iq_empty, pi_clear, at_max, at_min;

  fifo_issue_queue #(
    .NUM_ENTRIES(NUM_ENTRIES), .MAX_FIFO_SIZE(MAX_FIFO_SIZE),
    .DISPATCH_WIDTH(DISPATCH_WIDTH), .ISSUE_WIDTH(ISSUE_WIDTH), .WB_WIDTH(WB_WIDTH)
  ) u_iq (
    .clk(clk), .rst_n(rst_n), .mode(mode), .disp_enable(!dispatch_hold),
    .disp_valid(disp_valid), .disp_instr(disp_instr),
    .disp_accepted(disp_accepted), .disp_chained(disp_chained),
    .wb_valid(wb_valid), .wb_tag(wb_tag),
    .iss_valid(iss_valid), .iss_instr(iss_instr),
    .empty(iq_empty), .occupancy(iq_occupancy),
    .active_fifos(active_fifos), .active_entries(active_entries),
    .precharge_en(precharge_en), .wakeup_en(wakeup_en)
  );

  commit_buffer #(.DEPTH(CB_DEPTH), .IN_WIDTH(RETIRE_WIDTH), .MAX_DRAIN(MAX_DRAIN)) u_cb (
    .clk(clk), .rst_n(rst_n), .in_valid(ret_valid), .in_rob(ret_rob),
    .free_slots(cb_free), .rate_target(rate_target),
    .out_valid(commit_valid), .out_rob(commit_rob),
    .occupancy(cb_occupancy), .target_miss(target_miss)
  );

  compare_logic #(.C_LOW(C_LOW), .C_HIGH(C_HIGH), .OCC_W(CB_OCC_W)) u_cmp (
    .occupancy(cb_occupancy), .error(error)
  );

  pi_controller #(.KP(KP), .KI_SHIFT(KI_SHIFT), .INT_W(16)) u_pi (
    .clk(clk), .rst_n(rst_n), .error(error), .clear(pi_clear),
    .freeze_pos(at_max), .freeze_neg(at_min),
    .m(m_out), .integral(pi_integral)
  );

  reconfig_ctrl #(.NUM_MODES(NUM_MODES), .M_THRESH(M_THRESH), .HOLDOFF(HOLDOFF)) u_rc (
    .clk(clk), .rst_n(rst_n), .m(m_out), .iq_empty(iq_empty),
    .mode(mode), .dispatch_hold(dispatch_hold), .pi_clear(pi_clear),
    .reconfig_pulse(reconfig_pulse), .at_max(at_max), .at_min(at_min)
  );

endmodule
