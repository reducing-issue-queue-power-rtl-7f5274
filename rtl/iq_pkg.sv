// iq_pkg: types and constants shared by the power-aware issue queue and its
// feedback loop.
//
// Instructions travel as iq_instr_t: a destination tag and two source tags,
// each source with a ready bit, plus the reorder-buffer index that follows
// the instruction to retirement. Tag and index widths are this design's
// choice: a 512-entry reorder buffer needs 9 index bits, and 1024 physical
// tags leave room for every instruction in flight.
//
// Issue queue modes follow the two-stage ("hybrid") resizing scheme. Mode 0
// is the conventional queue, NUM_ENTRIES one-entry FIFOs. Each step up halves
// the number of FIFOs. While the FIFO size is below its maximum, each step
// also doubles the size, so the whole queue stays active (stage one); once
// the size has reached the maximum, a step only disables half the FIFOs
// (stage two). For 128 entries and size 2 the modes are
// 128x1, 64x2, 32x2, 16x2, 8x2, 4x2, 2x2, 1x2.
package iq_pkg;

  localparam int unsigned TAG_W      = 10;  // physical register tag
  localparam int unsigned ROB_W      = 9;   // reorder-buffer index
  localparam int unsigned RATE_W     = 12;  // commit rate target, Q4.8
  localparam int unsigned RATE_FRAC  = 8;
  localparam int unsigned E_W        = 8;   // signed error e(t)
  localparam int unsigned M_W        = 16;  // signed controller output m(t)

  typedef struct packed {
    logic [TAG_W-1:0] dest;
    logic             dest_valid;
    logic [TAG_W-1:0] src1;
    logic             src1_rdy;
    logic [TAG_W-1:0] src2;
    logic             src2_rdy;
    logic [ROB_W-1:0] rob;
  } iq_instr_t;

  // log2 of the number of FIFOs in a mode
  function automatic int unsigned mode_fifos_log2(int unsigned mode,
                                                  int unsigned entries_log2);
    return entries_log2 - mode;
  endfunction

  // log2 of the FIFO size in a mode
  function automatic int unsigned mode_size_log2(int unsigned mode,
                                                 int unsigned max_size_log2);
    return (mode < max_size_log2) ? mode : max_size_log2;
  endfunction

endpackage
