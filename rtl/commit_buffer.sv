// commit_buffer: small in-order buffer between retirement and the real-time
// consumer, drained at the Commit Rate Target.
//
// Retired instructions (up to IN_WIDTH per cycle, valid bits contiguous from
// slot 0) are appended in program order; the reorder buffer must not retire
// more than free_slots in a cycle. Instructions leave at the rate given by
// rate_target, an unsigned fixed-point number with RATE_FRAC fraction bits
// (0.5 = 8'h80). A phase accumulator adds rate_target every cycle; its
// integer carry is the number of instructions due this cycle, so a rate of
// 0.33 releases one instruction roughly every third cycle and a rate of 2
// releases two every cycle. If fewer instructions are held than are due,
// target_miss is raised for that cycle and whatever is held leaves; the
// shortfall is not owed later. Only instructions held at the start of the
// cycle can leave. The buffer, its size, the drain at the target rate and
// the miss rule are the published scheme's; the accumulator, the back-pressure and
// the no-debt rule are this design's choices.
//
// occupancy is the registered fill, the quantity the feedback loop controls.
module commit_buffer
  import iq_pkg::*;
#(
  parameter int unsigned DEPTH     = 20,
  parameter int unsigned IN_WIDTH  = 8,
  parameter int unsigned MAX_DRAIN = 8,
  localparam int unsigned OCC_W = $clog2(DEPTH + 1),
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [IN_WIDTH-1:0]               in_valid,
  input  logic [IN_WIDTH-1:0][ROB_W-1:0]    in_rob,
  output logic [OCC_W-1:0]                  free_slots,
  input  logic [RATE_W-1:0]                 rate_target,
  output logic [MAX_DRAIN-1:0]              out_valid,
  output logic [MAX_DRAIN-1:0][ROB_W-1:0]   out_rob,
  output logic [OCC_W-1:0]                  occupancy,
  output logic                              target_miss
);

  logic [ROB_W-1:0]     mem [DEPTH];
  logic [PTR_W-1:0]     rd_ptr, wr_ptr;
  logic [OCC_W-1:0]     occ;
  logic [RATE_FRAC-1:0] phase;

  function automatic logic [PTR_W-1:0] wrap(int unsigned a);
    return PTR_W'((a >= DEPTH) ? a - DEPTH : a);
  endfunction

  // ---- drain ----
  logic [RATE_W:0]  acc;
  int unsigned      due, drain, n_in;

  always_comb begin
    acc   = {1'b0, rate_target} + (RATE_W+1)'(phase);
    due   = int'(acc[RATE_W:RATE_FRAC]);
    if (due > MAX_DRAIN) due = MAX_DRAIN;
    target_miss = (due > int'(occ));
    drain = target_miss ? int'(occ) : due;
    for (int k = 0; k < MAX_DRAIN; k++) begin
      out_valid[k] = (k < drain);
      out_rob[k]   = mem[wrap(int'(rd_ptr) + k)];
    end
    n_in = 0;
    for (int k = 0; k < IN_WIDTH; k++) if (in_valid[k]) n_in = n_in + 1;
  end

  assign occupancy  = occ;
  assign free_slots = OCC_W'(DEPTH) - occ;

  always_ff @(posedge clk) begin
    for (int k = 0; k < IN_WIDTH; k++)
      if (in_valid[k]) mem[wrap(int'(wr_ptr) + k)] <= in_rob[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      occ    <= '0;
      phase  <= '0;
    end else begin
      phase  <= acc[RATE_FRAC-1:0];
      rd_ptr <= wrap(int'(rd_ptr) + drain);
      wr_ptr <= wrap(int'(wr_ptr) + n_in);
      occ    <= OCC_W'(int'(occ) + n_in - drain);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  $countones(in_valid) <= int'(free_slots))
    else $error("commit buffer written beyond free_slots");
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
                                 ((in_valid + 1'b1) & in_valid) == '0)
    else $error("commit buffer input valid bits not contiguous from slot 0");

endmodule
