// reconfig_ctrl: turns the controller output into issue queue mode changes.
//
// Modes are ordered from most to fewest resources (0 = conventional queue,
// NUM_MODES-1 = a single FIFO of the maximum size); see iq_pkg. When m is at
// least M_THRESH the queue is short of resources and moves one mode down;
// when m is at most -M_THRESH it has more than it needs and moves one mode
// up. Steps are single modes, so the queue walks the hybrid scheme: first
// fewer, larger FIFOs with all entries on, then fewer FIFOs.
// A change is made in two phases: DRAIN holds dispatch (dispatch_hold) until
// the issue queue is empty, then the new mode is taken, the controller's
// integral is cleared (pi_clear) and reconfig_pulse is raised for one cycle.
// For HOLDOFF cycles after a change no new change starts, so the loop sees
// the effect of one step before deciding the next. Threshold, drain and
// hold-off are this design's choices; the published scheme leaves open how m(t) is
// turned into a configuration. at_max and at_min tell the PI controller that
// the queue is at its largest or smallest mode (used for anti-windup).
module reconfig_ctrl
  import iq_pkg::*;
#(
  parameter int unsigned NUM_MODES = 8,
  parameter int          M_THRESH  = 16,
  parameter int unsigned HOLDOFF   = 256,
  localparam int unsigned MODE_W = (NUM_MODES > 1) ? $clog2(NUM_MODES) : 1,
  localparam int unsigned HO_W   = $clog2(HOLDOFF + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [M_W-1:0] m,
  input  logic                  iq_empty,
  output logic [MODE_W-1:0]     mode,
  output logic                  dispatch_hold,
  output logic                  pi_clear,
  output logic                  reconfig_pulse,
  output logic                  at_max,
  output logic                  at_min
);

  typedef enum logic {ST_RUN, ST_DRAIN} state_t;

  state_t             state;
  logic [MODE_W-1:0]  target;
  logic [HO_W-1:0]    holdoff;
  logic               want_up, want_down;

  always_comb begin
    want_up   = (int'(m) >=  M_THRESH) && (mode != '0);
    want_down = (int'(m) <= -M_THRESH) && (int'(mode) != NUM_MODES - 1);
  end

  assign dispatch_hold = (state == ST_DRAIN);
  assign at_max        = (mode == '0);
  assign at_min        = (int'(mode) == NUM_MODES - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= ST_RUN;
      mode           <= '0;
      target         <= '0;
      holdoff        <= '0;
      pi_clear       <= 1'b0;
      reconfig_pulse <= 1'b0;
    end else begin
      pi_clear       <= 1'b0;
      reconfig_pulse <= 1'b0;
      if (holdoff != '0) holdoff <= holdoff - 1'b1;
      case (state)
        ST_RUN: begin
          if (holdoff == '0 && (want_up || want_down)) begin
            target <= want_up ? mode - 1'b1 : mode + 1'b1;
            state  <= ST_DRAIN;
          end
        end
        ST_DRAIN: begin
          if (iq_empty) begin
            mode           <= target;
            pi_clear       <= 1'b1;
            reconfig_pulse <= 1'b1;
            holdoff        <= HO_W'(HOLDOFF);
            state          <= ST_RUN;
          end
        end
        default: state <= ST_RUN;
      endcase
    end
  end

endmodule
