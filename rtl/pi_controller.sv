// pi_controller: proportional-integral controller of the feedback loop.
//
// m = KP * e + (sum of e) >>> KI_SHIFT, that is KI = 2^-KI_SHIFT, built from
// an adder, a multiply by a small constant and a shift. Following the
// published scheme only the proportional and integral actions are used, with small
// constants; the values KP = 1 and KI = 1/64 are this design's choice. The
// error is sampled every cycle. The integral register saturates at
// +-(2^(INT_W-1)-1) and is cleared by clear (the reconfiguration controller
// clears it when a new configuration takes effect, so that it measures that
// configuration only). m is combinational from the present error and the
// registered integral and saturates to M_W bits.
// Anti-windup (this design's addition): while freeze_neg is high a negative
// error is not integrated, and while freeze_pos is high a positive one is
// not. The reconfiguration controller raises them when the queue is already
// at its smallest or largest mode, where the integral could otherwise grow
// without effect and delay the response once the workload changes.
module pi_controller
  import iq_pkg::*;
#(
  parameter int          KP       = 1,
  parameter int unsigned KI_SHIFT = 6,
  parameter int unsigned INT_W    = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [E_W-1:0] error,
  input  logic                  clear,
  input  logic                  freeze_pos,
  input  logic                  freeze_neg,
  output logic signed [M_W-1:0] m,
  output logic signed [INT_W-1:0] integral
);

  localparam int INT_MAX = (1 << (INT_W - 1)) - 1;
  localparam int M_MAX   = (1 << (M_W - 1)) - 1;

  int sum, mv;

  always_comb begin
    sum = int'(integral) + int'(error);
    if (sum >  INT_MAX) sum =  INT_MAX;
    if (sum < -INT_MAX) sum = -INT_MAX;
    mv = KP * int'(error) + (int'(integral) >>> KI_SHIFT);
    if (mv >  M_MAX) mv =  M_MAX;
    if (mv < -M_MAX) mv = -M_MAX;
    m = M_W'(mv);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear)
      integral <= '0;
    else if (!((freeze_pos && error > 0) || (freeze_neg && error < 0)))
      integral <= INT_W'(sum);
  end

endmodule
