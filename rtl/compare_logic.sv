// compare_logic: error term of the feedback loop.
//
// The set-point is an occupancy interval [C_LOW, C_HIGH] for the commit
// buffer. Below the interval the queue has too few resources and the error
// is C_LOW - occupancy (positive); above it the queue has more than needed
// and the error is C_HIGH - occupancy (negative); inside it the error is
// zero. This is the published scheme's rule and its interval [3, 8].
// Purely combinational; error is a two's-complement number of E_W bits.
module compare_logic
  import iq_pkg::*;
#(
  parameter int unsigned C_LOW  = 3,
  parameter int unsigned C_HIGH = 8,
  parameter int unsigned OCC_W  = 5
) (
  input  logic [OCC_W-1:0]     occupancy,
  output logic signed [E_W-1:0] error
);

  always_comb begin
    if (int'(occupancy) < C_LOW)
      error = E_W'(signed'(C_LOW) - int'(occupancy));
    else if (int'(occupancy) > C_HIGH)
      error = E_W'(signed'(C_HIGH) - int'(occupancy));
    else
      error = '0;
  end

endmodule
