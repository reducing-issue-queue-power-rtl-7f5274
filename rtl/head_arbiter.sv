// head_arbiter: issue select over the FIFO heads.
//
// Only the head instruction of each active FIFO drives a request line; this
// arbiter grants up to ISSUE_WIDTH of them per cycle. The policy is fixed
// priority, lowest FIFO index first, which is this design's choice (the
// published scheme does not name a selection policy). Grants are also reported as
// a list: slot k carries the k-th granted FIFO index.
//
// Purely combinational; the queue registers the result.
module head_arbiter #(
  parameter int unsigned NUM_REQ     = 128,
  parameter int unsigned ISSUE_WIDTH = 8,
  localparam int unsigned IDX_W = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1
) (
  input  logic [NUM_REQ-1:0]                  req,
  output logic [NUM_REQ-1:0]                  grant,
  output logic [ISSUE_WIDTH-1:0]              gnt_valid,
  output logic [ISSUE_WIDTH-1:0][IDX_W-1:0]   gnt_idx
);

  int unsigned n;

  always_comb begin
    grant     = '0;
    gnt_valid = '0;
    gnt_idx   = '0;
    n         = 0;
    for (int f = 0; f < NUM_REQ; f++) begin
      if (req[f] && n < ISSUE_WIDTH) begin
        grant[f]     = 1'b1;
        gnt_valid[n] = 1'b1;
        gnt_idx[n]   = IDX_W'(f);
        n            = n + 1;
      end
    end
  end

endmodule
