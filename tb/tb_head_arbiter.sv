// tb_head_arbiter: random request vectors of varying density; checks that
// exactly the lowest-indexed min(ISSUE_WIDTH, requests) requests are granted
// and that the grant list names them in increasing order.
module tb_head_arbiter;
  localparam int N = 128, IW = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] req, grant, exp_grant;
  logic [IW-1:0] gv;
  logic [IW-1:0][6:0] gi;
  int n, dens;

  head_arbiter #(.NUM_REQ(N), .ISSUE_WIDTH(IW)) dut (.req(req), .grant(grant), .gnt_valid(gv), .gnt_idx(gi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      dens = 1 + (t % 40);
      for (int f = 0; f < N; f++) req[f] = ($urandom % 100) < dens;
      if (t == 0) req = '0;
      if (t == 1) req = '1;
      #1;
      exp_grant = '0;
      n = 0;
      for (int f = 0; f < N; f++) if (req[f] && n < IW) begin
        exp_grant[f] = 1'b1;
        checks++;
        if (!gv[n] || int'(gi[n]) != f) begin
          failures++; $display("FAIL t=%0d slot %0d idx=%0d exp=%0d", t, n, gi[n], f);
        end
        n++;
      end
      for (int k = n; k < IW; k++) begin
        checks++;
        if (gv[k]) begin failures++; $display("FAIL t=%0d slot %0d valid with no request", t, k); end
      end
      checks++;
      if (grant != exp_grant) begin failures++; $display("FAIL t=%0d grant vector", t); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
