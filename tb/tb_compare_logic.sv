// tb_compare_logic: sweeps every commit buffer occupancy and checks the
// error against the three-case rule worked out here: C_LOW - occ below the
// interval, C_HIGH - occ above it, zero inside. Runs the published scheme's interval
// [3, 8] and a second interval [2, 6].
module tb_compare_logic;
  import iq_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] occ;
  logic signed [E_W-1:0] err_a, err_b;

  compare_logic #(.OCC_W(5))                          dut_a (.occupancy(occ), .error(err_a));
  compare_logic #(.C_LOW(2), .C_HIGH(6), .OCC_W(5))   dut_b (.occupancy(occ), .error(err_b));

  function automatic int expect_err(int lo, int hi, int o);
    if (o < lo) return lo - o;
    if (o > hi) return hi - o;
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o <= 20; o++) begin
      occ = 5'(o);
      #1;
      checks += 2;
      if (int'(err_a) != expect_err(3, 8, o)) begin
        failures++; $display("FAIL [3,8] occ=%0d err=%0d", o, err_a);
      end
      if (int'(err_b) != expect_err(2, 6, o)) begin
        failures++; $display("FAIL [2,6] occ=%0d err=%0d", o, err_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
