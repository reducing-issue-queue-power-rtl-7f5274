// tb_pi_controller: drives random error sequences (with long runs of one
// sign to reach saturation) and random clears, and compares m and the
// integral every cycle with a model computed here:
//   integral(t+1) = clamp(integral(t) + e(t)), 0 after clear,
//   m(t) = KP*e(t) + floor(integral(t) / 2^KI_SHIFT), clamped to M_W bits.
// Phases raise freeze_pos or freeze_neg, during which errors of that sign
// must leave the integral unchanged. Uses INT_W = 10 so that saturation is reached quickly.
module tb_pi_controller;
  import iq_pkg::*;
  localparam int KP = 1, KI_SHIFT = 6, INT_W = 10;
  localparam int IMAX = (1 << (INT_W-1)) - 1;
  int checks = 0, failures = 0, sat_seen = 0;
  logic clk = 0, rst_n = 0, clear = 0, fpos = 0, fneg = 0;
  int frozen = 0;
  logic signed [E_W-1:0] err = '0;
  logic signed [M_W-1:0] m;
  logic signed [INT_W-1:0] integ;
  int model_i, exp_m, bias;

  pi_controller #(.KP(KP), .KI_SHIFT(KI_SHIFT), .INT_W(INT_W)) dut (
    .clk(clk), .rst_n(rst_n), .error(err), .clear(clear), .freeze_pos(fpos), .freeze_neg(fneg), .m(m), .integral(integ));

  always #5 clk = ~clk;

  function automatic int floordiv(int a, int sh);
    return a >>> sh;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_i = 0;
    bias = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 500 == 0) bias = ($urandom % 3) - 1;
      err   = E_W'(int'($urandom % 25) - 12 + bias * 6);
      clear = ($urandom % 300 == 0);
      fpos = ((t / 700) % 4) == 1;
      fneg = ((t / 700) % 4) == 2;
      #1;
      exp_m = KP * int'(err) + floordiv(model_i, KI_SHIFT);
      checks += 2;
      if (int'(m) != exp_m) begin
        failures++; $display("FAIL t=%0d m=%0d exp=%0d", t, m, exp_m);
      end
      if (int'(integ) != model_i) begin
        failures++; $display("FAIL t=%0d integral=%0d exp=%0d", t, integ, model_i);
      end
      @(posedge clk);
      if (clear) model_i = 0;
      else if ((fpos && err > 0) || (fneg && err < 0)) frozen++;
      else begin
        model_i = model_i + int'(err);
        if (model_i > IMAX)  begin model_i = IMAX;  sat_seen++; end
        if (model_i < -IMAX) begin model_i = -IMAX; sat_seen++; end
      end
    end
    checks++;
    if (sat_seen == 0 || frozen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
