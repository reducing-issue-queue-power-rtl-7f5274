// tb_reconfig_ctrl: drives the controller output m through negative, positive
// and noisy phases while the queue reports empty at random, and compares
// mode, dispatch_hold, pi_clear and reconfig_pulse every cycle with a model
// of the stepping rule (one mode per change, drain first, hold-off after).
// Checks that both ends of the mode range are reached and held.
module tb_reconfig_ctrl;
  import iq_pkg::*;
  localparam int NM = 8, TH = 16, HO = 8;
  int checks = 0, failures = 0;
  int ups = 0, downs = 0, at_top = 0, at_bottom = 0;
  logic clk = 0, rst_n = 0, iq_empty = 1;
  logic signed [M_W-1:0] m = '0;
  logic [2:0] mode;
  logic hold, pclr, pulse, amax, amin;
  // model
  int st, mmode, mtarget, mho, mclr, mpulse;

  reconfig_ctrl #(.NUM_MODES(NM), .M_THRESH(TH), .HOLDOFF(HO)) dut (
    .clk(clk), .rst_n(rst_n), .m(m), .iq_empty(iq_empty), .mode(mode),
    .dispatch_hold(hold), .pi_clear(pclr), .reconfig_pulse(pulse),
    .at_max(amax), .at_min(amin));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mv, ho_was;
    st = 0; mmode = 0; mtarget = 0; mho = 0; mclr = 0; mpulse = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      checks += 4;
      if (amax != (mmode == 0) || amin != (mmode == NM-1) || int'(mode) != mmode || hold != (st == 1) || pclr != mclr[0] || pulse != mpulse[0]) begin
        failures++;
        $display("FAIL t=%0d mode=%0d/%0d hold=%0d/%0d clr=%0d/%0d pulse=%0d/%0d",
                 t, mode, mmode, hold, st, pclr, mclr, pulse, mpulse);
      end
      if (mmode == 0 && st == 0 && mho == 0 && m >= TH) at_top++;
      if (mmode == NM-1 && st == 0 && mho == 0 && m <= -TH) at_bottom++;
      case ((t / 1000) % 3)
        0: mv = -int'($urandom % 40);
        1: mv = int'($urandom % 40);
        default: mv = int'($urandom % 61) - 30;
      endcase
      m = M_W'(mv);
      iq_empty = ($urandom % 2) == 0;
      @(posedge clk);
      // model update with the values seen at this edge
      mclr = 0; mpulse = 0;
      ho_was = mho;
      if (mho != 0) mho--;
      if (st == 0) begin
        if (ho_was == 0 && mv >= TH && mmode != 0) begin mtarget = mmode - 1; st = 1; end
        else if (ho_was == 0 && mv <= -TH && mmode != NM-1) begin mtarget = mmode + 1; st = 1; end
      end else if (iq_empty) begin
        if (mtarget < mmode) ups++; else downs++;
        mmode = mtarget; mclr = 1; mpulse = 1; mho = HO; st = 0;
      end
    end
    checks += 2;
    if (ups == 0 || downs == 0) begin failures++; $display("FAIL ups=%0d downs=%0d", ups, downs); end
    if (at_top == 0 || at_bottom == 0) begin failures++; $display("FAIL range ends not held: %0d %0d", at_top, at_bottom); end
    $display("ups=%0d downs=%0d held_top=%0d held_bottom=%0d", ups, downs, at_top, at_bottom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
