// tb_commit_buffer: retires random groups (never more than free_slots) into
// the buffer under several Commit Rate Targets (0.33, 0.5, 1, 2 and a burst
// rate of 8) and compares, every cycle, the released instructions, their
// order, the occupancy and target_miss with a queue-based model using the
// same phase accumulator. Also checks the release count over a window: with
// the buffer kept full, rate 0.5 must release exactly 100 in 200 cycles.
module tb_commit_buffer;
  import iq_pkg::*;
  localparam int DEPTH = 20, IW = 8, MD = 8;
  int checks = 0, failures = 0, misses = 0, fulls = 0;
  logic clk = 0, rst_n = 0;
  logic [IW-1:0] in_valid = '0;
  logic [IW-1:0][ROB_W-1:0] in_rob;
  logic [4:0] free_slots, occupancy;
  logic [RATE_W-1:0] rate = '0;
  logic [MD-1:0] out_valid;
  logic [MD-1:0][ROB_W-1:0] out_rob;
  logic target_miss;
  int q[$];
  int phase, due, nxt, released, window;
  int rates[5] = '{85, 128, 256, 512, 2048};

  commit_buffer #(.DEPTH(DEPTH), .IN_WIDTH(IW), .MAX_DRAIN(MD)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_rob(in_rob), .free_slots(free_slots),
    .rate_target(rate), .out_valid(out_valid), .out_rob(out_rob),
    .occupancy(occupancy), .target_miss(target_miss));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ph_id, full_mode, exp_drain;
    phase = 0; nxt = 0; released = 0; window = 0;
    in_rob = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      ph_id = (t / 800) % 5;
      full_mode = ((t / 400) % 2);
      rate = RATE_W'(rates[ph_id]);
      // retire: in full mode as much as fits, otherwise a random amount
      n = full_mode ? IW : int'($urandom % 3);
      if (n > DEPTH - q.size()) n = DEPTH - q.size();
      in_valid = '0;
      for (int k = 0; k < n; k++) begin
        in_valid[k] = 1'b1;
        in_rob[k]   = ROB_W'(nxt + k);
      end
      #1;
      due = (phase + rates[ph_id]) >> RATE_FRAC;
      if (due > MD) due = MD;
      exp_drain = (due > q.size()) ? q.size() : due;
      checks += 3;
      if (int'(occupancy) != q.size()) begin failures++; $display("FAIL t=%0d occ=%0d exp=%0d", t, occupancy, q.size()); end
      if (int'(free_slots) != DEPTH - q.size()) begin failures++; $display("FAIL t=%0d free", t); end
      if (target_miss != (due > q.size())) begin failures++; $display("FAIL t=%0d miss=%0d due=%0d occ=%0d", t, target_miss, due, q.size()); end
      if (target_miss) misses++;
      if (q.size() == DEPTH) fulls++;
      for (int k = 0; k < MD; k++) begin
        checks++;
        if (out_valid[k] != (k < exp_drain)) begin failures++; $display("FAIL t=%0d out_valid[%0d]", t, k); end
        else if (out_valid[k] && int'(out_rob[k]) != q[k]) begin
          failures++; $display("FAIL t=%0d out_rob[%0d]=%0d exp=%0d", t, k, out_rob[k], q[k]);
        end
      end
      // release-rate window: rate 0.5, buffer kept full
      if (ph_id == 1 && full_mode == 1 && (t % 400) >= 100 && (t % 400) < 300) released += exp_drain;
      if (ph_id == 1 && full_mode == 1 && (t % 400) == 300) begin
        checks++; window++;
        if (released != 100) begin failures++; $display("FAIL rate window released %0d of 100", released); end
        released = 0;
      end
      @(posedge clk);
      phase = (phase + rates[ph_id]) % (1 << RATE_FRAC);
      for (int k = 0; k < exp_drain; k++) void'(q.pop_front());
      for (int k = 0; k < n; k++) q.push_back((nxt + k) % (1 << ROB_W));
      nxt = (nxt + n) % (1 << ROB_W);
    end
    checks += 2;
    if (misses == 0) begin failures++; $display("FAIL no target miss"); end
    if (fulls == 0 || window == 0) begin failures++; $display("FAIL buffer never full / no window"); end
    $display("misses=%0d full_cycles=%0d", misses, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
