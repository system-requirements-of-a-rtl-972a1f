// tb_freq_detector: eight tracks of random data are played back, with a
// different phase per track, first at nominal speed, then 10 % slow, then
// 8 % fast. After each change has settled, the period estimate must be
// within 2 % of the true samples per bit (3.2 / speed) and the control
// signal within 2 % of the phase-step difference 2^16 / period - 2^16 / 3.2.
// The detector must also react: 400 samples after the step to 10 % slow the
// estimate must have covered more than half of the change. Once settled,
// the estimate is also checked on every cycle, to within 2.5 %.
module tb_freq_detector;
  import tb_chan_pkg::*;
  localparam int T = 8, W = 12;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [T-1:0][W-1:0] y = '0;
  logic signed [17:0] ctrl;
  logic [13:0] period;
  logic [3:0] n_events;
  int checks = 0, failures = 0, ev_total = 0;
  track_chan ch[T];
  real speed;

  freq_detector #(.TRACKS(T), .W(W)) dut (.clk, .rst_n, .in_valid, .y, .ctrl, .period, .n_events);

  always #5 clk = ~clk;
  always @(negedge clk) ev_total += int'(n_events);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // n samples; from sample `from` on, the estimate is checked every cycle
  task automatic run(input int n, input int from = -1);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (from >= 0 && i >= from) begin
        real pt;
        pt = 3.2 / speed;
        check(real'(period) / 1024.0 > pt * 0.975 && real'(period) / 1024.0 < pt * 1.025,
              $sformatf("period %0d at speed %f", period, speed));
      end
      for (int t = 0; t < T; t++) y[t] = W'(ch[t].sample(speed / 3.2, -2048, 2047));
      in_valid <= 1;
      @(posedge clk);
    end
  endtask

  task automatic expect_speed(input real s, input string what);
    real p_true, p_est, c_true;
    p_true = 3.2 / s;
    p_est  = real'(period) / 1024.0;
    c_true = 65536.0 / p_true - 20480.0;
    $display("%s: period %f (true %f), ctrl %0d (true %f)", what, p_est, p_true, ctrl, c_true);
    check(p_est > p_true * 0.98 && p_est < p_true * 1.02, {what, ": period"});
    check(real'(ctrl) > c_true - 0.02 * 20480.0 && real'(ctrl) < c_true + 0.02 * 20480.0, {what, ": ctrl"});
  endtask

  initial begin
    real p0;
    for (int t = 0; t < T; t++) begin
      ch[t] = new(0.37 * t, 400.0);
      for (int i = 0; i < 40000; i++) ch[t].bits.push_back(1'($urandom_range(1)));
    end
    speed = 1.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(4000, 2000);
    expect_speed(1.0, "nominal");
    speed = 0.9;
    p0 = real'(period) / 1024.0;
    run(400);
    check(real'(period) / 1024.0 - p0 > 0.5 * (3.2 / 0.9 - 3.2), "fast response");
    run(4000, 2000);
    expect_speed(0.9, "10% slow");
    speed = 1.08;
    run(5000, 3000);
    expect_speed(1.08, "8% fast");
    $display("intervals used: %0d", ev_total);
    check(ev_total > 10000, "intervals used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
