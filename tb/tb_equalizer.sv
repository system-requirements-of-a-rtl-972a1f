// tb_equalizer: self-checking test of the IIR + FIR equalizer against an
// integer model of the same difference equations, with random samples and
// several random coefficient sets (changed while idle), samples arriving
// every cycle and with gaps. Also checks the two-cycle latency and the
// saturation at the output range.
module tb_equalizer;
  localparam int IN_W = 6, W = 12, CW = 10, CF = 8, NT = 7;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IN_W-1:0] x = 0;
  logic signed [CW-1:0] iir_a = 0;
  logic [NT-1:0][CW-1:0] fir_c = '0;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0, n_sat = 0;
  int v_m, hist[NT];
  int exp_q[$];
  int cyc = 0, in_cyc[$];

  equalizer dut (.clk, .rst_n, .in_valid, .x, .iir_a, .fir_c, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc = cyc + 1;
    if (in_valid) in_cyc.push_back(cyc);
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  // model: one sample
  function automatic int model(input int xi);
    int acc;
    v_m = sat(xi + ((int'(iir_a) * v_m) >>> CF));
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v_m;
    acc = 0;
    for (int k = 0; k < NT; k++) acc += int'($signed(fir_c[k])) * hist[k];
    acc = acc >>> CF;
    if (acc != sat(acc)) n_sat++;
    return sat(acc);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || int'(y) != exp_q[0]) begin
      failures++;
      if (failures < 10) $display("FAIL: y=%0d expected %0d", y, exp_q.size() ? exp_q[0] : 0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    checks++;
    if (in_cyc.size() == 0 || cyc - in_cyc.pop_front() != 2) begin failures++; $display("FAIL: latency"); end
  end

  initial begin
    v_m = 0;
    for (int k = 0; k < NT; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int set = 0; set < 6; set++) begin
      repeat (4) @(posedge clk);
      iir_a <= CW'(set == 0 ? 0 : set == 5 ? 250 : $urandom_range(400) - 200);
      for (int k = 0; k < NT; k++)
        fir_c[k] <= CW'(set == 5 ? 511 : (k == 3 ? 256 : 0) + $urandom_range(120) - 60);
      @(posedge clk);
      for (int n = 0; n < 500; n++) begin
        int xi;
        xi = $urandom_range(63) - 32;
        x <= IN_W'(xi);
        in_valid <= 1;
        exp_q.push_back(model(xi));
        @(posedge clk);
        if (set % 2 == 1) begin in_valid <= 0; @(posedge clk); end
      end
      in_valid <= 0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
