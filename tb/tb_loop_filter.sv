// tb_loop_filter: random phase errors at random times; the one-shot phase
// correction and the limited integrator are compared with a model.
module tb_loop_filter;
  localparam int PH_W = 16, FW = 16, KP = 4, KI = 11, FLIM = 2048;
  logic clk = 0, rst_n = 0, pe_valid = 0;
  logic signed [PH_W-1:0] pe = 0, phase_adj;
  logic signed [FW-1:0] freq_adj;
  int checks = 0, failures = 0, n_lim = 0;
  int m_f = 0, m_p = 0;

  loop_filter #(.PH_W(PH_W), .FW(FW), .KP(KP), .KI(KI), .FLIM(FLIM)) dut (.clk, .rst_n, .pe_valid, .pe, .phase_adj, .freq_adj);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(phase_adj) != m_p || int'(freq_adj) != m_f) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d %0d expected %0d %0d", phase_adj, freq_adj, m_p, m_f);
    end
    m_p = 0;
    if (pe_valid) begin
      m_p = -(int'(pe) >>> KP);
      m_f = m_f - (int'(pe) >>> KI);
      if (m_f > FLIM) begin m_f = FLIM; n_lim++; end
      if (m_f < -FLIM) begin m_f = -FLIM; n_lim++; end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // a biased error drives the integrator into its limit and back
      pe <= PH_W'(int'($urandom_range(40000)) - 20000 + (n < 2000 ? 12000 : -12000));
      pe_valid <= ($urandom_range(3) == 0);
    end
    @(negedge clk); pe_valid <= 0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_lim == 0) begin failures++; $display("FAIL: limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
