// tb_dco: the oscillator's phase must advance by NOM_INC + ctrl + freq_adj +
// phase_adj per enabled cycle and flag every wrap; with ctrl set for a
// 10 % slower tape, the number of bit centres in 32000 samples must be
// 32000 / (3.2 * 1.1) within one.
module tb_dco;
  localparam int PH_W = 16, CW = 18, FW = 16, NOM = 20480;
  logic clk = 0, rst_n = 0, en = 0, wrap;
  logic signed [CW-1:0] ctrl = 0;
  logic signed [FW-1:0] freq_adj = 0;
  logic signed [PH_W-1:0] phase_adj = 0;
  logic [PH_W-1:0] phase;
  int checks = 0, failures = 0, wraps = 0;
  longint m_ph = 0;
  bit m_wrap = 0;

  dco #(.PH_W(PH_W), .CW(CW), .FW(FW), .NOM_INC(NOM)) dut (.clk, .rst_n, .en, .ctrl, .freq_adj, .phase_adj, .phase, .wrap);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (longint'(phase) != m_ph || wrap != m_wrap) begin
      failures++;
      if (failures < 10) $display("FAIL: phase %0d wrap %0b expected %0d %0b", phase, wrap, m_ph, m_wrap);
    end
    if (en) begin
      m_ph = m_ph + NOM + int'(ctrl) + int'(freq_adj) + int'(phase_adj);
      m_wrap = m_ph >= 65536;
      m_ph = m_ph % 65536;
      if (m_wrap) wraps++;
    end
  end

  initial begin
    int exp_w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en <= ($urandom_range(3) != 0);
      ctrl <= CW'(int'($urandom_range(8000)) - 4000);
      freq_adj <= FW'(int'($urandom_range(2000)) - 1000);
      phase_adj <= PH_W'(int'($urandom_range(4000)) - 2000);
    end
    @(negedge clk);
    wraps = 0;
    en <= 1; freq_adj <= 0; phase_adj <= 0;
    ctrl <= CW'(int'(65536.0 / 3.52) - NOM);
    repeat (32000) @(negedge clk);
    exp_w = int'(32000.0 / 3.52);
    checks++;
    if (wraps < exp_w - 1 || wraps > exp_w + 1) begin failures++; $display("FAIL: %0d wraps, expected %0d", wraps, exp_w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
