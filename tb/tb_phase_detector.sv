// tb_phase_detector: drives a signal whose sign changes at random sample
// positions, with a random oscillator phase per sample, and checks that
// exactly the sign changes produce a phase error equal to
// phase - 2^15 - BIAS (modulo 2^16, signed), one cycle later.
module tb_phase_detector;
  localparam int W = 12, PH_W = 16, BIAS = 10240;
  logic clk = 0, rst_n = 0, in_valid = 0, pe_valid;
  logic signed [W-1:0] y = 0;
  logic [PH_W-1:0] phase = 0;
  logic signed [PH_W-1:0] pe;
  int checks = 0, failures = 0, n_cross = 0;
  bit exp_v = 0, prev_s = 0, primed = 0;
  logic [PH_W-1:0] exp_pe;

  phase_detector #(.W(W), .PH_W(PH_W), .BIAS(BIAS)) dut (.clk, .rst_n, .in_valid, .y, .phase, .pe_valid, .pe);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    // outputs of the previous edge
    checks++;
    if (pe_valid != exp_v || (exp_v && pe != $signed(exp_pe))) begin
      failures++;
      if (failures < 10) $display("FAIL: pe_valid %0b pe %0d, expected %0b %0d", pe_valid, pe, exp_v, $signed(exp_pe));
    end
    exp_v = 0;
    if (in_valid) begin
      if (primed && y[W-1] != prev_s) begin
        exp_v = 1;
        exp_pe = phase - 16'd32768 - 16'(BIAS);
        n_cross++;
      end
      prev_s = y[W-1];
      primed = 1;
    end
  end

  initial begin
    int s;
    s = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(2) == 0) s = -s;
      y <= W'(s * int'($urandom_range(500)));
      phase <= PH_W'($urandom);
      in_valid <= ($urandom_range(5) != 0);
    end
    @(negedge clk); in_valid <= 0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_cross < 100) failures++;
    $display("crossings %0d", n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
