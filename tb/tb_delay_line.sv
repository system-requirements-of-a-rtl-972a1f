// tb_delay_line: random samples, with and without gaps, must come out after
// exactly DEPTH valid samples, in order.
module tb_delay_line;
  localparam int W = 12, DEPTH = 48;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [W-1:0] in = 0, out;
  int checks = 0, failures = 0;
  logic [W-1:0] hist[$];

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the testbench sees the samples as the DUT does, at the clock edge
  always @(posedge clk) begin
    if (out_valid && hist.size() >= DEPTH) begin
      checks++;
      if (out != hist[hist.size() - DEPTH]) begin
        failures++;
        if (failures < 10) $display("FAIL: out %0d expected %0d", out, hist[hist.size() - DEPTH]);
      end
    end
    if (in_valid) hist.push_back(in);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      @(negedge clk);
      in <= v; in_valid <= 1;
      if (n > 500 && $urandom_range(2) == 0) begin @(negedge clk); in_valid <= 0; end
    end
    @(negedge clk); in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("samples %0d", hist.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
