// tb_track_pll: one track PLL with bit detection. Random channel bits are
// played back through the channel model in three runs:
//   1. nominal speed, no control signal;
//   2. 2 % fast with no control signal: the narrow loop must absorb it alone;
//   3. 12 % slow with the matching control signal on the extra input (as
//      the frequency detector would supply it).
// The recovered bits are aligned once to the written bits and must then
// match them all, with no bit slip, after a 300-bit settling time; the
// number of recovered bits must equal the number of played bits.
module tb_track_pll;
  import tb_chan_pkg::*;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] y = 0;
  logic signed [17:0] ctrl = 0;
  logic bit_valid, bit_out, pe_valid;
  logic signed [15:0] pe;
  int checks = 0, failures = 0;
  bit rec[$];
  track_chan ch;

  track_pll dut (.clk, .rst_n, .in_valid, .y, .ctrl, .bit_valid, .bit_out, .pe_valid, .pe);

  always #5 clk = ~clk;
  always @(negedge clk) if (bit_valid) rec.push_back(bit_out);

  initial begin
    #200_000_000;
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

  task automatic run(input real speed, input int c, input int nbits, input string what);
    int best_off, best_err, err, played;
    ch = new(0.3, 20.0, 0.0, 1);
    for (int i = 0; i < nbits; i++) ch.bits.push_back(1'($urandom_range(1)));
    rst_n = 0;
    rec.delete();
    ctrl = 18'(c);
    repeat (3) @(negedge clk);
    rst_n = 1;
    played = 0;
    while (!ch.done()) begin
      @(negedge clk);
      y = W'(ch.sample(speed / 3.2));
      in_valid = 1;
    end
    @(negedge clk); in_valid = 0;
    repeat (60) @(negedge clk);
    // align once on bits 300..600, then compare everything after 300
    best_off = 0; best_err = 1 << 30;
    for (int off = -80; off <= 80; off++) begin
      err = 0;
      for (int k = 300; k < 600; k++)
        if (k + off >= 0 && k + off < nbits && k < rec.size()) err += (rec[k] != ch.bits[k + off]);
      if (err < best_err) begin best_err = err; best_off = off; end
    end
    err = 0;
    for (int k = 300; k < rec.size() - 100; k++)
      if (k + best_off >= 0 && k + best_off < nbits) begin
        err += (rec[k] != ch.bits[k + best_off]);
        check(rec[k] == ch.bits[k + best_off], $sformatf("%s: bit %0d", what, k));
      end
    $display("%s: %0d bits recovered of %0d, offset %0d, %0d errors", what, rec.size(), nbits, best_off, err);
    check(rec.size() > 5000, {what, ": bits compared"});
    check(rec.size() >= nbits - 2 && rec.size() <= nbits + 2, {what, ": bit count"});
  endtask

  initial begin
    run(1.0, 0, 6000, "nominal");
    run(1.02, 0, 6000, "2% fast, loop only");
    run(0.88, int'(65536.0 / (3.2 / 0.88)) - 20480, 6000, "12% slow, feed-forward");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
