// tb_mtr_top: end-to-end test of the recorder channel at its default size
// (8 tracks, 32-block frames).
//
// Write: each track's formatter is fed random bytes for two frames; the
// sources of tracks 1..7 hold back the first byte of the second frame for a
// while, so their inter-frame gaps stretch. The channel bits are captured as
// tape images.
// Play back: the images are read through the channel model with a skew of up
// to 12 bits between tracks, a one-tap echo that the equalizer's IIR
// section removes, converter noise and a tape speed that runs nominal, then
// through a shock of five cycles of +/-9 % sinusoidal speed variation, then
// ramps down to 7 % slow. All tracks must deliver every byte of every block after the first
// (which is spent confirming the block sync), across the inter-frame gap,
// with no decoding error, and the mechanisms of the design must all have
// been exercised: gap stretching on write, hunting and lock of block sync,
// bridging of the gap, phase corrections of every PLL, and the common
// feed-forward speed control following the tape speed.
module tb_mtr_top;
  import tb_chan_pkg::*;
  localparam int T = 8, NF = 2, NB = 32, ND = 48;

  logic clk = 0, rst_n = 0;
  logic wr_bit_en = 0;
  logic [T-1:0] wr_valid = '0, wr_ready, wr_bit, wr_in_gap, wr_frame_start, wr_underrun, wr_gap_stretch;
  logic [T-1:0][7:0] wr_data = '0;
  logic adc_valid = 0;
  logic [T-1:0][5:0] adc = '0;
  logic [9:0] iir_a;
  logic [6:0][9:0] fir_c;
  logic [T-1:0] rd_bit_valid, rd_bit, rd_valid, rd_err, rd_locked, rd_lock_event, rd_gap_event, rd_pe_valid;
  logic [T-1:0][7:0] rd_data, rd_blk, rd_frame;
  logic [T-1:0][5:0] rd_idx;
  logic [T-1:0][15:0] rd_pe;
  logic signed [17:0] speed_ctrl;
  logic [13:0] speed_period;
  logic [3:0] speed_events;

  mtr_top dut (.*);

  int checks = 0, failures = 0;
  byte unsigned data[T][NF][NB][ND];
  int given[T];
  int got[T];
  bit tape[T][$];
  int n_stretch = 0, n_lock = 0, n_gap = 0, n_pe = 0, n_err = 0;
  int ctrl_min = 0, ctrl_max = 0;
  bit writing = 0;
  track_chan ch[T];

  always #5 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // byte sources, one per track
  for (genvar t = 0; t < T; t++) begin : g_src
    int hold = 0;
    always @(posedge clk) if (rst_n && writing) begin
      if (wr_valid[t] && wr_ready[t]) begin
        given[t] = given[t] + 1;
        if (given[t] == NB * ND) hold <= 40 * t;
        if (given[t] < NF * NB * ND) begin
          wr_data[t] <= data[t][given[t] / (NB * ND)][(given[t] / ND) % NB][given[t] % ND];
          wr_valid[t] <= (given[t] != NB * ND) || t == 0;
        end else wr_valid[t] <= 1'b0;
      end else if (hold > 0) begin
        hold <= hold - 1;
        if (hold == 1) wr_valid[t] <= 1'b1;
      end
    end
  end

  // observation
  always @(negedge clk) begin
    if (writing) for (int t = 0; t < T; t++) tape[t].push_back(wr_bit[t]);
    for (int t = 0; t < T; t++) begin
      if (wr_gap_stretch[t]) n_stretch++;
      if (rd_lock_event[t]) n_lock++;
      if (rd_gap_event[t]) n_gap++;
      if (rd_pe_valid[t]) n_pe++;
      if (rd_valid[t]) begin
        got[t]++;
        if (rd_err[t]) n_err++;
        if (rd_frame[t] < NF && rd_blk[t] < NB && rd_idx[t] < ND)
          check(!rd_err[t] && rd_data[t] == data[t][rd_frame[t]][rd_blk[t]][rd_idx[t]],
                $sformatf("track %0d f%0d b%0d i%0d", t, rd_frame[t], rd_blk[t], rd_idx[t]));
        else
          check(0, $sformatf("track %0d ids out of range", t));
      end
    end
    if (adc_valid) begin
      if (speed_ctrl < ctrl_min) ctrl_min = speed_ctrl;
      if (speed_ctrl > ctrl_max) ctrl_max = speed_ctrl;
    end
  end

  initial begin
    int n, nbits;
    real speed, ph;
    // equalizer: IIR removes the channel's 0.3 echo, FIR passes (centre tap 1.0)
    iir_a = 10'(-77);
    fir_c = '0;
    fir_c[3] = 10'd256;
    for (int t = 0; t < T; t++) begin
      given[t] = 0; got[t] = 0;
      for (int f = 0; f < NF; f++) for (int b = 0; b < NB; b++) for (int d = 0; d < ND; d++)
        data[t][f][b][d] = 8'($urandom_range(255));
    end
    for (int t = 0; t < T; t++) wr_data[t] = data[t][0][0][0];
    wr_valid = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- write ----
    @(negedge clk);
    wr_bit_en = 1;
    @(posedge clk);
    @(negedge clk);
    writing = 1;
    n = 0;
    while (1) begin
      bit all;
      @(negedge clk);
      all = 1;
      for (int t = 0; t < T; t++) if (given[t] < NF * NB * ND || !wr_in_gap[t]) all = 0;
      if (all) n++;
      if (n == 100) break;
    end
    writing = 0;
    wr_bit_en = 0;
    check(n_stretch > 0, "gap stretched on write");
    $display("written: %0d bits per track, %0d gap stretches", tape[0].size(), n_stretch);
    // ---- play back ----
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nbits = tape[0].size();
    for (int t = 0; t < T; t++) begin
      ch[t] = new(-1.7 * t, 20.0, 0.3, 1);   // later tracks lag by up to 12 bits
      foreach (tape[t][i]) ch[t].bits.push_back(tape[t][i]);
    end
    n = 0;
    ph = 0.0;
    while (ch[0].pos < nbits + 20) begin
      @(negedge clk);
      if (ch[0].pos < 8000) speed = 1.0;
      else if (ph < 6.2831853 * 5) begin
        ph += 6.2831853 / 6000.0;  // shock: five cycles of +/-9 %, ~1900 bits each
        speed = 1.0 + 0.09 * $sin(ph);
      end else if (speed > 0.93) speed -= 0.07 / 3000.0;  // then a ramp to 7 % slow
      for (int t = 0; t < T; t++) adc[t] = 6'(ch[t].sample(speed / 3.2));
      adc_valid = 1;
      n++;
    end
    @(negedge clk);
    adc_valid = 0;
    repeat (200) @(negedge clk);
    $display("played %0d samples; speed control from %0d to %0d", n, ctrl_min, ctrl_max);
    for (int t = 0; t < T; t++) begin
      $display("track %0d: %0d bytes", t, got[t]);
      check(got[t] == (NF * NB - 1) * ND, $sformatf("track %0d byte count %0d", t, got[t]));
    end
    check(n_err == 0, "no invalid words");
    check(n_lock >= T, "block sync locked on every track");
    check(n_gap >= T, "inter-frame gap bridged on every track");
    check(n_pe > 1000 * T, "phase corrections");
    check(ctrl_min < -1000 && ctrl_max > 1000, "feed-forward speed control active both ways");
    $display("locks %0d, gaps %0d, phase corrections %0d", n_lock, n_gap, n_pe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
