// tb_speed_shock: tape-speed tolerance of the full-size recorder channel
// (8 tracks, 32-block frames). Two frames per track are written once; the
// tape images are then played back several times, the read side reset
// before each run, with sinusoidal speed shocks of different depth and rate
// (five cycles after 6000 bits, then back to nominal), a skew of up to 12
// bits between tracks, an echo and noise. For each case every byte after the
// first block must come back on every track with no decoding error. Cases:
// +/-10 % (the full-response tolerance the recorder is specified for) and
// +/-20 % (the deviation seen under shocks in portable use), each with a
// slow shock (about 1900 bits per cycle) and a fast one (about 600 bits).
module tb_speed_shock;
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


  task automatic play(input real amp, input real cyc_samples);
    int n, nbits, lock0, err0;
    real speed, ph;
    rst_n = 0;
    for (int t = 0; t < T; t++) got[t] = 0;
    lock0 = n_lock; err0 = n_err;
    ctrl_min = 0; ctrl_max = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nbits = tape[0].size();
    for (int t = 0; t < T; t++) begin
      ch[t] = new(-1.7 * t, 20.0, 0.3, 1);
      foreach (tape[t][i]) ch[t].bits.push_back(tape[t][i]);
    end
    n = 0;
    ph = 0.0;
    while (ch[0].pos < nbits + 20) begin
      @(negedge clk);
      if (ch[0].pos < 6000 || ph >= 6.2831853 * 5) speed = 1.0;
      else begin
        ph += 6.2831853 / cyc_samples;
        speed = 1.0 + amp * $sin(ph);
      end
      for (int t = 0; t < T; t++) adc[t] = 6'(ch[t].sample(speed / 3.2));
      adc_valid = 1;
      n++;
    end
    @(negedge clk);
    adc_valid = 0;
    repeat (200) @(negedge clk);
    for (int t = 0; t < T; t++)
      check(got[t] == (NF * NB - 1) * ND,
            $sformatf("+/-%0.0f %%, %0.0f samples per cycle: track %0d byte count %0d", amp * 100, cyc_samples, t, got[t]));
    check(n_err == err0, "no invalid words");
    check(n_lock - lock0 == T, "one lock per track");
    $display("+/-%0.0f %% shock, %0.0f samples per cycle: %0d bytes on track 0, speed control %0d..%0d",
             amp * 100, cyc_samples, got[0], ctrl_min, ctrl_max);
  endtask

  initial begin
    int n;
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
    for (int c = 0; c < 4; c++) begin
      real amp, cyc_samples;
      amp = (c < 2) ? 0.10 : 0.20;
      cyc_samples = (c % 2 == 0) ? 6000.0 : 1900.0;
      play(amp, cyc_samples);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
