// tb_tape_formatter: self-checking test of the write-side tape format.
// Three frames are written with a bit enable every other cycle. The source
// holds back the first byte of frames 1 and 2 for a while, so the
// inter-frame gap must stretch. The captured bit stream is parsed
// independently: a gap of at least 64 bits of 1100..., then 32 blocks of
// sync, block number, frame number and 48 data words that must equal the
// reference encoding of the bytes handed over. The running digital sum of
// the whole stream must stay within its six-value band, and each block must
// take exactly 510 bit periods (48 bytes per 510 bits).
module tb_tape_formatter;
  import mtr_pkg::*;
  import etm_ref_pkg::*;

  localparam int NFRAMES = 3;
  localparam int BLK_BITS = 510;

  logic clk = 0, rst_n = 0, bit_en = 0, s_valid = 0, s_ready;
  logic [7:0] s_data = 0;
  logic bit_out, in_gap, frame_start, underrun, gap_stretch;
  int checks = 0, failures = 0;
  int n_stretch = 0, n_underrun = 0, n_frame_start = 0;
  bit stream[$];
  int sent[$];
  etm_ref r;

  tape_formatter dut (.clk, .rst_n, .bit_en, .s_valid, .s_data, .s_ready,
                      .bit_out, .in_gap, .frame_start, .underrun, .gap_stretch);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  // bit enable every other cycle; source with hold-off before frames 1, 2
  int cyc = 0;
  int bytes_given = 0;
  int hold = 0;
  logic bit_en_d = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    bit_en_d <= bit_en;
    if (bit_en_d) stream.push_back(bit_out);  // bit_out updated by the last bit_en
    if (s_valid && s_ready) begin
      sent.push_back(int'(s_data));
      bytes_given = bytes_given + 1;
      s_data <= 8'($urandom_range(255));
      if (bytes_given % (32 * 48) == 0) hold <= 400;  // frame complete
    end else if (hold > 0) hold <= hold - 1;
    s_valid <= (hold <= 1) && !(s_valid && s_ready && bytes_given % (32 * 48) == 0);
    bit_en <= ~bit_en;
    if (gap_stretch) n_stretch++;
    if (underrun) n_underrun++;
    if (frame_start) n_frame_start++;
  end

  function automatic int get_word(input int pos);
    int w = 0;
    for (int i = 0; i < 10; i++) w = (w << 1) | int'(stream[pos + i]);
    return w;
  endfunction

  initial begin
    int pos, st, rds, gap_len, k, w;
    r = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    s_data = 8'($urandom_range(255));
    wait (sent.size() == NFRAMES * 32 * 48);
    repeat (2000) @(posedge clk);
    // running digital sum over the whole stream, starting from the gap at RDS 3
    rds = 3;
    foreach (stream[i]) begin
      rds += stream[i] ? 1 : -1;
      if (rds < 0 || rds > 5) begin check(0, $sformatf("RDS %0d at bit %0d", rds, i)); break; end
    end
    check(1, "RDS band");
    pos = 0; st = 0; k = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      gap_len = 0;
      while (get_word(pos) != r.sync_word) begin
        check(stream[pos] == ((gap_len % 4) < 2), "gap pattern");
        pos++; gap_len++;
      end
      check(gap_len >= 64 && gap_len % 4 == 0, $sformatf("gap length %0d", gap_len));
      for (int b = 0; b < 32; b++) begin
        check(get_word(pos) == r.sync_word, "sync");
        pos += 10;
        w = get_word(pos); check(w == r.enc[st][b], "block number"); st = end_state(w, st); pos += 10;
        w = get_word(pos); check(w == r.enc[st][f], "frame number"); st = end_state(w, st); pos += 10;
        for (int d = 0; d < 48; d++) begin
          w = get_word(pos);
          check(w == r.enc[st][sent[k]], $sformatf("data f%0d b%0d d%0d", f, b, d));
          st = end_state(w, st); pos += 10; k++;
        end
      end
    end
    check(pos - 0 <= stream.size(), "stream length");
    check(n_stretch > 0, "gap stretched at least once");
    check(n_underrun == 0, "no underrun");
    check(n_frame_start >= NFRAMES, "frame starts");
    $display("gap stretches %0d, blocks of %0d bits", n_stretch, BLK_BITS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
