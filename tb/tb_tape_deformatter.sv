// tb_tape_deformatter: self-checking test of block synchronisation and
// decoding. The testbench writes its own tape image with the reference
// encoder: random noise bits (kept free of the sync pattern), then three frames (gap, 32 blocks of sync,
// block number, frame number and 48 data words). One data word of frame 1
// is replaced by a non-code word. Expected: the first sync is only a
// candidate, so block 0 of frame 0 is not output; from block 1 on every
// byte comes out with its frame, block and index; the gaps between frames
// are bridged without losing a block; the bad word is flagged.
module tb_tape_deformatter;
  import mtr_pkg::*;
  import etm_ref_pkg::*;

  localparam int NFRAMES = 3;
  localparam int BAD_F = 1, BAD_B = 5, BAD_I = 17;

  logic clk = 0, rst_n = 0, bit_valid = 0, bit_in = 0;
  logic out_valid, out_err, locked, lock_event, gap_event;
  logic [7:0] out_data, out_blk, out_frame;
  logic [5:0] out_idx;
  int checks = 0, failures = 0;
  int n_out = 0, n_lock = 0, n_gap = 0, n_err = 0;
  bit tape[$];
  byte unsigned data[NFRAMES][32][48];
  etm_ref r;

  tape_deformatter dut (.clk, .rst_n, .bit_valid, .bit_in, .out_valid, .out_data,
                        .out_err, .out_blk, .out_frame, .out_idx, .locked,
                        .lock_event, .gap_event);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
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

  task automatic put_word(input int w);
    for (int i = 9; i >= 0; i--) tape.push_back(w[i]);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (lock_event) n_lock++;
    if (gap_event) n_gap++;
    if (out_valid) begin
      n_out++;
      if (out_frame == BAD_F && out_blk == BAD_B && out_idx == BAD_I) begin
        check(out_err, "bad word flagged");
        n_err++;
      end else begin
        check(!out_err, "no error flag");
        check(out_frame < NFRAMES && out_blk < 32 && out_idx < 48, "ids in range");
        if (out_frame < NFRAMES && out_blk < 32 && out_idx < 48)
          check(out_data == data[out_frame][out_blk][out_idx],
                $sformatf("data f%0d b%0d i%0d", out_frame, out_blk, out_idx));
      end
    end
  end

  initial begin
    int st, w;
    r = new();
    for (int i = 0; i < 300; i++) tape.push_back(1'($urandom_range(1)));
    // the noise must not itself hold the sync pattern (nor end in a prefix of it)
    for (int i = 0; i + 10 <= 300 + 9; i++) begin
      int w;
      w = 0;
      for (int k = 0; k < 10; k++) w = (w << 1) | ((i + k < 300) ? int'(tape[i + k]) : int'((i + k - 300) % 4 < 2));
      if (w == r.sync_word) tape[i] = ~tape[i];
    end
    st = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int g = 0; g < 64 + 8 * f; g++) tape.push_back((g % 4) < 2);
      for (int b = 0; b < 32; b++) begin
        put_word(r.sync_word);
        w = r.enc[st][b]; put_word(w); st = end_state(w, st);
        w = r.enc[st][f]; put_word(w); st = end_state(w, st);
        for (int i = 0; i < 48; i++) begin
          data[f][b][i] = 8'($urandom_range(255));
          w = r.enc[st][data[f][b][i]];
          st = end_state(w, st);
          if (f == BAD_F && b == BAD_B && i == BAD_I) w = 0;  // not a code word
          put_word(w);
        end
      end
    end
    for (int g = 0; g < 64; g++) tape.push_back((g % 4) < 2);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (tape[i]) begin
      @(posedge clk);
      bit_valid <= 1; bit_in <= tape[i];
      @(posedge clk);
      bit_valid <= 0;
    end
    repeat (10) @(posedge clk);
    check(n_out == (31 + 32 * (NFRAMES - 1)) * 48, $sformatf("byte count %0d", n_out));
    check(n_lock == 1, "one lock from hunting");
    check(n_gap == NFRAMES, "every gap bridged");
    check(n_err == 1, "one flagged byte");
    $display("bytes %0d, locks %0d, gaps %0d", n_out, n_lock, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
