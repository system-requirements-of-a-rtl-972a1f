// tb_etm_encoder: self-checking test of the ETM encoder.
// Every (state, byte) pair is encoded at least once, plus a long random
// sequence with sync words mixed in. The running digital sum of the whole
// output is tracked and must stay within 0..5 and sit on 3 or 1 (the two
// states) at word boundaries. Each word must match the independent
// reference, the state output must follow, every page must hold 256
// distinct words and no word may stand for two bytes.
module tb_etm_encoder;
  import mtr_pkg::*;
  import etm_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, sync = 0, state;
  logic [7:0] data = 0;
  sym_t word;
  int checks = 0, failures = 0;
  int rds = 3;
  int seen_word[2][256];
  etm_ref r;

  etm_encoder dut (.clk, .rst_n, .load, .sync, .data, .word, .state);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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

  // Present one byte (or sync) and commit it, checking the word.
  task automatic send(input int b, input bit s);
    int st_exp, w;
    st_exp = (rds == 1) ? 1 : 0;
    data = 8'(b);
    sync = s;
    load = 1;
    #1;
    w = int'(word);
    check(state == st_exp[0], "state output");
    if (s) check(w == r.sync_word, "sync word");
    else begin
      check(w == r.enc[st_exp][b], $sformatf("word st=%0d b=%0d", st_exp, b));
      seen_word[st_exp][b] = w;
    end
    for (int i = 9; i >= 0; i--) begin
      rds += w[i] ? 1 : -1;
      check(rds >= 0 && rds <= 5, "RDS band");
    end
    check(rds == 1 || rds == 3, "RDS at word boundary");
    @(posedge clk); #1;
    load = 0;
    sync = 0;
  endtask

  initial begin
    int st, tgt;
    r = new();
    for (int s = 0; s < 2; s++) for (int b = 0; b < 256; b++) seen_word[s][b] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 256; b++) begin
        // steer the encoder into state s with a state-changing byte
        st = (rds == 1) ? 1 : 0;
        if (st != s) begin
          tgt = 255;  // last byte uses a single-state word; search one that flips
          for (int c = 255; c >= 0; c--)
            if (end_state(r.enc[st][c], st) != st) begin tgt = c; break; end
          send(tgt, 0);
        end
        send(b, 0);
      end
    for (int i = 0; i < 4000; i++) send($urandom_range(255), ($urandom_range(15) == 0));
    // codebook properties, from the words the DUT produced
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 256; b++) begin
        check(seen_word[s][b] >= 0, "pair exercised");
        check(seen_word[s][b] != r.sync_word, "sync not a data word");
        for (int c = 0; c < 256; c++) begin
          if (c != b) check(seen_word[s][b] != seen_word[s][c], "distinct in page");
          if (c != b) check(seen_word[s][b] != seen_word[1-s][c], "unique decoding");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
