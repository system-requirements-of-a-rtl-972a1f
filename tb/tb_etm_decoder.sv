// tb_etm_decoder: exhaustive test of the ETM decoder. All 1024 ten-bit words
// are applied; code words must return their byte from the independent
// reference and every other word (the sync pattern included) must be flagged.
module tb_etm_decoder;
  import mtr_pkg::*;
  import etm_ref_pkg::*;

  sym_t       word;
  logic [7:0] data;
  logic       invalid;
  int checks = 0, failures = 0, n_valid = 0;
  etm_ref r;

  etm_decoder dut (.word, .data, .invalid);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = new();
    for (int w = 0; w < 1024; w++) begin
      word = sym_t'(w);
      #1;
      checks++;
      if (r.dec[w] < 0) begin
        if (!invalid) begin failures++; $display("FAIL: word %b should be invalid", word); end
      end else begin
        n_valid++;
        if (invalid || int'(data) != r.dec[w]) begin
          failures++;
          $display("FAIL: word %b -> %0d/%0b, expected %0d", word, data, invalid, r.dec[w]);
        end
      end
    end
    // 88 shared words plus 168 words on each page
    checks++;
    if (n_valid != 88 + 2 * 168) begin failures++; $display("FAIL: %0d code words", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
