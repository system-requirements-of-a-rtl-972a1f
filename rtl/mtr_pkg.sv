// mtr_pkg: constants and types shared by the multi-track recorder channel.
//
// Tape format: a tape frame is 32 tape blocks followed by an inter-frame gap;
// a tape block is 51 ten-bit symbols, three for block sync and identification
// and 48 for data (these counts follow the recorder's format).
//
// ETM (eight-to-ten) code. The code is dc-free: the running digital sum (RDS)
// of the NRZ channel sequence (+1 for a one, -1 for a zero) never leaves a
// band of six values, here numbered 0..5. The encoder has two states, one at
// each of the word-boundary sums 3 (sigma0) and 1 (sigma1). A ten-bit word is
// allowed from a state when the RDS stays within 0..5 along it and ends in
// one of the two states. This rule gives exactly 197/155 words from sigma0
// (ending in sigma0/sigma1) and 155/131 from sigma1, the code's own counts.
// The run-length limit of five follows from the six-value band.
//
// The assignment of bytes to words is this design's own (the standard's table
// is not reproduced): the 89 zero-disparity words allowed from both states are
// listed in ascending order; the largest is kept back as the block sync
// pattern and the other 88 encode bytes 0..87 on both pages. Bytes 88..255 take,
// in ascending order, the words allowed only from sigma0 (page sigma0) and
// the words allowed only from sigma1 (page sigma1). Every word thus decodes to
// one byte whatever the state, so decoding needs no state. The tables are
// computed by constant functions at elaboration.
package mtr_pkg;

  // ---------------- tape format ----------------
  localparam int unsigned SYM_BITS     = 10;
  localparam int unsigned BLOCK_SYMS   = 51;
  localparam int unsigned HDR_SYMS     = 3;
  localparam int unsigned DATA_SYMS    = BLOCK_SYMS - HDR_SYMS;  // 48
  localparam int unsigned FRAME_BLOCKS = 32;
  localparam int unsigned IFG_BITS     = 64;

  // ---------------- ETM code ----------------
  localparam int unsigned RDS_MAX   = 5;   // RDS band 0..5
  localparam int unsigned RDS_S0    = 3;   // word-boundary sum of state sigma0
  localparam int unsigned RDS_S1    = 1;   // word-boundary sum of state sigma1
  localparam int unsigned N_SHARED  = 88;  // bytes coded by words allowed from both states

  typedef logic [SYM_BITS-1:0] sym_t;

  // Encoder entry: next state (0 = sigma0, 1 = sigma1) and code word.
  typedef struct packed {
    logic next_state;
    sym_t word;
  } enc_entry_t;

  // Decoder entry: valid flag and byte.
  typedef struct packed {
    logic       valid;
    logic [7:0] data;
  } dec_entry_t;

  typedef enc_entry_t [1:0][255:0] enc_table_t;
  typedef dec_entry_t [1023:0]     dec_table_t;

  // End RDS of word w started at sum s, or -1 if the band 0..RDS_MAX is left.
  function automatic int word_end(input int w, input int s);
    int r;
    r = s;
    for (int i = SYM_BITS - 1; i >= 0; i--) begin
      r = ((w >> i) & 1) != 0 ? r + 1 : r - 1;
      if (r < 0 || r > int'(RDS_MAX)) return -1;
    end
    return r;
  endfunction

  function automatic bit allowed(input int w, input int s);
    int e;
    e = word_end(w, s);
    return e == int'(RDS_S0) || e == int'(RDS_S1);
  endfunction

  // Zero-disparity word allowed from both states.
  function automatic bit shared_word(input int w);
    return word_end(w, RDS_S0) == int'(RDS_S0) && word_end(w, RDS_S1) == int'(RDS_S1);
  endfunction

  // The sync pattern: the largest shared word.
  function automatic sym_t calc_sync();
    sym_t s;
    s = '0;
    for (int w = 0; w < 1024; w++)
      if (shared_word(w)) s = sym_t'(w);
    return s;
  endfunction

  localparam sym_t SYNC_WORD = calc_sync();

  function automatic enc_table_t build_enc();
    enc_table_t t;
    int ns, n0, n1;
    t  = '0;
    ns = 0;
    n0 = int'(N_SHARED);
    n1 = int'(N_SHARED);
    for (int w = 0; w < 1024; w++) begin
      if (shared_word(w)) begin
        if (ns < int'(N_SHARED)) begin
          t[0][ns] = '{next_state: 1'b0, word: sym_t'(w)};
          t[1][ns] = '{next_state: 1'b1, word: sym_t'(w)};
          ns++;
        end
      end else begin
        if (allowed(w, RDS_S0) && n0 < 256) begin
          t[0][n0] = '{next_state: (word_end(w, RDS_S0) == int'(RDS_S1)), word: sym_t'(w)};
          n0++;
        end
        if (allowed(w, RDS_S1) && n1 < 256) begin
          t[1][n1] = '{next_state: (word_end(w, RDS_S1) == int'(RDS_S1)), word: sym_t'(w)};
          n1++;
        end
      end
    end
    return t;
  endfunction

  function automatic dec_table_t build_dec();
    dec_table_t d;
    enc_table_t e;
    for (int w = 0; w < 1024; w++) d[w] = '0;
    e = build_enc();
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 256; b++)
        d[e[s][b].word] = '{valid: 1'b1, data: 8'(b)};
    return d;
  endfunction

endpackage
