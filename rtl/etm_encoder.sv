// etm_encoder: two-state rate 8/10 dc-free (ETM) channel encoder.
//
// The encoder holds its state (sigma0 or sigma1, see mtr_pkg) and maps a byte
// to a ten-bit word through the page of the current state. The word appears
// combinationally on `word` for the presented `data`; a pulse on `load`
// commits it, moving the state to the word's end state. With `sync` high the
// block sync pattern is presented instead; it is allowed from both states and
// leaves the state unchanged. The code rules (six-value running digital sum,
// two states, state-independent decoding) follow the ETM code; the byte to
// word assignment is this design's own and is computed in mtr_pkg.
//
// Timing: `word` is valid in the cycle `data`/`sync` are presented; the state
// changes on the clock edge where `load` is high. Reset puts it in sigma0.
module etm_encoder
  import mtr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,    // commit the presented word
  input  logic       sync,    // present the sync pattern instead of a byte
  input  logic [7:0] data,
  output sym_t       word,
  output logic       state    // 0 = sigma0, 1 = sigma1
);
  localparam enc_table_t ENC = build_enc();

  enc_entry_t entry;

  always_comb begin
    entry = ENC[state][data];
    word  = sync ? SYNC_WORD : entry.word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              state <= 1'b0;
    else if (load && !sync)  state <= entry.next_state;
  end
endmodule
