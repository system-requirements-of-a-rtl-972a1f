// etm_decoder: state-independent ETM block decoder (ten bits to one byte).
//
// Because every code word of either encoder page stands for one byte only,
// the decoder is a single 1024-entry look-up that needs neither the encoder
// state nor neighbouring words; a channel error therefore corrupts at most
// the byte it falls in. Words that are not in either page (including the sync
// pattern) are flagged on `invalid`, and decode to zero. The table is built
// at elaboration from the same construction as the encoder's (mtr_pkg).
//
// Timing: purely combinational.
module etm_decoder
  import mtr_pkg::*;
(
  input  sym_t       word,
  output logic [7:0] data,
  output logic       invalid
);
  localparam dec_table_t DEC = build_dec();

  dec_entry_t entry;

  always_comb begin
    entry   = DEC[word];
    data    = entry.data;
    invalid = !entry.valid;
  end
endmodule
