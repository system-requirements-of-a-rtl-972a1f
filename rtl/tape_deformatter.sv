// tape_deformatter: block synchronisation and decoding for one track.
//
// Detected channel bits are shifted into a ten-bit window. The sync pattern
// may also occur by chance across data words, so block timing is trusted
// only after confirmation (this design's own flywheel, the format itself
// only fixes the block and frame structure):
//   HUNT  - look for the sync pattern anywhere;
//   CHECK - a candidate was seen: the next sync must follow one block later;
//   LOCK  - block timing is known: each ten-bit symbol is decoded, the first
//           two as block and frame number, the rest as data bytes. A missing
//           sync after the last block of a frame means the inter-frame gap;
//           anywhere else it drops back to HUNT;
//   GAP   - within the gap, whose length varies, the first sync pattern
//           is accepted straight into LOCK.
// Each data byte is output with its block number, frame number and index
// within the block, and with `err` set when its word is not an ETM word.
//
// Timing: one bit per cycle with bit_valid; a data byte appears on the cycle
// after the bit that completes its word.
module tape_deformatter
  import mtr_pkg::*;
#(
  parameter int unsigned BLOCKS = FRAME_BLOCKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_valid,
  input  logic       bit_in,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_err,
  output logic [7:0] out_blk,
  output logic [7:0] out_frame,
  output logic [5:0] out_idx,
  output logic       locked,
  output logic       lock_event,  // pulses on entering LOCK from CHECK
  output logic       gap_event    // pulses on entering GAP
);
  typedef enum logic [1:0] {HUNT, CHECK, LOCK, GAP} st_t;

  st_t        st;
  sym_t       win, win_next;
  logic [3:0] bitcnt;
  logic [5:0] symidx;    // symbol index after the sync, 0..50 (50 = next sync)
  logic [7:0] blk, frame;

  logic [7:0] dec_data;
  logic       dec_inv;
  logic       is_sync, sym_done;

  assign win_next = {win[SYM_BITS-2:0], bit_in};
  assign is_sync  = (win_next == SYNC_WORD);
  assign sym_done = (bitcnt == 4'(SYM_BITS - 1));

  etm_decoder u_dec (
    .word    (win_next),
    .data    (dec_data),
    .invalid (dec_inv)
  );

  assign locked = (st == LOCK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= HUNT;
      win        <= '0;
      bitcnt     <= '0;
      symidx     <= '0;
      blk        <= '0;
      frame      <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_err    <= 1'b0;
      out_blk    <= '0;
      out_frame  <= '0;
      out_idx    <= '0;
      lock_event <= 1'b0;
      gap_event  <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      lock_event <= 1'b0;
      gap_event  <= 1'b0;
      if (bit_valid) begin
        win    <= win_next;
        bitcnt <= sym_done ? '0 : bitcnt + 1'b1;
        if (sym_done) symidx <= symidx + 1'b1;
        unique case (st)
          HUNT, GAP: begin
            if (is_sync) begin
              st     <= (st == GAP) ? LOCK : CHECK;
              bitcnt <= '0;
              symidx <= '0;
            end
          end
          CHECK: begin
            if (sym_done && symidx == 6'(BLOCK_SYMS - 1)) begin
              symidx <= '0;
              if (is_sync) begin
                st         <= LOCK;
                lock_event <= 1'b1;
              end else begin
                st <= HUNT;
              end
            end
          end
          LOCK: begin
            if (sym_done) begin
              if (symidx == 6'(BLOCK_SYMS - 1)) begin
                symidx <= '0;
                if (!is_sync) begin
                  if (32'(blk) == BLOCKS - 1) begin
                    st        <= GAP;
                    gap_event <= 1'b1;
                  end else begin
                    st <= HUNT;
                  end
                end
              end else if (symidx == 6'd0) begin
                blk <= dec_data;
              end else if (symidx == 6'd1) begin
                frame <= dec_data;
              end else begin
                out_valid <= 1'b1;
                out_data  <= dec_data;
                out_err   <= dec_inv;
                out_blk   <= blk;
                out_frame <= frame;
                out_idx   <= symidx - 6'd2;
              end
            end
          end
          default: st <= HUNT;
        endcase
      end
    end
  end
endmodule
