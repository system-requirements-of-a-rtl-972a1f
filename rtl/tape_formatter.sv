// tape_formatter: builds the tape format of one track and serialises it.
//
// A tape frame is FRAME_BLOCKS tape blocks followed by an inter-frame gap
// (IFG). A tape block is the sync pattern, two identification symbols and
// DATA_SYMS data symbols, each an ETM word sent MSB first. The 32/51/3/48
// structure and the nominal gap length of 64 follow the recorder's format.
// This design's own choices: the gap is counted in channel bits and is the
// dc-free pattern 1100 repeated; the two identification symbols are the ETM
// words of the block number and of the low eight bits of the frame number.
// The gap is the elastic part of the format: after its nominal length it is
// stretched four bits at a time until the source offers the first byte of
// the next frame (`gap_stretch` pulses for each added group). Inside a frame
// a byte that is not ready is replaced by 0x00 and `underrun` pulses.
// The output starts with a gap after reset.
//
// Interface: bytes arrive on s_valid/s_ready/s_data (a byte is taken in a
// cycle with s_valid, s_ready and bit_en high). Every cycle with bit_en high
// shifts out one channel bit: `bit_out` holds it until the next bit_en.
module tape_formatter
  import mtr_pkg::*;
#(
  parameter int unsigned BLOCKS = FRAME_BLOCKS,
  parameter int unsigned GAP    = IFG_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  input  logic       s_valid,
  input  logic [7:0] s_data,
  output logic       s_ready,
  output logic       bit_out,
  output logic       in_gap,       // the bit being sent belongs to the gap
  output logic       frame_start,  // pulses with the first bit of a frame
  output logic       underrun,
  output logic       gap_stretch
);
  typedef enum logic {ST_GAP, ST_SYM} st_t;

  st_t                          st;
  sym_t                         shreg;
  logic [3:0]                   bitcnt;   // bit of the current symbol, 0..9
  logic [5:0]                   symidx;   // symbol of the current block, 0..50
  logic [$clog2(BLOCKS+1)-1:0]  blkno;
  logic [7:0]                   frameno;
  logic [15:0]                  gapcnt;

  logic       enc_load, enc_sync;
  logic [7:0] enc_data;
  sym_t       enc_word;
  logic       enc_state;
  logic       sym_end, blk_end, gap_done;

  assign sym_end  = (st == ST_SYM) && (bitcnt == 4'(SYM_BITS - 1));
  assign blk_end  = sym_end && (symidx == 6'(BLOCK_SYMS - 1));
  assign gap_done = (st == ST_GAP) && (gapcnt[1:0] == 2'd3) && (32'(gapcnt) + 1 >= GAP) && s_valid;

  // Next symbol to load: the sync pattern starts a block, then the block and
  // frame numbers, then the data bytes.
  always_comb begin
    enc_sync = gap_done || (blk_end && (32'(blkno) != BLOCKS - 1));
    enc_load = bit_en && (enc_sync || (sym_end && !blk_end));
    unique case (symidx)
      6'd0:    enc_data = 8'(blkno);
      6'd1:    enc_data = frameno;
      default: enc_data = s_valid ? s_data : 8'h00;
    endcase
    s_ready = bit_en && sym_end && !blk_end && (symidx >= 6'd2);
  end

  etm_encoder u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (enc_load),
    .sync  (enc_sync),
    .data  (enc_data),
    .word  (enc_word),
    .state (enc_state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= ST_GAP;
      shreg       <= '0;
      bitcnt      <= '0;
      symidx      <= '0;
      blkno       <= '0;
      frameno     <= '0;
      gapcnt      <= '0;
      bit_out     <= 1'b0;
      in_gap      <= 1'b1;
      frame_start <= 1'b0;
      underrun    <= 1'b0;
      gap_stretch <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      underrun    <= 1'b0;
      gap_stretch <= 1'b0;
      if (bit_en) begin
        if (st == ST_GAP) begin
          bit_out <= ~gapcnt[1];
          in_gap  <= 1'b1;
          gapcnt  <= gapcnt + 1'b1;
          if (32'(gapcnt) >= GAP && gapcnt[1:0] == 2'd0) gap_stretch <= 1'b1;
          if (gap_done) begin
            st     <= ST_SYM;
            shreg  <= enc_word;
            bitcnt <= '0;
            symidx <= '0;
          end
        end else begin
          bit_out     <= shreg[SYM_BITS-1];
          in_gap      <= 1'b0;
          frame_start <= (blkno == '0) && (symidx == '0) && (bitcnt == '0);
          shreg       <= {shreg[SYM_BITS-2:0], 1'b0};
          bitcnt      <= bitcnt + 1'b1;
          if (sym_end) begin
            bitcnt <= '0;
            if (blk_end) begin
              symidx <= '0;
              if (32'(blkno) == BLOCKS - 1) begin
                st      <= ST_GAP;
                gapcnt  <= '0;
                blkno   <= '0;
                frameno <= frameno + 1'b1;
              end else begin
                blkno <= blkno + 1'b1;
                shreg <= enc_word;
              end
            end else begin
              symidx <= symidx + 1'b1;
              shreg  <= enc_word;
              if (symidx >= 6'd2 && !s_valid) underrun <= 1'b1;
            end
          end
        end
      end
    end
  end

  logic unused;
  assign unused = enc_state;
endmodule
