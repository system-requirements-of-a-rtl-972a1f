// delay_line: the T1 delay of one track's PLL input.
//
// The frequency control signal shared by all PLLs is low-pass filtered and
// so reaches the oscillators late. Delaying each track's equalized samples
// by the same amount before its phase comparator lets the control signal
// arrive together with the time-base error it describes. The delay is a
// shift register of DEPTH samples, advanced on every valid sample; its depth
// is this design's choice, sized to the frequency detector's filter.
//
// Timing: every valid input shifts the register and raises out_valid in the
// next cycle; out then holds the sample that entered DEPTH valid inputs
// earlier (DEPTH clock cycles of latency when samples come every cycle).
module delay_line #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in,
  output logic         out_valid,
  output logic [W-1:0] out
);
  logic [DEPTH-1:0][W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sr <= {sr[DEPTH-2:0], in};
    end
  end

  assign out = sr[DEPTH-1];
endmodule
