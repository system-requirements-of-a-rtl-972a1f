// phase_detector: the phase comparator of one track PLL.
//
// The full-response equalized signal crosses zero on bit boundaries. The
// detector looks for a sign change between consecutive samples and, at each
// one, reports where the oscillator phase stood: bit centres are at phase 0
// (the oscillator's wrap) and boundaries at half a turn, so the error is
//   pe = phase - 2^(PH_W-1) - BIAS            (taken modulo 2^PH_W, signed)
// Positive pe means the oscillator runs ahead of the signal. The crossing
// lies on average half a sample before the sample that reveals it; BIAS
// (half the nominal phase step) removes that offset. The bang-at-crossing
// structure without interpolation and the BIAS are this design's choices.
//
// Timing: `phase` is the oscillator phase belonging to the sample `y`; pe is
// registered and pe_valid pulses in the cycle after the crossing sample.
module phase_detector #(
  parameter int unsigned W    = 12,
  parameter int unsigned PH_W = 16,
  parameter int unsigned BIAS = 10240
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [W-1:0]    y,
  input  logic [PH_W-1:0]        phase,
  output logic                   pe_valid,
  output logic signed [PH_W-1:0] pe
);
  logic prev_sign, primed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sign <= 1'b0;
      primed    <= 1'b0;
      pe_valid  <= 1'b0;
      pe        <= '0;
    end else begin
      pe_valid <= 1'b0;
      if (in_valid) begin
        prev_sign <= y[W-1];
        primed    <= 1'b1;
        if (primed && (y[W-1] != prev_sign)) begin
          pe_valid <= 1'b1;
          pe       <= $signed(phase - PH_W'(2 ** (PH_W - 1)) - PH_W'(BIAS));
        end
      end
    end
  end
endmodule
