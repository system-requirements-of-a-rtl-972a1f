// loop_filter: proportional-integral loop filter of one track PLL.
//
// At each phase error pe the filter returns a one-shot phase correction
// -(pe >>> KP) and updates an integrator -(pe >>> KI) that acts as a
// frequency offset, limited to +/-FLIM. Both are fed, through the adder in
// front of the oscillator, with the shared frequency control signal. Because
// that signal follows the tape speed, this loop only has to absorb the phase
// differences between tracks and can stay narrow. The PI form, the shift
// gains and the limit are this design's choices.
//
// Timing: phase_adj is valid for one cycle, the cycle after pe_valid;
// freq_adj changes in that same cycle and holds.
module loop_filter #(
  parameter int unsigned PH_W = 16,
  parameter int unsigned FW   = 16,
  parameter int unsigned KP   = 4,
  parameter int unsigned KI   = 11,
  parameter int unsigned FLIM = 2048
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   pe_valid,
  input  logic signed [PH_W-1:0] pe,
  output logic signed [PH_W-1:0] phase_adj,
  output logic signed [FW-1:0]   freq_adj
);
  localparam logic signed [FW:0] LIM = (FW+1)'(FLIM);

  logic signed [FW:0] next_f;

  always_comb begin
    next_f = (FW+1)'(freq_adj) - (FW+1)'(pe >>> KI);
    if (next_f > LIM)       next_f = LIM;
    else if (next_f < -LIM) next_f = -LIM;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_adj <= '0;
      freq_adj  <= '0;
    end else begin
      if (pe_valid) begin
        phase_adj <= -(pe >>> KP);
        freq_adj  <= next_f[FW-1:0];
      end else begin
        phase_adj <= '0;
      end
    end
  end
endmodule
