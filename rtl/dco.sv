// dco: digitally controlled oscillator of one track PLL, with the adder that
// joins the loop filter output and the shared frequency control signal.
//
// The oscillator is a PH_W-bit phase accumulator advanced once per input
// sample by
//   NOM_INC + ctrl + freq_adj + phase_adj
// where NOM_INC = 2^PH_W / 3.2 is the nominal step for 3.2 samples per
// channel bit, ctrl is the feed-forward frequency control from the frequency
// detector (the oscillator's extra input), freq_adj the loop filter's
// integrator and phase_adj its one-shot phase correction. A wrap of the
// accumulator marks a bit centre. The accumulator form and widths are this
// design's choices; the extra control input added in front of the oscillator
// follows the multi-track PLL.
//
// Timing: `phase` is the phase of the sample presented with `en`; it
// advances on the clock edge of that cycle. `wrap` is high in a cycle whose
// `phase` is the first after a bit centre.
module dco #(
  parameter int unsigned PH_W    = 16,
  parameter int unsigned CW      = 18,
  parameter int unsigned FW      = 16,
  parameter int unsigned NOM_INC = 20480
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [CW-1:0]   ctrl,
  input  logic signed [FW-1:0]   freq_adj,
  input  logic signed [PH_W-1:0] phase_adj,
  output logic [PH_W-1:0]        phase,
  output logic                   wrap
);
  localparam int unsigned SW = (CW > PH_W ? CW : PH_W) + 3;

  logic signed [SW-1:0] step;
  logic [PH_W:0]        sum;

  always_comb begin
    step = SW'(NOM_INC) + SW'(ctrl) + SW'(freq_adj) + SW'(phase_adj);
    sum  = {1'b0, phase} + (PH_W+1)'(step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else if (en) begin
      phase <= sum[PH_W-1:0];
      wrap  <= sum[PH_W];
    end
  end

  // The step must stay positive and below one turn, or wraps would be lost
  // or counted twice; the gains and limits of the loop keep it there.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> (step > 0 && step < SW'(2 ** PH_W)))
    else $error("dco: phase step %0d out of range", step);
endmodule
