// track_pll: one track of the multi-track PLL, with bit detection.
//
// The chain of one row of the multi-track PLL: the equalized samples pass a
// delay T1 (delay_line), a phase comparator (phase_detector) compares their
// zero crossings with the oscillator phase, the loop filter (loop_filter)
// turns the error into a phase and a frequency correction, and an adder puts
// the shared feed-forward frequency control signal `ctrl` next to them in
// front of the oscillator (dco). Because `ctrl` is not formed from this
// loop's own output it does not affect the loop's stability, and because the
// samples are delayed by T1 it meets the speed change it was measured from.
//
// Bit detection is full-response: at each bit centre (oscillator wrap) the
// sign of the delayed sample nearer to the centre, the one just after or the
// one just before, is the channel bit (1 for a positive signal). Choosing
// the nearer sample is this design's choice.
//
// Timing: samples arrive with in_valid; bit_valid pulses once per recovered
// channel bit, T1 + 2 cycles or so after the samples it was taken from.
module track_pll #(
  parameter int unsigned W       = 12,
  parameter int unsigned PH_W    = 16,
  parameter int unsigned CW      = 18,
  parameter int unsigned FW      = 16,
  parameter int unsigned NOM_INC = 20480,
  parameter int unsigned T1      = 48,
  parameter int unsigned KP      = 4,
  parameter int unsigned KI      = 11,
  parameter int unsigned FLIM    = 2048
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [W-1:0]    y,
  input  logic signed [CW-1:0]   ctrl,
  output logic                   bit_valid,
  output logic                   bit_out,
  output logic                   pe_valid,
  output logic signed [PH_W-1:0] pe
);
  logic                   d_valid;
  logic [W-1:0]           d_y;
  logic [PH_W-1:0]        phase;
  logic                   wrap;
  logic signed [PH_W-1:0] phase_adj;
  logic signed [FW-1:0]   freq_adj;

  delay_line #(.W(W), .DEPTH(T1)) u_t1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in(y),
    .out_valid(d_valid), .out(d_y)
  );

  phase_detector #(.W(W), .PH_W(PH_W), .BIAS(NOM_INC / 2)) u_pd (
    .clk(clk), .rst_n(rst_n), .in_valid(d_valid), .y(d_y), .phase(phase),
    .pe_valid(pe_valid), .pe(pe)
  );

  loop_filter #(.PH_W(PH_W), .FW(FW), .KP(KP), .KI(KI), .FLIM(FLIM)) u_lf (
    .clk(clk), .rst_n(rst_n), .pe_valid(pe_valid), .pe(pe),
    .phase_adj(phase_adj), .freq_adj(freq_adj)
  );

  dco #(.PH_W(PH_W), .CW(CW), .FW(FW), .NOM_INC(NOM_INC)) u_osc (
    .clk(clk), .rst_n(rst_n), .en(d_valid), .ctrl(ctrl),
    .freq_adj(freq_adj), .phase_adj(phase_adj), .phase(phase), .wrap(wrap)
  );

  // Bit detector. `phase` and `wrap` belong to the delayed sample d_y of
  // this cycle; the previous sample and its phase are kept.
  logic            prev_sign;
  logic [PH_W-1:0] prev_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sign  <= 1'b0;
      prev_phase <= '0;
      bit_valid  <= 1'b0;
      bit_out    <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (d_valid) begin
        prev_sign  <= d_y[W-1];
        prev_phase <= phase;
        if (wrap) begin
          bit_valid <= 1'b1;
          // distance after the centre: phase; before it: 2^PH_W - prev_phase
          if ({1'b0, phase} <= (PH_W+1)'(2 ** PH_W) - {1'b0, prev_phase})
            bit_out <= ~d_y[W-1];
          else
            bit_out <= ~prev_sign;
        end
      end
    end
  end
endmodule
