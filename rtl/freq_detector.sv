// freq_detector: the frequency detector shared by all tracks of the
// multi-track PLL.
//
// Assuming the tape speed variation is common to all tracks, the detector
// measures it from the intervals between zero crossings of every track's
// equalized signal and combines them into one control signal. Per track, a
// counter measures the interval D (in samples) between successive sign
// changes. The interval spans a whole number n of channel bits, found by
// rounding D against the current period estimate P (compare D with
// (k + 1/2) * P for k = 1 .. NMAX-1); intervals under half a bit are taken
// as noise and ignored, as are runs over NMAX bits. Each interval gives a
// per-bit period D/n (a reciprocal table of 1/n); its difference from P is
// summed over all tracks that had an interval in this cycle, and a
// first-order low-pass filter
//     P_acc += sum(D_i/n_i - P),      P = P_acc >>> K
// smooths the result (P in samples, F fractional bits, clamped to half and
// twice the nominal 3.2 samples). The control signal for the oscillators is
// the phase step for period P less the nominal step:
//     ctrl = 2^(PH_W+F) / P - NOM_INC.
// Using all tracks gives eight times the transitions of one track, so the
// filter can be narrower for the same noise. The interval-based principle,
// the combination of all tracks and the low-pass filter follow the
// multi-track PLL; the rounding, the filter form and all widths are this
// design's own.
//
// Timing: samples of all tracks arrive together with in_valid. P updates
// one cycle after a sample that ends an interval; ctrl follows P one cycle
// later. The filter's time constant is about 2^K divided by the number of
// intervals per sample over all tracks.
module freq_detector #(
  parameter int unsigned TRACKS  = 8,
  parameter int unsigned W       = 12,
  parameter int unsigned PH_W    = 16,
  parameter int unsigned F       = 10,   // fractional bits of P
  parameter int unsigned K       = 6,    // low-pass filter shift
  parameter int unsigned OSR_NUM = 16,   // samples per channel bit = 16/5 = 3.2
  parameter int unsigned OSR_DEN = 5,
  parameter int unsigned NMAX    = 7,    // longest interval considered, in bits
  parameter int unsigned CNT_W   = 6,
  parameter int unsigned CW      = 18
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [TRACKS-1:0][W-1:0]      y,
  output logic signed [CW-1:0]          ctrl,
  output logic [F+3:0]                  period,   // P, samples per bit, F fractional bits
  output logic [$clog2(TRACKS+1)-1:0]   n_events  // intervals used in the last update
);
  localparam int unsigned RF      = 16;
  localparam int unsigned PW      = F + 4;             // width of P
  localparam int unsigned AW      = PW + K + 5;        // width of P_acc
  localparam int unsigned NOM_P   = (2 * OSR_NUM * (2 ** F) + OSR_DEN) / (2 * OSR_DEN);
  localparam int unsigned NOM_INC = (OSR_DEN * (2 ** PH_W)) / OSR_NUM;
  localparam int unsigned P_MIN   = NOM_P / 2;
  localparam int unsigned P_MAX   = NOM_P * 2;

  function automatic logic [RF:0] recip(input int n);
    return (RF+1)'(((2 ** RF) + n / 2) / n);
  endfunction

  logic [TRACKS-1:0]            prev_sign, primed, seen;
  logic [TRACKS-1:0][CNT_W-1:0] cnt;
  logic [AW-1:0]                p_acc;
  logic [PW-1:0]                p;

  assign p      = p_acc[K +: PW];
  assign period = p;

  // Interval evaluation, all tracks in parallel.
  logic signed [AW-1:0]            esum;
  logic [$clog2(TRACKS+1)-1:0]     nev;

  always_comb begin
    esum = '0;
    nev  = '0;
    for (int t = 0; t < int'(TRACKS); t++) begin
      logic [CNT_W+F+1:0]   d2;      // 2*D*2^F
      int                   n;
      logic [CNT_W+RF+1:0]  prod;
      logic signed [AW-1:0] pi;
      d2   = (CNT_W+F+2)'(cnt[t]) << (F + 1);
      n    = 0;
      for (int k = 0; k < int'(NMAX) + 1; k++)
        if (32'(d2) >= (2 * k + 1) * 32'(p)) n = k + 1;
      prod = '0;
      pi   = '0;
      if (in_valid && seen[t] && (y[t][W-1] != prev_sign[t]) &&
          n >= 1 && n <= int'(NMAX) && cnt[t] != '1) begin
        prod  = (CNT_W+RF+2)'(cnt[t]) * (CNT_W+RF+2)'(recip(n));
        pi    = AW'(prod >> (RF - F));
        esum  = esum + pi - AW'(p);
        nev   = nev + 1'b1;
      end
    end
  end

  logic [AW-1:0] p_acc_next;

  always_comb begin
    p_acc_next = p_acc + esum;
    if (p_acc_next[AW-1] || p_acc_next < AW'(P_MIN) << K) p_acc_next = AW'(P_MIN) << K;
    else if (p_acc_next > AW'(P_MAX) << K)               p_acc_next = AW'(P_MAX) << K;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sign <= '0;
      primed    <= '0;
      seen      <= '0;
      cnt       <= '0;
      p_acc     <= AW'(NOM_P) << K;
      n_events  <= '0;
      ctrl      <= '0;
    end else begin
      if (in_valid) begin
        for (int t = 0; t < int'(TRACKS); t++) begin
          prev_sign[t] <= y[t][W-1];
          primed[t]    <= 1'b1;
          if (primed[t] && y[t][W-1] != prev_sign[t]) seen[t] <= 1'b1;
          if (y[t][W-1] != prev_sign[t]) cnt[t] <= CNT_W'(1);
          else if (cnt[t] != '1)         cnt[t] <= cnt[t] + 1'b1;
        end
        p_acc    <= p_acc_next;
        n_events <= nev;
      end
      ctrl <= CW'(signed'((2 ** (PH_W + F)) / int'(p)) - int'(NOM_INC));
    end
  end
endmodule
