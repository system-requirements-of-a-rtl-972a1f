// equalizer: digital read equalizer of one track, a first-order IIR section
// followed by an FIR filter.
//
// The cascade undoes the analog pre-equalization (a high-frequency boost
// placed before the 6-bit A-to-D converter) and shapes the overall channel
// response towards the full-response target H(w) = cos^3(w*Tc), so that the
// zero crossings of the output fall at regular bit boundaries. Because the
// channel impulse response differs between normal and reverse play and
// between home-recorded and pre-recorded tape, the coefficients are run-time
// inputs rather than constants. The IIR-then-FIR structure and the target
// follow the recorder's read channel; the filter orders, word widths and
// number formats are this design's own:
//   v[n] = x[n] + (a * v[n-1]) >>> CF          (IIR, saturated to W bits)
//   y[n] = (sum_k c[k] * v[n-k]) >>> CF         (FIR, saturated to W bits)
// with a and c[k] signed, CF fractional bits (c = 1<<CF is a gain of one).
//
// Timing: v and y are both registered, so y[n] leaves two clock cycles after
// x[n] enters, marked by out_valid. Samples may arrive every cycle.
module equalizer #(
  parameter int unsigned IN_W  = 6,   // A-to-D converter resolution
  parameter int unsigned W     = 12,  // internal and output width
  parameter int unsigned CW    = 10,  // coefficient width
  parameter int unsigned CF    = 8,   // coefficient fractional bits
  parameter int unsigned NTAPS = 7    // at least 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [IN_W-1:0]      x,
  input  logic signed [CW-1:0]        iir_a,
  input  logic [NTAPS-1:0][CW-1:0]    fir_c,     // fir_c[k] weights v[n-k]
  output logic                        out_valid,
  output logic signed [W-1:0]         y
);
  localparam int unsigned AW = W + CW + $clog2(NTAPS) + 1;
  localparam logic signed [AW-1:0] MAXV = AW'((2 ** (W - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(2 ** (W - 1));

  function automatic logic signed [W-1:0] sat(input logic signed [AW-1:0] v);
    if (v > MAXV)      return MAXV[W-1:0];
    else if (v < MINV) return MINV[W-1:0];
    else               return v[W-1:0];
  endfunction

  logic signed [W-1:0]            v;              // IIR state / output
  logic [NTAPS-2:0][W-1:0]        taps;           // FIR delay line, taps[0] newest
  logic signed [AW-1:0]           iir_acc, fir_acc;
  logic                           v_valid;

  always_comb begin
    iir_acc = AW'(x) + ((AW'(iir_a) * AW'(v)) >>> CF);
    fir_acc = AW'($signed(fir_c[0])) * AW'(v);
    for (int k = 1; k < int'(NTAPS); k++)
      fir_acc += AW'($signed(fir_c[k])) * AW'($signed(taps[k-1]));
    fir_acc = fir_acc >>> CF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v         <= '0;
      taps      <= '0;
      v_valid   <= 1'b0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      v_valid   <= in_valid;
      out_valid <= v_valid;
      if (in_valid) v <= sat(iir_acc);
      if (v_valid) begin
        taps <= {taps[NTAPS-3:0], v};
        y    <= sat(fir_acc);
      end
    end
  end
endmodule
