// mtr_top: channel electronics of a stationary-head multi-track tape
// recorder: TRACKS parallel write formatters and a TRACKS-track read channel
// built around the multi-track PLL.
//
// Write side: per track, a tape_formatter turns a byte stream into ETM-coded
// tape blocks and frames and sends one channel bit per wr_bit_en.
//
// Read side, per track, on the sample clock (3.2 samples per channel bit,
// one sample per adc_valid): a 6-bit A-to-D sample is equalized (equalizer),
// then clocked by its own PLL (track_pll: delay T1, phase comparator, loop
// filter, adder, oscillator and bit detector), and the recovered bits are
// block-synchronised and ETM-decoded (tape_deformatter). One freq_detector
// watches the zero crossings of all equalized tracks and drives the extra
// oscillator input of every PLL with the common speed control signal; it is
// outside every loop. The equalizer coefficients are shared by all tracks
// and set at run time for the play mode (normal or reverse, home-recorded or
// pre-recorded tape). Head, read amplifiers, analog filters and converters
// are outside this design.
//
// Timing: everything runs on one clock, the sample clock from the crystal;
// the write bit rate and the read sample rate are set by the enables.
module mtr_top
  import mtr_pkg::*;
#(
  parameter int unsigned TRACKS = 8,
  parameter int unsigned ADC_W  = 6,
  parameter int unsigned W      = 12,
  parameter int unsigned CW_EQ  = 10,
  parameter int unsigned NTAPS  = 7,
  parameter int unsigned PH_W   = 16,
  parameter int unsigned CW     = 18,
  parameter int unsigned T1     = 48,
  parameter int unsigned BLOCKS = FRAME_BLOCKS
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // write side
  input  logic                                wr_bit_en,
  input  logic [TRACKS-1:0]                   wr_valid,
  input  logic [TRACKS-1:0][7:0]              wr_data,
  output logic [TRACKS-1:0]                   wr_ready,
  output logic [TRACKS-1:0]                   wr_bit,
  output logic [TRACKS-1:0]                   wr_in_gap,
  output logic [TRACKS-1:0]                   wr_frame_start,
  output logic [TRACKS-1:0]                   wr_underrun,
  output logic [TRACKS-1:0]                   wr_gap_stretch,
  // read side
  input  logic                                adc_valid,
  input  logic [TRACKS-1:0][ADC_W-1:0]        adc,
  input  logic [CW_EQ-1:0]                    iir_a,
  input  logic [NTAPS-1:0][CW_EQ-1:0]         fir_c,
  output logic [TRACKS-1:0]                   rd_bit_valid,
  output logic [TRACKS-1:0]                   rd_bit,
  output logic [TRACKS-1:0]                   rd_valid,
  output logic [TRACKS-1:0][7:0]              rd_data,
  output logic [TRACKS-1:0]                   rd_err,
  output logic [TRACKS-1:0][7:0]              rd_blk,
  output logic [TRACKS-1:0][7:0]              rd_frame,
  output logic [TRACKS-1:0][5:0]              rd_idx,
  output logic [TRACKS-1:0]                   rd_locked,
  output logic [TRACKS-1:0]                   rd_lock_event,
  output logic [TRACKS-1:0]                   rd_gap_event,
  output logic [TRACKS-1:0]                   rd_pe_valid,   // per-track phase error
  output logic [TRACKS-1:0][PH_W-1:0]         rd_pe,
  output logic signed [CW-1:0]                speed_ctrl,
  output logic [13:0]                         speed_period,
  output logic [$clog2(TRACKS+1)-1:0]         speed_events
);
  localparam int unsigned NOM_INC = 20480;  // 2^16 / 3.2

  // ---------------- write side ----------------
  for (genvar t = 0; t < int'(TRACKS); t++) begin : g_wr
    tape_formatter #(.BLOCKS(BLOCKS)) u_fmt (
      .clk(clk), .rst_n(rst_n), .bit_en(wr_bit_en),
      .s_valid(wr_valid[t]), .s_data(wr_data[t]), .s_ready(wr_ready[t]),
      .bit_out(wr_bit[t]), .in_gap(wr_in_gap[t]),
      .frame_start(wr_frame_start[t]), .underrun(wr_underrun[t]),
      .gap_stretch(wr_gap_stretch[t])
    );
  end

  // ---------------- read side ----------------
  logic [TRACKS-1:0][W-1:0] eq_y;
  logic [TRACKS-1:0]        eq_valid;

  for (genvar t = 0; t < int'(TRACKS); t++) begin : g_eq
    equalizer #(.IN_W(ADC_W), .W(W), .CW(CW_EQ), .NTAPS(NTAPS)) u_eq (
      .clk(clk), .rst_n(rst_n), .in_valid(adc_valid), .x(adc[t]),
      .iir_a(iir_a), .fir_c(fir_c), .out_valid(eq_valid[t]), .y(eq_y[t])
    );
  end

  freq_detector #(.TRACKS(TRACKS), .W(W), .PH_W(PH_W), .CW(CW)) u_fd (
    .clk(clk), .rst_n(rst_n), .in_valid(eq_valid[0]), .y(eq_y),
    .ctrl(speed_ctrl), .period(speed_period), .n_events(speed_events)
  );

  for (genvar t = 0; t < int'(TRACKS); t++) begin : g_rd
    track_pll #(.W(W), .PH_W(PH_W), .CW(CW), .NOM_INC(NOM_INC), .T1(T1)) u_pll (
      .clk(clk), .rst_n(rst_n), .in_valid(eq_valid[t]), .y(eq_y[t]),
      .ctrl(speed_ctrl), .bit_valid(rd_bit_valid[t]), .bit_out(rd_bit[t]),
      .pe_valid(rd_pe_valid[t]), .pe(rd_pe[t])
    );

    tape_deformatter #(.BLOCKS(BLOCKS)) u_dfm (
      .clk(clk), .rst_n(rst_n), .bit_valid(rd_bit_valid[t]), .bit_in(rd_bit[t]),
      .out_valid(rd_valid[t]), .out_data(rd_data[t]), .out_err(rd_err[t]),
      .out_blk(rd_blk[t]), .out_frame(rd_frame[t]), .out_idx(rd_idx[t]),
      .locked(rd_locked[t]), .lock_event(rd_lock_event[t]),
      .gap_event(rd_gap_event[t])
    );
  end
endmodule
