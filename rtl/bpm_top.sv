// bpm_top: FPGA signal path of a digital beam position monitor (BPM)
// processor with time-domain amplitude processing.
//
// Each BPM pick-up has four button electrodes A, B, C, D; their RF signals
// are sampled by 16-bit ADCs (250 MS/s, one sample per clock here). For
// every pick-up the four channels run in lockstep through bpm_channel
// (high-pass FIR, sum of squares over a triggered window, conversion to
// float, square root) and the four amplitudes go to xy_calc, which returns
// the beam position (x, y) and SUM as 32-bit floats. N_BPM sets how many
// pick-ups one processor serves: 1 is the baseline, 2 the extended build
// with a second ADC card.
// Interface:
//   adc_valid, adc_data[b][c]  samples, channel c = 0..3 is electrode A..D
//   trig, win_len              window start (one-clock pulse) and length N
//   kx, ky, xoff, yoff [b]     scaling and offsets per pick-up (float)
//   coef_*                     FIR coefficient reload, coef_sel = 4*b + c
//   xy_valid[b], x, y, sum     position result, one per trigger
//   amp_valid[b], amp[b][c]    the electrode amplitudes, for the host
// Timing: with the defaults the position follows the last sample of the
// window (as it leaves the FIR) by 1 + 1 + 29 + 75 = 106 clocks: tdp_mac
// output register, fixed-to-float, square root (29) and the x/y
// calculation (75). The ADC receiver, trigger isolation and host are
// outside this module: samples and the trigger arrive synchronous to clk.
module bpm_top
  import fp32_pkg::*;
#(
  parameter int unsigned N_BPM    = 1,
  parameter int unsigned NTAPS    = 63,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned ACC_W    = 47,
  parameter int unsigned WIN_W    = ACC_W - 2 * (DATA_W - 1),
  parameter int unsigned SQRT_LAT = 29,
  parameter int unsigned ADD_LAT  = 12,
  parameter int unsigned MUL_LAT  = 9,
  parameter int unsigned DIV_LAT  = 29,
  localparam int unsigned NCH     = 4 * N_BPM,
  localparam int unsigned SEL_W   = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_valid,
  input  logic signed [DATA_W-1:0] adc_data [N_BPM][4],
  input  logic                     trig,
  input  logic [WIN_W-1:0]         win_len,
  input  fp32_t                    kx   [N_BPM],
  input  fp32_t                    ky   [N_BPM],
  input  fp32_t                    xoff [N_BPM],
  input  fp32_t                    yoff [N_BPM],
  input  logic                     coef_valid,
  input  logic [SEL_W-1:0]         coef_sel,
  input  logic signed [15:0]       coef_data,
  input  logic                     coef_last,
  output logic [NCH-1:0]           reload_done,
  output logic                     trig_lost,
  output logic [N_BPM-1:0]         amp_valid,
  output fp32_t                    amp  [N_BPM][4],
  output logic [N_BPM-1:0]         xy_valid,
  output fp32_t                    x    [N_BPM],
  output fp32_t                    y    [N_BPM],
  output fp32_t                    sum  [N_BPM]
);
  logic [NCH-1:0] ch_amp_valid, ch_trig_lost;

  assign trig_lost = |ch_trig_lost;

  for (genvar b = 0; b < N_BPM; b++) begin : g_bpm

    for (genvar c = 0; c < 4; c++) begin : g_ch
      localparam int unsigned IDX = 4 * b + c;
      bpm_channel #(
        .NTAPS(NTAPS), .DATA_W(DATA_W), .ACC_W(ACC_W), .WIN_W(WIN_W),
        .F2F_LAT(1), .SQRT_LAT(SQRT_LAT)
      ) u_ch (
        .clk, .rst_n,
        .adc_valid, .adc_data(adc_data[b][c]),
        .trig, .win_len,
        .coef_valid(coef_valid && coef_sel == SEL_W'(IDX)),
        .coef_data, .coef_last,
        .reload_done(reload_done[IDX]),
        .trig_lost(ch_trig_lost[IDX]),
        .sum_valid(), .sum_sq(),
        .amp_valid(ch_amp_valid[IDX]), .amp(amp[b][c])
      );
    end

    assign amp_valid[b] = &ch_amp_valid[4*b +: 4];

    xy_calc #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .DIV_LAT(DIV_LAT)) u_xy (
      .clk, .rst_n,
      .in_valid(amp_valid[b]),
      .va(amp[b][0]), .vb(amp[b][1]), .vc(amp[b][2]), .vd(amp[b][3]),
      .kx(kx[b]), .ky(ky[b]), .xoff(xoff[b]), .yoff(yoff[b]),
      .out_valid(xy_valid[b]), .x(x[b]), .y(y[b]), .sum(sum[b])
    );

    // the four channels of a pick-up share trigger and samples, so their
    // amplitudes arrive together
    assert property (@(posedge clk) disable iff (!rst_n)
                     (|ch_amp_valid[4*b +: 4]) |-> (&ch_amp_valid[4*b +: 4]));
  end
endmodule
