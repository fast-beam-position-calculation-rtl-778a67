// bpm_channel: amplitude of one BPM electrode signal by time-domain
// processing.
//
// Chain: fir_hp (DC removal, reloadable) -> tdp_mac (sum of x(n)^2 over the
// triggered window) -> fix2float (47-bit unsigned to float) -> fp_sqrt,
// giving V = sqrt(sum x(n)^2) as a 32-bit float. The order of the stages
// and the 16/16/47/32-bit widths between them follow the design; the
// amplitude is not divided by N, so it scales with the window length
// (the position, a ratio of amplitudes, does not depend on it).
// Timing: samples enter at one per clock with adc_valid. The trigger opens
// the window in tdp_mac; since the filter delays the samples by 3 clocks,
// the window covers the filtered samples whose raw samples arrived from
// 2 clocks before the trigger onwards. amp_valid pulses
// 1 + F2F_LAT + SQRT_LAT clocks after the last sample of the window has
// left the filter.
module bpm_channel
  import fp32_pkg::*;
#(
  parameter int unsigned NTAPS    = 63,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned ACC_W    = 47,
  parameter int unsigned WIN_W    = ACC_W - 2 * (DATA_W - 1),
  parameter int unsigned F2F_LAT  = 1,
  parameter int unsigned SQRT_LAT = 29
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_valid,
  input  logic signed [DATA_W-1:0] adc_data,
  input  logic                     trig,
  input  logic [WIN_W-1:0]         win_len,
  input  logic                     coef_valid,
  input  logic signed [15:0]       coef_data,
  input  logic                     coef_last,
  output logic                     reload_done,
  output logic                     trig_lost,
  output logic                     sum_valid,
  output logic [ACC_W-1:0]         sum_sq,
  output logic                     amp_valid,
  output fp32_t                    amp
);
  logic                     f_valid;
  logic signed [DATA_W-1:0] f_data;
  logic                     c_valid;
  fp32_t                    c_float;

  fir_hp #(.NTAPS(NTAPS), .DATA_W(DATA_W), .COEF_W(16)) u_fir (
    .clk, .rst_n,
    .in_valid(adc_valid), .din(adc_data),
    .out_valid(f_valid), .dout(f_data),
    .coef_valid, .coef_data, .coef_last, .reload_done
  );

  tdp_mac #(.DATA_W(DATA_W), .ACC_W(ACC_W), .WIN_W(WIN_W)) u_mac (
    .clk, .rst_n, .trig, .win_len,
    .in_valid(f_valid), .din(f_data),
    .busy(), .trig_lost,
    .out_valid(sum_valid), .sum(sum_sq)
  );

  fix2float #(.IN_W(ACC_W), .LATENCY(F2F_LAT)) u_f2f (
    .clk, .rst_n, .in_valid(sum_valid), .u(sum_sq),
    .out_valid(c_valid), .y(c_float)
  );

  fp_sqrt #(.LATENCY(SQRT_LAT)) u_sqrt (
    .clk, .rst_n, .in_valid(c_valid), .a(c_float),
    .out_valid(amp_valid), .y(amp)
  );
endmodule
