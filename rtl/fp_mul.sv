// fp_mul: IEEE-754 single-precision multiplier, fully pipelined.
//
// y = a * b. The 24x24-bit significand product is normalised by one bit at
// most and rounded to nearest even; subnormals are flushed to zero, and
// NaN, infinity and inf*0 (quiet NaN) follow IEEE-754. One operation can be
// started every clock and its result appears LATENCY cycles later with
// out_valid. The position calculation uses it to scale the normalised
// difference by Kx or Ky. The latency of 9 cycles is a choice of this design.
module fp_mul
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 9
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  fp32_t res;

  always_comb begin
    logic               s;
    logic [47:0]        p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    p = fp_sig(a) * fp_sig(b);
    e = $signed({4'd0, a[30:23]}) + $signed({4'd0, b[30:23]}) - 12'sd127;
    if (fp_is_nan(a) || fp_is_nan(b)) res = FP_QNAN;
    else if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_inf(b) && fp_is_zero(a))) res = FP_QNAN;
    else if (fp_is_inf(a) || fp_is_inf(b)) res = {s, FP_POSINF[30:0]};
    else if (fp_is_zero(a) || fp_is_zero(b)) res = {s, 31'd0};
    else if (p[47]) res = fp_round_pack(s, e + 12'sd1, p[47:21], |p[20:0]);
    else            res = fp_round_pack(s, e,          p[46:20], |p[19:0]);
  end

  pipe_delay #(.W(32), .LATENCY(LATENCY)) u_lat (
    .clk, .rst_n, .in_valid, .in_data(res), .out_valid, .out_data(y)
  );
endmodule
