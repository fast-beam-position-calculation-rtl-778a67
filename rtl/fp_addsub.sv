// fp_addsub: IEEE-754 single-precision adder/subtractor, fully pipelined.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1). One operation can be
// started every clock; its result appears LATENCY cycles later with
// out_valid. The sum is formed exactly on a 50-bit field (24-bit
// significands, 25 bits below the point, one sticky bit for the part of the
// smaller operand shifted out), normalised by a leading-zero count and
// rounded to nearest even by fp32_pkg::fp_round_pack. Subnormals are flushed
// to zero; NaN and infinity follow IEEE-754 (inf - inf gives a quiet NaN).
// The position calculation uses this unit for the channel sums, the
// differences and the offsets. That the add/subtract is single precision
// follows the 32-bit floating-point path of the design; the latency of 12
// cycles is a choice of this design (with the other units it makes the
// position calculation take the 75 cycles measured on the hardware).
module fp_addsub
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output logic  out_valid,
  output fp32_t y
);
  fp32_t res;

  always_comb begin
    logic               sa, sb, sx, sy, eff_sub, sticky, st2;
    logic [7:0]         ea, eb, ex, ey, d;
    logic [23:0]        ma, mb, mx, my;
    logic [47:0]        bsh, bfull;
    logic [49:0]        s;
    logic [5:0]         lz;
    logic [49:0]        sn;
    logic signed [11:0] e;
    sa = a[31]; ea = a[30:23]; ma = fp_sig(a);
    sb = b[31] ^ sub; eb = b[30:23]; mb = fp_sig(b);
    res = '0; sticky = 1'b0; bsh = '0; bfull = '0; s = '0; lz = '0; sn = '0; e = '0; st2 = 1'b0;
    // order so that |x| >= |y|
    if ({eb, mb} > {ea, ma}) begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end else begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end
    eff_sub = sx ^ sy;
    d       = ex - ey;
    if (fp_is_nan(a) || fp_is_nan(b)) res = FP_QNAN;
    else if (fp_is_inf(a) && fp_is_inf(b)) res = (a[31] == sb) ? {sa, FP_POSINF[30:0]} : FP_QNAN;
    else if (fp_is_inf(a)) res = a;
    else if (fp_is_inf(b)) res = {sb, FP_POSINF[30:0]};
    else if (ey == 8'd0 && ex == 8'd0) res = {sa & sb, 31'd0};
    else if (ey == 8'd0) res = {sx, ex, mx[22:0]};
    else begin
      bfull = {my, 24'd0};
      if (d >= 8'd48) begin
        bsh = '0; sticky = 1'b1;
      end else begin
        bsh    = bfull >> d;
        sticky = |(bfull & ((48'd1 << d) - 48'd1));
      end
      if (eff_sub) s = {1'b0, mx, 25'd0} - {1'b0, bsh, sticky};
      else         s = {1'b0, mx, 25'd0} + {1'b0, bsh, sticky};
      if (s == '0) res = '0;                     // exact cancellation: +0
      else begin
        lz = 6'd50;
        for (int i = 0; i <= 49; i++) if (s[i]) lz = 6'(49 - i);
        sn  = s << lz;
        st2 = |sn[22:0];
        e   = $signed({4'd0, ex}) + 12'sd1 - $signed({6'd0, lz});
        res = fp_round_pack(sx, e, sn[49:23], st2);
      end
    end
  end

  pipe_delay #(.W(32), .LATENCY(LATENCY)) u_lat (
    .clk, .rst_n, .in_valid, .in_data(res), .out_valid, .out_data(y)
  );
endmodule
