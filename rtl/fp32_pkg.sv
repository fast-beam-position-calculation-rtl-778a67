// fp32_pkg: IEEE-754 single-precision helpers shared by the floating-point
// units of the beam-position pipeline (fix2float, fp_addsub, fp_mul, fp_div,
// fp_sqrt).
//
// All units round to nearest, ties to even, and flush subnormal inputs and
// results to signed zero, as FPGA floating-point operator cores commonly do.
// fp_round_pack() is the common back end: it takes a sign, a biased exponent
// (wide and signed so under- and overflow can be seen) and a 27-bit
// significand 1.f[22:0] followed by guard and two round bits plus a sticky
// bit, and returns the packed, rounded word. The rounding mode and the
// subnormal handling are choices of this design.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_QNAN   = 32'h7FC0_0000;
  localparam fp32_t FP_POSINF = 32'h7F80_0000;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_fields_t;

  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'd0;                     // zero or flushed subnormal
  endfunction

  function automatic logic fp_is_inf(fp32_t a);
    return a[30:23] == 8'hFF && a[22:0] == 23'd0;
  endfunction

  function automatic logic fp_is_nan(fp32_t a);
    return a[30:23] == 8'hFF && a[22:0] != 23'd0;
  endfunction

  // 24-bit significand with the hidden bit (zero for zero/subnormal).
  function automatic logic [23:0] fp_sig(fp32_t a);
    return {a[30:23] != 8'd0, a[22:0]};
  endfunction

  // Round-to-nearest-even and pack. m[26] must be 1 (normalised) unless the
  // value is zero, in which case zero is returned.
  function automatic fp32_t fp_round_pack(logic sign, logic signed [11:0] exp_b,
                                          logic [26:0] m, logic sticky);
    logic        lsb, g, rest, up;
    logic [24:0] r;
    logic signed [11:0] e;
    if (m[26] == 1'b0) return {sign, 31'd0};
    lsb  = m[3];
    g    = m[2];
    rest = (|m[1:0]) | sticky;
    up   = g & (rest | lsb);
    r    = {1'b0, m[26:3]} + 25'(up);
    e    = exp_b;
    if (r[24]) begin
      r = r >> 1;
      e = e + 12'sd1;
    end
    if (e >= 12'sd255) return {sign, FP_POSINF[30:0]};
    if (e <= 12'sd0)   return {sign, 31'd0};
    return {sign, e[7:0], r[22:0]};
  endfunction

  // Number of leading zeros of a 48-bit word (48 when zero).
  function automatic logic [5:0] clz48(logic [47:0] v);
    for (int i = 47; i >= 0; i--)
      if (v[i]) return 6'(47 - i);
    return 6'd48;
  endfunction

endpackage
