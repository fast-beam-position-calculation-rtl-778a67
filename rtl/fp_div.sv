// fp_div: IEEE-754 single-precision divider, y = a / b, fully pipelined.
//
// A restoring divider unrolled into a pipeline. The integer quotient bit is
// found as the operands are taken and each of the following 27 stages adds
// one more bit: 28 bits in all (integer bit, 23 fraction bits, guard and
// round bits, one spare for the normalising shift), the remainder giving
// the sticky bit for round-to-nearest-even. A new pair of operands can enter
// every clock; the result appears with out_valid exactly LATENCY clocks
// later (LATENCY >= 29). Zero, infinity and NaN follow IEEE-754 (0/0 and
// inf/inf give a quiet NaN, x/0 gives infinity); subnormals are flushed to
// zero. The algorithm and the latency of 29 clocks are choices of this
// design.
module fp_div
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 29
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  localparam int unsigned NQ = 28;          // quotient bits
  localparam int unsigned NS = NQ - 1;      // stages after the first

  typedef struct packed {
    logic               special;
    fp32_t              special_res;
    logic               sign;
    logic signed [11:0] exp;
    logic [24:0]        rem;
    logic [23:0]        divisor;
    logic [NQ-1:0]      quo;
  } stage_t;

  stage_t st  [NS + 1];
  logic   vld [NS + 1];
  fp32_t  res;

  // special cases decided when the operands are taken
  function automatic logic [32:0] classify(fp32_t n, fp32_t d);
    logic s;
    s = n[31] ^ d[31];
    if (fp_is_nan(n) || fp_is_nan(d))                        return {1'b1, FP_QNAN};
    if ((fp_is_zero(n) && fp_is_zero(d)) ||
        (fp_is_inf(n) && fp_is_inf(d)))                      return {1'b1, FP_QNAN};
    if (fp_is_inf(n) || fp_is_zero(d))                       return {1'b1, s, FP_POSINF[30:0]};
    if (fp_is_zero(n) || fp_is_inf(d))                       return {1'b1, s, 31'd0};
    return {1'b0, 32'd0};
  endfunction

  // stage 0: classify, exponent, integer quotient bit
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld[0] <= 1'b0;
    else        vld[0] <= in_valid;

  always_ff @(posedge clk) begin
    {st[0].special, st[0].special_res} <= classify(a, b);
    st[0].sign    <= a[31] ^ b[31];
    st[0].exp     <= $signed({4'd0, a[30:23]}) - $signed({4'd0, b[30:23]}) + 12'sd127;
    st[0].divisor <= fp_sig(b);
    if (fp_sig(a) >= fp_sig(b)) begin
      st[0].quo <= NQ'(1);
      st[0].rem <= {1'b0, fp_sig(a) - fp_sig(b)} << 1;
    end else begin
      st[0].quo <= '0;
      st[0].rem <= {fp_sig(a), 1'b0};
    end
  end

  // stages 1..NS: one quotient bit each
  for (genvar k = 1; k <= NS; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[k] <= 1'b0;
      else        vld[k] <= vld[k-1];

    always_ff @(posedge clk) begin
      st[k].special     <= st[k-1].special;
      st[k].special_res <= st[k-1].special_res;
      st[k].sign        <= st[k-1].sign;
      st[k].exp         <= st[k-1].exp;
      st[k].divisor     <= st[k-1].divisor;
      if (st[k-1].rem >= {1'b0, st[k-1].divisor}) begin
        st[k].quo <= {st[k-1].quo[NQ-2:0], 1'b1};
        st[k].rem <= (st[k-1].rem - {1'b0, st[k-1].divisor}) << 1;
      end else begin
        st[k].quo <= {st[k-1].quo[NQ-2:0], 1'b0};
        st[k].rem <= st[k-1].rem << 1;
      end
    end
  end

  always_comb begin
    logic sticky;
    sticky = |st[NS].rem;
    if (st[NS].special)     res = st[NS].special_res;
    else if (st[NS].quo[NQ-1])
      res = fp_round_pack(st[NS].sign, st[NS].exp, st[NS].quo[NQ-1:1], st[NS].quo[0] | sticky);
    else
      res = fp_round_pack(st[NS].sign, st[NS].exp - 12'sd1, st[NS].quo[NQ-2:0], sticky);
  end

  // rounding and the remaining latency
  pipe_delay #(.W(32), .LATENCY(LATENCY - NS - 1)) u_lat (
    .clk, .rst_n, .in_valid(vld[NS]), .in_data(res), .out_valid, .out_data(y)
  );

  initial assert (LATENCY >= NQ + 1)
    else $error("fp_div: LATENCY must be at least %0d", NQ + 1);
endmodule
