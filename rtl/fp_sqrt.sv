// fp_sqrt: IEEE-754 single-precision square root, y = sqrt(a), fully
// pipelined.
//
// Digit-by-digit (restoring) square root unrolled into a pipeline: stage k
// produces result bit k, 27 bits in all (integer bit, 23 fraction bits,
// guard and two round bits), and the final remainder gives the sticky bit
// for round-to-nearest-even. An odd exponent is made even by doubling the
// significand as the operand is taken. A new operand can enter every clock
// and its result appears with out_valid exactly LATENCY clocks later
// (LATENCY >= 29); the default of 29 clocks with one operation per clock is
// the configuration of the square-root core of the original implementation
// ("maximum latency"). sqrt(+0) = +0, sqrt(-0) = -0, sqrt(+inf) = +inf, and
// a negative operand or a NaN gives a quiet NaN; subnormal inputs are
// flushed to zero. The digit-by-digit algorithm is a choice of this design.
module fp_sqrt
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 29
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  output logic  out_valid,
  output fp32_t y
);
  localparam int unsigned NITER = 27;

  typedef struct packed {
    logic               special;
    fp32_t              special_res;
    logic signed [11:0] exp;
    logic [53:0]        rad;      // radicand, consumed two bits per stage from the top
    logic [31:0]        rem;
    logic [26:0]        root;
  } stage_t;

  stage_t st  [NITER + 1];
  logic   vld [NITER + 1];
  fp32_t  res;

  // stage 0: classify and align the operand
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld[0] <= 1'b0;
    else        vld[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    logic signed [11:0] e_unb;
    e_unb = $signed({4'd0, a[30:23]}) - 12'sd127;
    st[0].special     <= 1'b1;
    st[0].special_res <= FP_QNAN;
    if (fp_is_nan(a))       st[0].special_res <= FP_QNAN;
    else if (fp_is_zero(a)) st[0].special_res <= {a[31], 31'd0};
    else if (a[31])         st[0].special_res <= FP_QNAN;
    else if (fp_is_inf(a))  st[0].special_res <= FP_POSINF;
    else                    st[0].special     <= 1'b0;
    // value = sig * 2^(e_unb - 23); root = floor(sqrt(sig * 2^(29 or 30)))
    if (e_unb[0]) begin
      st[0].rad <= {fp_sig(a), 30'd0};
      st[0].exp <= ((e_unb - 12'sd1) >>> 1) + 12'sd127;
    end else begin
      st[0].rad <= {1'b0, fp_sig(a), 29'd0};
      st[0].exp <= (e_unb >>> 1) + 12'sd127;
    end
    st[0].rem  <= '0;
    st[0].root <= '0;
  end

  // stages 1..NITER: one result bit each
  for (genvar k = 1; k <= NITER; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[k] <= 1'b0;
      else        vld[k] <= vld[k-1];

    always_ff @(posedge clk) begin
      logic [31:0] r2, trial;
      r2    = {st[k-1].rem[29:0], st[k-1].rad[53:52]};
      trial = {3'b000, st[k-1].root, 2'b01};
      st[k].special     <= st[k-1].special;
      st[k].special_res <= st[k-1].special_res;
      st[k].exp         <= st[k-1].exp;
      st[k].rad         <= st[k-1].rad << 2;
      if (r2 >= trial) begin
        st[k].rem  <= r2 - trial;
        st[k].root <= {st[k-1].root[25:0], 1'b1};
      end else begin
        st[k].rem  <= r2;
        st[k].root <= {st[k-1].root[25:0], 1'b0};
      end
    end
  end

  always_comb
    if (st[NITER].special) res = st[NITER].special_res;
    else                   res = fp_round_pack(1'b0, st[NITER].exp, st[NITER].root, |st[NITER].rem);

  // rounding and the remaining latency
  pipe_delay #(.W(32), .LATENCY(LATENCY - NITER - 1)) u_lat (
    .clk, .rst_n, .in_valid(vld[NITER]), .in_data(res), .out_valid, .out_data(y)
  );

  initial assert (LATENCY >= NITER + 2)
    else $error("fp_sqrt: LATENCY must be at least %0d", NITER + 2);
endmodule
