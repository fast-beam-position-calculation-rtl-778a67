// fix2float: unsigned integer to IEEE-754 single precision.
//
// Converts the IN_W-bit unsigned sum of squares from tdp_mac (47 bits in the
// original design) to a 32-bit float, so that the amplitude, the sums and
// the position can be computed in floating point. A leading-zero count
// normalises the word; the 24 leading bits become the significand and the
// rest is rounded to nearest even. Zero gives +0. The result appears
// LATENCY cycles after the input with out_valid, fully pipelined. The input
// and output widths follow the design; the rounding mode and the latency
// (1 cycle) are choices of this design.
module fix2float
  import fp32_pkg::*;
#(
  parameter int unsigned IN_W    = 47,
  parameter int unsigned LATENCY = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [IN_W-1:0] u,
  output logic            out_valid,
  output fp32_t           y
);
  fp32_t res;

  always_comb begin
    logic [63:0]        w, sh;
    logic [6:0]         lz;
    logic signed [11:0] e;
    w  = 64'(u);
    lz = 7'd64;
    for (int i = 0; i < 64; i++) if (w[i]) lz = 7'(63 - i);
    sh = w << lz;
    e  = 12'sd127 + 12'sd63 - $signed({5'd0, lz});
    res = (w == '0) ? '0 : fp_round_pack(1'b0, e, sh[63:37], |sh[36:0]);
  end

  pipe_delay #(.W(32), .LATENCY(LATENCY)) u_lat (
    .clk, .rst_n, .in_valid, .in_data(res), .out_valid, .out_data(y)
  );

  initial assert (IN_W >= 1 && IN_W <= 64) else $error("fix2float: IN_W must be 1..64");
endmodule
