// xy_calc: beam position from the four electrode amplitudes, in IEEE-754
// single precision.
//
//     SUM = VA + VB + VC + VD
//     x   = Kx * ((VA + VD) - (VB + VC)) / SUM + Xoff
//     y   = Ky * ((VA + VB) - (VC + VD)) / SUM + Yoff
//
// Kx, Ky (19.5 mm for the FEL-HMF pick-ups) and the offsets are inputs held
// by the host; they are taken together with the amplitudes and travel down
// the pipeline beside them. Pipeline:
//   1. four adders     VA+VD, VB+VC, VA+VB, VC+VD          ADD_LAT
//   2. three adders    the two differences and SUM         ADD_LAT
//   3. two dividers    difference / SUM                    DIV_LAT
//   4. two multipliers by Kx, Ky                           MUL_LAT
//   5. two adders      + Xoff, + Yoff                      ADD_LAT
//   6. output register                                     1
// With the defaults (12, 12, 29, 9, 12, 1) out_valid follows in_valid by
// 75 clocks, the x/y calculation time measured on the original hardware;
// the split among the stages is a choice of this design. Every unit is
// fully pipelined, so a new set of amplitudes can enter every clock. With
// the default square root (29 clocks) the amplitude-to-position path is
// 104 clocks, well within the 125 clocks between triggers at a 2 MHz
// repetition rate and 250 MHz.
module xy_calc
  import fp32_pkg::*;
#(
  parameter int unsigned ADD_LAT = 12,
  parameter int unsigned MUL_LAT = 9,
  parameter int unsigned DIV_LAT = 29
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t va,
  input  fp32_t vb,
  input  fp32_t vc,
  input  fp32_t vd,
  input  fp32_t kx,
  input  fp32_t ky,
  input  fp32_t xoff,
  input  fp32_t yoff,
  output logic  out_valid,
  output fp32_t x,
  output fp32_t y,
  output fp32_t sum
);
  localparam int unsigned LATENCY = 3 * ADD_LAT + MUL_LAT + DIV_LAT + 1;

  // Kx, Ky wait for the divider outputs, the offsets for the multipliers
  localparam int unsigned K_LAT   = 2 * ADD_LAT + DIV_LAT;
  localparam int unsigned OFF_LAT = K_LAT + MUL_LAT;

  fp32_t kx_d, ky_d, xoff_d, yoff_d;

  pipe_delay #(.W(64), .LATENCY(K_LAT)) u_kdly (
    .clk, .rst_n, .in_valid(in_valid), .in_data({kx, ky}),
    .out_valid(), .out_data({kx_d, ky_d})
  );
  pipe_delay #(.W(64), .LATENCY(OFF_LAT)) u_odly (
    .clk, .rst_n, .in_valid(in_valid), .in_data({xoff, yoff}),
    .out_valid(), .out_data({xoff_d, yoff_d})
  );

  // stage 1: pair sums
  logic  s1_v, s1_v1, s1_v2, s1_v3;
  fp32_t s_ad, s_bc, s_ab, s_cd;
  fp_addsub #(.LATENCY(ADD_LAT)) u_ad (.clk, .rst_n, .in_valid(in_valid), .a(va), .b(vd), .sub(1'b0), .out_valid(s1_v),  .y(s_ad));
  fp_addsub #(.LATENCY(ADD_LAT)) u_bc (.clk, .rst_n, .in_valid(in_valid), .a(vb), .b(vc), .sub(1'b0), .out_valid(s1_v1), .y(s_bc));
  fp_addsub #(.LATENCY(ADD_LAT)) u_ab (.clk, .rst_n, .in_valid(in_valid), .a(va), .b(vb), .sub(1'b0), .out_valid(s1_v2), .y(s_ab));
  fp_addsub #(.LATENCY(ADD_LAT)) u_cd (.clk, .rst_n, .in_valid(in_valid), .a(vc), .b(vd), .sub(1'b0), .out_valid(s1_v3), .y(s_cd));

  // stage 2: differences and total
  logic  s2_v, s2_v1, s2_v2;
  fp32_t dx, dy, s_all;
  fp_addsub #(.LATENCY(ADD_LAT)) u_dx  (.clk, .rst_n, .in_valid(s1_v), .a(s_ad), .b(s_bc), .sub(1'b1), .out_valid(s2_v),  .y(dx));
  fp_addsub #(.LATENCY(ADD_LAT)) u_dy  (.clk, .rst_n, .in_valid(s1_v), .a(s_ab), .b(s_cd), .sub(1'b1), .out_valid(s2_v1), .y(dy));
  fp_addsub #(.LATENCY(ADD_LAT)) u_sum (.clk, .rst_n, .in_valid(s1_v), .a(s_ad), .b(s_bc), .sub(1'b0), .out_valid(s2_v2), .y(s_all));

  // stage 3: normalised differences; SUM is kept for the host
  logic  s3_v, s3_v1;
  fp32_t qx, qy, sum_q;
  fp_div #(.LATENCY(DIV_LAT)) u_divx (.clk, .rst_n, .in_valid(s2_v), .a(dx), .b(s_all), .out_valid(s3_v),  .y(qx));
  fp_div #(.LATENCY(DIV_LAT)) u_divy (.clk, .rst_n, .in_valid(s2_v), .a(dy), .b(s_all), .out_valid(s3_v1), .y(qy));
  pipe_delay #(.W(32), .LATENCY(DIV_LAT + MUL_LAT + ADD_LAT)) u_sdly (
    .clk, .rst_n, .in_valid(s2_v), .in_data(s_all), .out_valid(), .out_data(sum_q)
  );

  // stage 4: scale
  logic  s4_v, s4_v1;
  fp32_t px, py;
  fp_mul #(.LATENCY(MUL_LAT)) u_mx (.clk, .rst_n, .in_valid(s3_v), .a(qx), .b(kx_d), .out_valid(s4_v),  .y(px));
  fp_mul #(.LATENCY(MUL_LAT)) u_my (.clk, .rst_n, .in_valid(s3_v), .a(qy), .b(ky_d), .out_valid(s4_v1), .y(py));

  // stage 5: offsets
  logic  s5_v, s5_v1;
  fp32_t ox, oy;
  fp_addsub #(.LATENCY(ADD_LAT)) u_ox (.clk, .rst_n, .in_valid(s4_v), .a(px), .b(xoff_d), .sub(1'b0), .out_valid(s5_v),  .y(ox));
  fp_addsub #(.LATENCY(ADD_LAT)) u_oy (.clk, .rst_n, .in_valid(s4_v), .a(py), .b(yoff_d), .sub(1'b0), .out_valid(s5_v1), .y(oy));

  // stage 6: output register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      x <= '0; y <= '0; sum <= '0;
    end else begin
      out_valid <= s5_v;
      if (s5_v) begin
        x <= ox; y <= oy; sum <= sum_q;
      end
    end

  // the parallel units run in lockstep
  assert property (@(posedge clk) disable iff (!rst_n)
                   (s1_v == s1_v1) && (s1_v == s1_v2) && (s1_v == s1_v3) &&
                   (s2_v == s2_v1) && (s2_v == s2_v2) && (s3_v == s3_v1) &&
                   (s4_v == s4_v1) && (s5_v == s5_v1));
  initial assert (LATENCY == 3 * ADD_LAT + MUL_LAT + DIV_LAT + 1);
endmodule
