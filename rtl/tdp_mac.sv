// tdp_mac: square-and-accumulate stage of the time-domain amplitude method.
//
// After a trigger it sums the squares of the next N filtered samples of one
// channel, A(n) = D(n)*D(n) + A(n-1), and presents the ACC_W-bit unsigned
// sum; the amplitude is later taken as its square root,
// V = sqrt(sum_{n=0}^{N-1} x(n)^2). The square is exact (at most 2^30 for a
// 16-bit sample), so a 47-bit sum holds 2^17 - 1 samples without overflow:
// WIN_W is derived that way and N = win_len is sampled at the trigger.
// Timing: trig is a one-clock pulse in the sample clock domain. The first
// valid sample after the trigger clock is the first one summed; sum and
// out_valid appear one clock after the N-th sample. A trigger while a
// window is open is ignored (trig_lost pulses). win_len = 0 is taken as 1.
// The square-and-add form and the 47-bit width follow the design; the
// trigger handling, the run-time window length and its sampling are
// choices of this design.
module tdp_mac #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 47,
  parameter int unsigned WIN_W  = ACC_W - 2 * (DATA_W - 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     trig,
  input  logic [WIN_W-1:0]         win_len,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] din,
  output logic                     busy,
  output logic                     trig_lost,
  output logic                     out_valid,
  output logic [ACC_W-1:0]         sum
);
  logic [ACC_W-1:0]      acc;
  logic [WIN_W-1:0]      cnt, last;
  logic signed [2*DATA_W-1:0] din_w;
  logic [2*DATA_W-1:0]   sq;

  assign din_w = (2*DATA_W)'(din);
  assign sq    = $unsigned(din_w * din_w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      trig_lost <= 1'b0;
      out_valid <= 1'b0;
      acc       <= '0;
      cnt       <= '0;
      last      <= '0;
      sum       <= '0;
    end else begin
      out_valid <= 1'b0;
      trig_lost <= trig & busy;
      if (!busy) begin
        if (trig) begin
          busy <= 1'b1;
          acc  <= '0;
          cnt  <= '0;
          last <= (win_len == '0) ? '0 : win_len - 1'b1;
        end
      end else if (in_valid) begin
        acc <= acc + ACC_W'(sq);
        cnt <= cnt + 1'b1;
        if (cnt == last) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          sum       <= acc + ACC_W'(sq);
        end
      end
    end
  end

  initial assert (WIN_W >= 1 && ACC_W >= 2 * DATA_W)
    else $error("tdp_mac: ACC_W too small for the squared samples");
endmodule
