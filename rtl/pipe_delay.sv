// pipe_delay: fixed-latency delay line for a data word and its valid flag.
//
// The floating-point units compute their result in front of this line and
// use it to present the result exactly LATENCY clock cycles after the input
// was taken, matching the fixed-latency, fully pipelined behaviour of
// FPGA floating-point operator cores. A synthesis tool with register
// retiming can move the stages into the arithmetic in front of it.
// Interface: in_valid/in_data enter at a rising edge; out_valid/out_data
// show them LATENCY edges later (LATENCY >= 1). Only the valid bits are
// reset; the data stages need no reset.
module pipe_delay #(
  parameter int unsigned W       = 32,
  parameter int unsigned LATENCY = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  logic [LATENCY-1:0] v_q;
  logic [W-1:0]       d_q [LATENCY];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v_q <= '0;
    else        v_q <= LATENCY'({v_q, in_valid});

  always_ff @(posedge clk) begin
    d_q[0] <= in_data;
    for (int i = 1; i < LATENCY; i++) d_q[i] <= d_q[i-1];
  end

  assign out_valid = v_q[LATENCY-1];
  assign out_data  = d_q[LATENCY-1];

  initial assert (LATENCY >= 1) else $error("pipe_delay: LATENCY must be at least 1");
endmodule
