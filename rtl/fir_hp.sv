// fir_hp: reloadable high-pass FIR filter for one ADC channel.
//
// Removes the DC component of the 16-bit ADC samples before they are squared
// and summed, and lets the host load a new coefficient set at run time, for
// example one that also corrects the gain and phase of the channel. The
// filter is direct form with NTAPS signed COEF_W-bit coefficients in Q1.15
// (h[0] weights the newest sample):
//     dout(n) = sat16( round( sum_k h[k] * din(n-k) / 2^15 ) ).
// Timing: one sample per clock when in_valid is high; dout appears with
// out_valid 3 clocks after its sample (sample register, product register,
// sum register).
// Reload: the host writes NTAPS words, h[0] first, with coef_valid; the word
// written with coef_last set completes the set, which becomes active one
// clock later (reload_done pulses then). Words past NTAPS are dropped. The
// active set is double buffered, so filtering never sees half a set.
// At reset both sets hold a DC-blocking filter computed here:
//     h[k] = -c for k != M,  h[M] = (NTAPS-1)*c,  c = round(2^15 / NTAPS),
// M = (NTAPS-1)/2, whose gain is exactly zero at DC and close to one well
// above fs/NTAPS. The original design used a vendor FIR core with a 1 MHz
// cut-off; its tap count and coefficients are not known, so the tap count
// (63), the Q1.15 format, the reload protocol and the reset coefficients
// are choices of this design. 16-bit input and output follow the design.
module fir_hp #(
  parameter int unsigned NTAPS  = 63,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] din,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] dout,
  // coefficient reload
  input  logic                     coef_valid,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic                     coef_last,
  output logic                     reload_done
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(NTAPS);
  localparam int unsigned FRAC   = COEF_W - 1;
  localparam int unsigned PTR_W  = $clog2(NTAPS + 1);

  typedef logic signed [COEF_W-1:0] coef_t;

  function automatic coef_t default_coef(int unsigned k);
    int c;
    c = ((1 << FRAC) + NTAPS / 2) / NTAPS;
    if (k == (NTAPS - 1) / 2) return coef_t'((NTAPS - 1) * c);
    return coef_t'(-c);
  endfunction

  coef_t                     coef_act [NTAPS];
  coef_t                     coef_sh  [NTAPS];
  logic [PTR_W-1:0]          wr_ptr;
  logic                      swap;
  logic signed [DATA_W-1:0]  taps     [NTAPS];
  logic signed [PROD_W-1:0]  prod     [NTAPS];
  logic [2:0]                v_q;

  // ---------------- coefficient reload ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '0;
      swap        <= 1'b0;
      reload_done <= 1'b0;
      for (int k = 0; k < NTAPS; k++) begin
        coef_sh[k]  <= default_coef(k);
        coef_act[k] <= default_coef(k);
      end
    end else begin
      swap        <= 1'b0;
      reload_done <= 1'b0;
      if (coef_valid) begin
        if (wr_ptr < PTR_W'(NTAPS)) coef_sh[wr_ptr] <= coef_data;
        if (coef_last) begin
          wr_ptr <= '0;
          swap   <= 1'b1;
        end else if (wr_ptr < PTR_W'(NTAPS)) begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
      if (swap) begin
        coef_act    <= coef_sh;
        reload_done <= 1'b1;
      end
    end
  end

  // ---------------- filter datapath ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[1:0], in_valid};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
    end else if (in_valid) begin
      taps[0] <= din;
      for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
    end
  end

  always_ff @(posedge clk)
    for (int k = 0; k < NTAPS; k++) prod[k] <= taps[k] * coef_act[k];

  always_ff @(posedge clk) begin
    logic signed [ACC_W-1:0] acc, r;
    acc = ACC_W'(1) <<< (FRAC - 1);          // rounding constant
    for (int k = 0; k < NTAPS; k++) acc += ACC_W'(prod[k]);
    r = acc >>> FRAC;
    if (r > ACC_W'(2 ** (DATA_W - 1) - 1))       dout <= {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -ACC_W'(2 ** (DATA_W - 1)))     dout <= {1'b1, {(DATA_W-1){1'b0}}};
    else                                         dout <= r[DATA_W-1:0];
  end

  assign out_valid = v_q[2];
endmodule
