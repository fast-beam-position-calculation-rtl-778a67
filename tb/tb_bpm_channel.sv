// tb_bpm_channel: one electrode channel from ADC samples to amplitude.
// Random samples with a DC offset and gaps in the sample stream pass
// through the filter; after each trigger the 47-bit sum of squares and
// the float amplitude sqrt(sum) are compared bit for bit with a software
// model (filter equation, 64-bit sum, rounding to single precision). The
// sum must follow the window's last filtered sample by 1 clock and the
// amplitude by 31 (1 + fixed-to-float 1 + square root 29). One window runs
// after a coefficient reload.
module tb_bpm_channel;
  import tb_ref_pkg::*;
  localparam int NT = 63;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;
  logic adc_valid = 0, trig = 0, coef_valid = 0, coef_last = 0;
  logic signed [15:0] adc_data = 0, coef_data = 0;
  logic [16:0] win_len = 0;
  logic reload_done, trig_lost, sum_valid, amp_valid;
  logic [46:0] sum_sq;
  logic [31:0] amp;
  int checks = 0, failures = 0, n_amp = 0;
  longint cyc = 0;
  int h[] = new[NT];
  int hist[] = new[NT];
  typedef struct { int v; longint t; } fs_t;
  fs_t fq[$];
  longint t_trig, t_last;
  int win_n, taken;
  bit in_win;
  longint unsigned acc;

  bpm_channel dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (sum_valid) begin
      checks++;
      if (sum_sq !== 47'(acc) || cyc - t_last != 1) begin
        failures++; $display("FAIL sum=%0d exp=%0d lat=%0d", sum_sq, acc, cyc - t_last);
      end
    end
    if (amp_valid) begin
      checks++;
      n_amp++;
      if (amp !== f_sqrt(u2f(acc)) || cyc - t_last != 31) begin
        failures++; $display("FAIL amp=%h exp=%h lat=%0d", amp, f_sqrt(u2f(acc)), cyc - t_last);
      end
    end
  end

  task automatic adc_clock(bit valid);
    if (valid) begin
      int s;
      s = int'($signed(16'($urandom))) / 4 + 2500;
      adc_data <= 16'(s);
      for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = s;
      fq.push_back('{fir_out(NT, h, hist), cyc + 1 + 3});
    end
    adc_valid <= valid;
    @(posedge clk);
    while (fq.size() > 0 && fq[0].t <= cyc) begin
      fs_t g;
      g = fq.pop_front();
      if (in_win && g.t > t_trig && taken < win_n) begin
        acc += longint'(g.v) * longint'(g.v);
        taken++;
        if (taken == win_n) begin t_last = g.t; in_win = 0; end
      end
    end
  endtask

  task automatic window(int n);
    win_len <= 17'(n);
    trig <= 1;
    t_trig = cyc + 1;
    win_n = n; taken = 0; acc = 0; in_win = 1;
    adc_clock(1);
    trig <= 0;
    while (in_win) adc_clock($urandom_range(0, 4) != 0);
    repeat (40) adc_clock($urandom_range(0, 4) != 0);
  endtask

  initial begin
    int nh [];
    for (int k = 0; k < NT; k++) begin h[k] = fir_default(NT, k); hist[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    repeat (100) adc_clock(1);
    window(1);
    window(64);
    for (int i = 0; i < 20; i++) window($urandom_range(2, 600));
    // reload a set of random coefficients
    nh = new[NT];
    for (int k = 0; k < NT; k++) begin
      nh[k] = int'($urandom_range(0, 8000)) - 4000;
      coef_data <= 16'(nh[k]); coef_valid <= 1; coef_last <= (k == NT - 1);
      adc_clock(1);
    end
    coef_valid <= 0; coef_last <= 0;
    h = nh;
    window(300);
    checks++;
    if (n_amp != 23) begin failures++; $display("FAIL %0d amplitudes", n_amp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
