// tb_bpm_top_full: end-to-end test of bpm_top at its default parameters (one pick-up, 63-tap filters).
//
// Every electrode channel gets a sampled RF tone (the 476 MHz bunch signal
// aliased to about 24 MHz at 250 MS/s) with its own amplitude, phase and a
// DC offset, plus noise. A software model of the whole chain - the FIR
// equation, the sum of squares over the window, the rounding to single
// precision, the square root and the position formula - predicts every
// amplitude and every (x, y, SUM) bit for bit. Checked as well: the
// amplitude-to-position time (75 clocks) and the window-end-to-position
// time (106 clocks). Mechanisms that must each occur at least once: a
// coefficient reload, a trigger ignored during an open window, the DC
// offset removed by the filter, and a position from every pick-up.
module tb_bpm_top_full;
  import tb_ref_pkg::*;
  localparam int NB  = 1;
  localparam int NT  = 63;
  localparam int NCH = 4 * NB;
  localparam int N_WIN[3] = '{2000, 777, 4096};

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;

  logic                 adc_valid = 0;
  logic signed [15:0]   adc_data [NB][4];
  logic                 trig = 0;
  logic [16:0]          win_len = 0;
  logic [31:0]          kx [NB], ky [NB], xoff [NB], yoff [NB];
  logic                 coef_valid = 0, coef_last = 0;
  logic [$clog2(NCH)-1:0] coef_sel = 0;
  logic signed [15:0]   coef_data = 0;
  logic [NCH-1:0]       reload_done;
  logic                 trig_lost;
  logic [NB-1:0]        amp_valid, xy_valid;
  logic [31:0]          amp [NB][4];
  logic [31:0]          x [NB], y [NB], sum [NB];

  bpm_top dut (.*);

  int checks = 0, failures = 0;
  int n_reload = 0, n_lost = 0, n_dc = 0;
  int n_xy [NB];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // software model state
  int h [NCH][];
  int hist [NCH][];
  longint t_trig;             // edge at which the trigger was taken
  int     win_n;              // window length
  int     taken [NCH];        // samples summed so far
  longint unsigned acc [NCH];
  longint t_last;             // edge at which the last windowed sample was summed
  bit     in_win;
  logic [31:0] e_amp [NB][4];
  logic [31:0] e_x [NB], e_y [NB], e_s [NB];
  longint t_amp [NB];
  bit     got_xy [NB];

  // filtered samples reach the accumulator 3 edges after the raw sample
  typedef struct { int v [NCH]; longint t; } fs_t;
  fs_t fq[$];

  always @(posedge clk) if (rst_n) begin
    if (|reload_done) n_reload++;
    if (trig_lost) n_lost++;
    for (int b = 0; b < NB; b++) begin
      if (amp_valid[b]) begin
        t_amp[b] = cyc;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (amp[b][c] !== e_amp[b][c]) begin
            failures++;
            if (failures < 10) $display("FAIL amp[%0d][%0d]=%h exp=%h", b, c, amp[b][c], e_amp[b][c]);
          end
        end
        checks++;
        if (cyc - t_last != 1 + 1 + 29) begin
          failures++; $display("FAIL window-to-amplitude time %0d", cyc - t_last);
        end
      end
      if (xy_valid[b]) begin
        checks++;
        n_xy[b]++;
        got_xy[b] = 1;
        if (x[b] !== e_x[b] || y[b] !== e_y[b] || sum[b] !== e_s[b]) begin
          failures++;
          if (failures < 10) $display("FAIL bpm %0d x=%h/%h y=%h/%h s=%h/%h", b, x[b], e_x[b], y[b], e_y[b], sum[b], e_s[b]);
        end
        checks++;
        if (cyc - t_amp[b] != 75 || cyc - t_last != 106) begin
          failures++; $display("FAIL latency amp->xy %0d, window->xy %0d", cyc - t_amp[b], cyc - t_last);
        end
      end
    end
  end

  // one clock of ADC samples; phase in radians per sample of the aliased tone
  real amp_c [NCH];
  real ph_c [NCH];
  int  dc_c [NCH];
  longint n_samp = 0;

  task automatic adc_clock(bit valid);
    fs_t f;
    if (valid) begin
      for (int i = 0; i < NCH; i++) begin
        int s;
        real r;
        r = amp_c[i] * $sin(2.0 * 3.14159265358979 * 0.0967 * real'(n_samp) + ph_c[i]);
        s = dc_c[i] + int'(r) + int'($urandom_range(0, 40)) - 20;
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        adc_data[i / 4][i % 4] <= 16'(s);
        for (int k = NT - 1; k > 0; k--) hist[i][k] = hist[i][k-1];
        hist[i][0] = s;
        f.v[i] = fir_out(NT, h[i], hist[i]);
      end
      f.t = cyc + 1 + 3;
      fq.push_back(f);
      n_samp++;
    end
    adc_valid <= valid;
    @(posedge clk);
    // feed the model accumulator with the filtered samples consumed now
    while (fq.size() > 0 && fq[0].t <= cyc) begin
      fs_t g;
      g = fq.pop_front();
      if (in_win && g.t > t_trig && taken[0] < win_n) begin
        for (int i = 0; i < NCH; i++) begin
          acc[i] += longint'(g.v[i]) * longint'(g.v[i]);
          taken[i]++;
        end
        if (taken[0] == win_n) begin
          t_last = g.t;
          in_win = 0;
          for (int b = 0; b < NB; b++) begin
            for (int c = 0; c < 4; c++) e_amp[b][c] = f_sqrt(u2f(acc[4*b+c]));
            xy_ref(e_amp[b][0], e_amp[b][1], e_amp[b][2], e_amp[b][3], kx[b], ky[b], xoff[b], yoff[b],
                   e_x[b], e_y[b], e_s[b]);
          end
        end
      end
    end
  endtask

  task automatic measure(int n, bit retrigger);
    for (int b = 0; b < NB; b++) got_xy[b] = 0;
    win_len <= 17'(n);
    trig    <= 1;
    t_trig  = cyc + 1;
    win_n   = n;
    in_win  = 1;
    for (int i = 0; i < NCH; i++) begin acc[i] = 0; taken[i] = 0; end
    adc_clock(1);
    trig <= 0;
    for (int i = 0; in_win && i < 4 * n + 100; i++) begin
      trig <= retrigger && (i == n / 2);    // ignored: the window is open
      adc_clock($urandom_range(0, 9) != 0);
    end
    trig <= 0;
    repeat (150) adc_clock($urandom_range(0, 9) != 0);
    trig <= 0;
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (!got_xy[b]) begin failures++; $display("FAIL no position from pick-up %0d", b); end
    end
  endtask

  task automatic reload(int ch);
    int nh [];
    nh = new[NT];
    for (int k = 0; k < NT; k++) begin
      int c;
      // the default high-pass with a gain change: a new channel gain
      c = (fir_default(NT, k) * 7) / 8;
      coef_sel   <= $clog2(NCH)'(ch);
      coef_data  <= 16'(c);
      coef_valid <= 1;
      coef_last  <= (k == NT - 1);
      nh[k]      = c;
      adc_clock(1);
    end
    coef_valid <= 0;
    coef_last  <= 0;
    h[ch] = nh;            // the filter switches to the new set from the next sample
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) begin
      h[i] = new[NT];
      hist[i] = new[NT];
      for (int k = 0; k < NT; k++) begin h[i][k] = fir_default(NT, k); hist[i][k] = 0; end
      amp_c[i] = 3000.0 + 9000.0 * real'($urandom_range(0, 1000)) / 1000.0;
      ph_c[i]  = real'($urandom_range(0, 6283)) / 1000.0;
      dc_c[i]  = int'($urandom_range(0, 3000)) - 1500;
    end
    for (int b = 0; b < NB; b++) begin
      kx[b] = r2f(19.5); ky[b] = r2f(19.5);
      xoff[b] = r2f(0.25 * real'(b)); yoff[b] = r2f(-0.125 * real'(b));
      n_xy[b] = 0;
      for (int c = 0; c < 4; c++) adc_data[b][c] = 0;
    end
    in_win = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2 * NT; i++) adc_clock(1);      // fill the filters
    measure(N_WIN[0], 0);
    reload(1);                                           // new gain on electrode B
    measure(N_WIN[1], 1);
    measure(N_WIN[2], 0);
    // DC removal: the inputs carry offsets, yet the filtered mean is ~0.
    // Each amplitude^2 must be within 5% of N * A^2 / 2 (tone power only).
    for (int i = 0; i < NCH; i++) begin
      real p, e;
      p = f2r(e_amp[i / 4][i % 4]);
      p = p * p;
      e = real'(N_WIN[2]) * amp_c[i] * amp_c[i] / 2.0 * ((i == 1) ? 49.0 / 64.0 : 1.0);
      checks++;
      if (p > 1.05 * e || p < 0.95 * e) begin
        failures++; $display("FAIL channel %0d power %f, tone alone %f", i, p, e);
      end else if (dc_c[i] != 0) n_dc++;
    end
    checks++;
    if (n_reload == 0) begin failures++; $display("FAIL no coefficient reload"); end
    checks++;
    if (n_lost == 0) begin failures++; $display("FAIL no ignored trigger"); end
    checks++;
    if (n_dc == 0) begin failures++; $display("FAIL no DC offset removed"); end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (n_xy[b] != 3) begin failures++; $display("FAIL pick-up %0d gave %0d positions", b, n_xy[b]); end
    end
    $display("reloads=%0d ignored_triggers=%0d dc_removed=%0d positions=%0d", n_reload, n_lost, n_dc, n_xy[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
