// tb_fir_hp: checks the reloadable high-pass FIR against a software model
// of the same filter equation.
//  1. Reset coefficients: a constant (DC) input must give exactly zero once
//     the delay line is full, and random samples must match the model.
//  2. Reload of a full random set (large enough to hit saturation).
//  3. Reload of a short set: coef_last after a few words replaces only
//     those words; words past NTAPS are dropped.
// Every output must appear exactly 3 clocks after its sample.
module tb_fir_hp;
  import tb_ref_pkg::*;
  localparam int NT  = 63;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;
  logic in_valid = 0, out_valid, coef_valid = 0, coef_last = 0, reload_done;
  logic signed [15:0] din = 0, dout, coef_data = 0;
  int checks = 0, failures = 0, reloads = 0;
  longint cyc = 0;
  int h[] = new[NT];
  int sh[] = new[NT];
  int hist[] = new[NT];
  typedef struct { int exp; longint t; } item_t;
  item_t q[$];

  fir_hp #(.NTAPS(NT)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (reload_done) reloads++;
    if (out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        it = q.pop_front();
        if (int'(dout) != it.exp || cyc - it.t != longint'(LAT)) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%0d exp=%0d lat=%0d", dout, it.exp, cyc - it.t);
        end
      end
    end
  end

  task automatic sample(int x);
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    din <= 16'(x);
    in_valid <= 1;
    q.push_back('{fir_out(NT, h, hist), cyc + 1});
    @(posedge clk);
    if ($urandom_range(0, 5) == 0) begin in_valid <= 0; @(posedge clk); end
  endtask

  task automatic drain();
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  task automatic load(int n, bit rand_big);
    for (int k = 0; k < n; k++) begin
      int c;
      c = rand_big ? int'($signed(16'($urandom))) : int'($urandom_range(0, 4000)) - 2000;
      if (k < NT) sh[k] = c;
      coef_data  <= 16'(c);
      coef_valid <= 1;
      coef_last  <= (k == n - 1);
      @(posedge clk);
    end
    coef_valid <= 0;
    coef_last  <= 0;
    repeat (3) @(posedge clk);
    h = new[NT](sh);
  endtask

  initial begin
    for (int k = 0; k < NT; k++) begin
      h[k] = fir_default(NT, k); sh[k] = h[k]; hist[k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // 1. DC input with the reset coefficients
    for (int i = 0; i < 3 * NT; i++) sample(12345);
    drain();
    checks++;
    if (dout != 0) begin failures++; $display("DC not removed: %0d", dout); end
    for (int i = 0; i < 3000; i++) sample(int'($signed(16'($urandom))) / 2 + 4000);
    drain();
    // 2. full random set, including saturation
    load(NT, 1);
    for (int i = 0; i < 3000; i++) sample(int'($signed(16'($urandom))));
    drain();
    load(NT, 0);
    for (int i = 0; i < 3000; i++) sample(int'($signed(16'($urandom))));
    drain();
    // 3. short set, then an over-long one
    load(7, 0);
    for (int i = 0; i < 1000; i++) sample(int'($signed(16'($urandom))));
    drain();
    load(NT + 5, 0);
    for (int i = 0; i < 1000; i++) sample(int'($signed(16'($urandom))));
    drain();
    if (q.size() != 0) begin failures++; $display("missing outputs %0d", q.size()); end
    checks++;
    if (reloads != 4) begin failures++; $display("reload_done count %0d", reloads); end
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
