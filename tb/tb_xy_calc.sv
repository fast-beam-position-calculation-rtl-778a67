// tb_xy_calc: beam positions from random electrode amplitudes, checked bit
// for bit against a model that rounds each operation to single precision in
// the order the unit uses. Amplitude sets are issued back to back with
// occasional gaps, and Kx, Ky and the offsets change from set to set, so
// each set must be scaled with its own constants. Each result must arrive
// exactly 75 clocks after its amplitudes (the x/y calculation time).
module tb_xy_calc;
  import tb_ref_pkg::*;
  localparam int LAT = 75;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [31:0] va = 0, vb = 0, vc = 0, vd = 0, kx = 0, ky = 0, xoff = 0, yoff = 0, x, y, sum;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic [31:0] ex, ey, es; longint t; } item_t;
  item_t q[$];

  xy_calc dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid && rst_n) begin
    item_t it;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      it = q.pop_front();
      if (x !== it.ex || y !== it.ey || sum !== it.es || cyc - it.t != longint'(LAT)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h/%h y=%h/%h sum=%h/%h lat=%0d", x, it.ex, y, it.ey, sum, it.es, cyc - it.t);
      end
    end
  end

  task automatic issue(logic [31:0] a, b, c, d, k1, k2, o1, o2);
    logic [31:0] ex, ey, es;
    xy_ref(a, b, c, d, k1, k2, o1, o2, ex, ey, es);
    va <= a; vb <= b; vc <= c; vd <= d; kx <= k1; ky <= k2; xoff <= o1; yoff <= o2;
    in_valid <= 1;
    q.push_back('{ex, ey, es, cyc + 1});
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] k;
    k = r2f(19.5);   // Kx = Ky = 19.5 mm
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // centred beam: x = y = 0
    issue(r2f(1000.0), r2f(1000.0), r2f(1000.0), r2f(1000.0), k, k, 32'd0, 32'd0);
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (x != 32'd0 || y != 32'd0) begin failures++; $display("centred beam not at 0"); end
    // all signal on A: x = y = Kx
    issue(r2f(1000.0), 32'd0, 32'd0, 32'd0, k, k, 32'd0, 32'd0);
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (x != k || y != k) begin failures++; $display("full A not at Kx"); end
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] a, b, c, d, o1, o2;
      a = rand_f(8, 20, 0); b = rand_f(8, 20, 0); c = rand_f(8, 20, 0); d = rand_f(8, 20, 0);
      o1 = rand_f(-4, 1, 1); o2 = rand_f(-4, 1, 1);
      if (i % 5 == 0) begin b = a ^ 32'd3; c = a; d = a ^ 32'd5; end   // near-centred
      issue(a, b, c, d, (i % 2) ? k : rand_f(3, 5, 0), rand_f(3, 5, 0), o1, o2);
      // back-to-back issue most of the time
      if ($urandom_range(0, 7) == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
