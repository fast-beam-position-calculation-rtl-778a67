// tb_fp_sqrt: test of the pipelined single-precision square root against
// the double-precision square root rounded to single. Operands are issued
// back to back with occasional gaps; every result must match bit for bit
// and appear exactly LATENCY clocks after its operand.
module tb_fp_sqrt;
  import tb_ref_pkg::*;
  localparam int LAT = 29;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, y;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic [31:0] exp; longint t; } item_t;
  item_t q[$];

  fp_sqrt #(.LATENCY(LAT)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid && rst_n) begin
    item_t it;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      it = q.pop_front();
      if (y !== it.exp || cyc - it.t != longint'(LAT)) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h exp=%h lat=%0d", y, it.exp, cyc - it.t);
      end
    end
  end

  task automatic issue(logic [31:0] x, logic [31:0] expv);
    a <= x; in_valid <= 1;
    q.push_back('{expv, cyc + 1});
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'h4080_0000, 32'h4000_0000);   // sqrt 4 = 2
    issue(32'h4000_0000, r2f($sqrt(2.0)));
    issue(32'h0000_0000, 32'h0000_0000);
    issue(32'h8000_0000, 32'h8000_0000);   // -0
    issue(32'hBF80_0000, 32'h7FC0_0000);   // sqrt -1 = NaN
    issue(32'h7F80_0000, 32'h7F80_0000);   // +inf
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x;
      x = rand_f(-60, 100, 0);
      issue(x, f_sqrt(x));
      // back-to-back issue most of the time
      if ($urandom_range(0, 7) == 0) begin in_valid <= 0; @(posedge clk); end
    end
    // amplitudes as the channels produce them: square roots of integers
    for (int i = 0; i < 5000; i++) begin
      longint unsigned u;
      u = {$urandom, $urandom} >> $urandom_range(17, 60);
      issue(u2f(u), f_sqrt(u2f(u)));
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
