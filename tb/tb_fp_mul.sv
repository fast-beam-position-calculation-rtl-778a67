// tb_fp_mul: random and special-case test of the single-precision
// multiplier against double-precision arithmetic rounded to single.
// One operation is issued per clock; every result must appear exactly
// LATENCY clocks after its operands and match bit for bit.
module tb_fp_mul;
  import tb_ref_pkg::*;
  localparam int LAT = 9;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic [31:0] exp; longint t; } item_t;
  item_t q[$];

  fp_mul #(.LATENCY(LAT)) dut (.*);

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

  task automatic issue(logic [31:0] x, logic [31:0] z, logic s, logic [31:0] expv);
    a <= x; b <= z; in_valid <= 1;
    q.push_back('{expv, cyc + 1});
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // special cases
    issue(32'h7F80_0000, 32'h0000_0000, 0, 32'h7FC0_0000);   // inf * 0 = NaN
    issue(32'hFF80_0000, 32'h4000_0000, 0, 32'hFF80_0000);   // -inf * 2
    issue(32'h8000_0000, 32'h4000_0000, 0, 32'h8000_0000);   // -0 * 2
    issue(32'h7F00_0000, 32'h4000_0000, 0, 32'h7F80_0000);   // overflow
    issue(32'h0080_0000, 32'h3F00_0000, 0, 32'h0000_0000);   // underflow: flushed
    issue(32'h3F80_0001, 32'h3F80_0001, 0, 32'h3F80_0002);   // (1+u)^2 rounds
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, z;
      logic s;
      x = rand_f(-30, 30, 1);
      z = rand_f(-30, 30, 1);
      s = 1'($urandom);
      issue(x, z, s, f_mul(x, z));
      // back-to-back issue most of the time
      if ($urandom_range(0, 7) == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    if (q.size() != 0) begin failures++; $display("missing results: %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
