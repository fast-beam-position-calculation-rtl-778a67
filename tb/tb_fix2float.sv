// tb_fix2float: random and special-case test of the single-precision
// adder/subtractor against double-precision arithmetic rounded to single.
// One operation is issued per clock; every result must appear exactly
// LATENCY clocks after its operands and match bit for bit.
module tb_fix2float;
  import tb_ref_pkg::*;
  localparam int LAT = 1;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [46:0] u = 0;
  logic [31:0] y;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic [31:0] exp; longint t; } item_t;
  item_t q[$];

  fix2float #(.IN_W(47), .LATENCY(LAT)) dut (.*);

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

  task automatic issue(logic [46:0] x, logic [31:0] expv);
    u <= x; in_valid <= 1;
    q.push_back('{expv, cyc + 1});
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(47'd0, 32'd0);
    issue(47'd1, 32'h3F80_0000);
    issue({47{1'b1}}, 32'h5700_0000);              // 2^47 - 1 rounds up to 2^47
    issue(47'h0000_0100_0001, 32'h4B80_0000);      // 2^24 + 1: tie to even, down
    issue(47'h0000_0100_0003, 32'h4B80_0002);      // 2^24 + 3: tie to even, up
    for (int i = 0; i < 20000; i++) begin
      logic [46:0] x;
      x = 47'({$urandom, $urandom}) >> $urandom_range(0, 46);
      issue(x, u2f(longint'(x)));
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
