// tb_tdp_mac: windows of random length over random 16-bit samples, with
// gaps in the sample stream, full-scale samples and triggers during an
// open window. Each sum is checked against a 64-bit software sum of
// squares, and must appear exactly one clock after the window's last
// sample. A trigger while the window is open must be ignored and flagged.
module tb_tdp_mac;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #2 clk = ~clk;
  logic trig = 0, in_valid = 0, busy, trig_lost, out_valid;
  logic [16:0] win_len = 0;
  logic signed [15:0] din = 0;
  logic [46:0] sum;
  int checks = 0, failures = 0, lost_seen = 0;
  longint cyc = 0, t_last = 0;
  longint unsigned expv;
  bit got;

  tdp_mac #(.DATA_W(16), .ACC_W(47)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (trig_lost) lost_seen++;
    if (out_valid) begin
      checks++;
      if (got || sum !== 47'(expv) || cyc - t_last != 1) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%0d exp=%0d lat=%0d", sum, expv, cyc - t_last);
      end
      got <= 1;
    end
  end

  task automatic window(int n, bit full_scale);
    int k;
    expv = 0;
    got  = 0;
    win_len <= 17'(n);
    trig <= 1;
    @(posedge clk);
    trig <= 0;
    k = 0;
    while (k < (n == 0 ? 1 : n)) begin
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        din <= 16'($urandom);                      // not valid: must not count
      end else begin
        logic signed [15:0] s;
        s = full_scale ? 16'sh8000 : 16'($urandom);
        in_valid <= 1;
        din <= s;
        expv += longint'(s) * longint'(s);
        k++;
        t_last = cyc + 1;
      end
      // a trigger inside the window must be ignored
      trig <= (k == 2 && n > 4);
      @(posedge clk);
    end
    in_valid <= 0;
    trig <= 0;
    repeat (3) @(posedge clk);
    if (!got) begin failures++; $display("no sum for window %0d", n); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    window(1, 0);
    window(0, 0);          // taken as 1
    window(5, 0);
    window(4000, 1);       // full-scale samples
    for (int i = 0; i < 60; i++) window($urandom_range(1, 700), 0);
    if (lost_seen == 0) begin failures++; $display("trigger during a window never flagged"); end
    checks++;
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
