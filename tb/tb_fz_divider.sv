// tb_fz_divider - self-checking test of the output divider: operands of
// four-rule weighted means, starts every four clocks (and with gaps),
// result and Output_Ready after the load clock and four division clocks, zero divisor.
module tb_fz_divider;
  import fuzzy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [SZT_W-1:0] num = '0;
  logic [ST_W-1:0]  den = '0;
  logic output_ready;
  logic [Z_W-1:0] zo;
  int checks = 0, failures = 0;
  int exp_q [$];
  int zero_cases = 0;
  int cyc = 0;
  int start_cyc [$];

  fz_divider dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check results as they appear
  always @(negedge clk) if (rst_n) begin
    if (output_ready) begin
      int e, sc;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR unexpected output_ready");
      end else begin
        e = exp_q.pop_front();
        sc = start_cyc.pop_front();
        if (int'(zo) != e || cyc - sc != 5) begin
          failures++;
          $display("ERROR zo=%0d expected %0d after %0d clocks", zo, e, cyc - sc);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      automatic int n = 0, d = 0;
      for (int r = 0; r < 4; r++) begin
        automatic int th = $urandom_range(0, 15), z = $urandom_range(0, 127);
        if ($urandom_range(0, 9) == 0) th = 0;
        n += th * z; d += th;
      end
      if (i % 97 == 0) begin n = 0; d = 0; end
      if (d == 0) zero_cases++;
      @(negedge clk);
      start = 1'b1; num = SZT_W'(n); den = ST_W'(d);
      exp_q.push_back(d == 0 ? 0 : n / d);
      start_cyc.push_back(cyc);
      @(negedge clk);
      start = 1'b0;
      repeat ((i % 5 == 0) ? 4 : 2) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || zero_cases == 0) begin
      failures++;
      $display("ERROR %0d results missing, %0d zero divisors", exp_q.size(), zero_cases);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
