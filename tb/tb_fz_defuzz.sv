// tb_fz_defuzz - self-checking test of the defuzzification sums: groups of
// four rules, back to back or with idle clocks, done exactly two clocks
// after the last rule enters, sums compared with a direct computation.
module tb_fz_defuzz;
  import fuzzy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ptag_t tag_in = '0;
  logic [A_W-1:0] theta = '0;
  logic [Z_W-1:0] z = '0;
  logic done;
  logic [ST_W-1:0] sum_theta;
  logic [SZT_W-1:0] sum_ztheta;
  int checks = 0, failures = 0;
  int exp_t [$], exp_zt [$], last_cyc [$];
  int cyc = 0;

  fz_defuzz dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && done) begin
    int et, ezt, lc;
    checks++;
    if (exp_t.size() == 0) begin
      failures++;
      $display("ERROR unexpected done");
    end else begin
      et = exp_t.pop_front(); ezt = exp_zt.pop_front(); lc = last_cyc.pop_front();
      if (int'(sum_theta) != et || int'(sum_ztheta) != ezt || cyc - lc != 1) begin
        failures++;
        $display("ERROR sums %0d %0d expected %0d %0d, %0d clocks", sum_theta, sum_ztheta, et, ezt, cyc - lc);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 500; s++) begin
      automatic int st = 0, szt = 0;
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        theta = A_W'($urandom); z = Z_W'($urandom);
        if (s % 50 == 0) theta = 4'd15;
        if (s % 50 == 1) z = 7'd127;
        st += int'(theta); szt += int'(theta) * int'(z);
        tag_in = '{valid: 1'b1, first: r == 0, last: r == 3};
        if (r == 3) begin
          exp_t.push_back(st); exp_zt.push_back(szt); last_cyc.push_back(cyc);
        end
      end
      if (s % 4 == 0) begin
        @(negedge clk);
        tag_in = '0; theta = A_W'($urandom); z = Z_W'($urandom);
      end
    end
    @(negedge clk);
    tag_in = '0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_t.size() != 0) begin
      failures++;
      $display("ERROR %0d groups without done", exp_t.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
