// tb_fz_fuzzifier - self-checking test of the fuzzification tables: random
// table contents loaded, one rule per clock with random inputs and MF
// parities, alphas and tag checked exactly STAGES clocks later.
module tb_fz_fuzzifier;
  import fuzzy_pkg::*;
  localparam int unsigned STAGES = FUZZ_STAGES;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lut_we0 = 1'b0, lut_we1 = 1'b0;
  logic [X_W-1:0] lut_waddr = '0;
  logic [LUT_W-1:0] lut_wdata = '0;
  ptag_t tag_in = '0, tag_out;
  logic [X_W-1:0] x0 = '0, x1 = '0;
  logic odd0 = 1'b0, odd1 = 1'b0;
  logic [A_W-1:0] alpha0, alpha1;
  int checks = 0, failures = 0;
  logic [LUT_W-1:0] t0 [1 << X_W], t1 [1 << X_W];
  int exp_q [$], cyc_q [$];
  int cyc = 0;

  fz_fuzzifier #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && tag_out.valid) begin
    automatic int got = int'(tag_out) << 8 | int'(alpha0) << 4 | int'(alpha1);
    checks++;
    if (exp_q.size() == 0 || got != exp_q[0] || cyc - cyc_q[0] != STAGES) begin
      failures++;
      $display("ERROR got %h expected %h", got, exp_q.size() ? exp_q[0] : -1);
    end
    if (exp_q.size() > 0) begin void'(exp_q.pop_front()); void'(cyc_q.pop_front()); end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < (1 << X_W); a++) begin
      @(negedge clk);
      lut_we0 = 1'b1; lut_waddr = X_W'(a); lut_wdata = LUT_W'($urandom); t0[a] = lut_wdata;
      @(negedge clk);
      lut_we0 = 1'b0; lut_we1 = 1'b1; lut_wdata = LUT_W'($urandom); t1[a] = lut_wdata;
      @(negedge clk);
      lut_we1 = 1'b0;
    end
    for (int i = 0; i < 2000; i++) begin
      ptag_t tg;
      int e0, e1;
      @(negedge clk);
      tg = ptag_t'($urandom);
      tg.valid = (i % 9 != 8);
      tag_in = tg;
      x0 = X_W'($urandom); x1 = X_W'($urandom);
      odd0 = 1'($urandom); odd1 = 1'($urandom);
      e0 = odd0 ? int'(t0[x0][7:4]) : int'(t0[x0][3:0]);
      e1 = odd1 ? int'(t1[x1][7:4]) : int'(t1[x1][3:0]);
      if (tg.valid) begin
        exp_q.push_back(int'(tg) << 8 | e0 << 4 | e1);
        cyc_q.push_back(cyc);
      end
    end
    @(negedge clk);
    tag_in = '0;
    repeat (STAGES + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("ERROR %0d rules lost", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
