// tb_fz_ars - self-checking test of the active rule selector: boundaries
// loaded, sets offered back to back and with gaps, the four rule addresses
// {k0,k1},{k0,k1+1},{k0+1,k1},{k0+1,k1+1} issued one per clock one clock
// after the take, with first/last tags and the inputs alongside.
module tb_fz_ars;
  import fuzzy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bp_we0 = 1'b0, bp_we1 = 1'b0;
  logic [2:0] bp_waddr = '0;
  logic [X_W-1:0] bp_wdata = '0;
  logic set_valid = 1'b0, set_take;
  logic [X_W-1:0] x0_in = '0, x1_in = '0, x0, x1;
  ptag_t tag;
  logic [MF_W-1:0] mf0, mf1;
  int checks = 0, failures = 0;
  int b0 [N_BP], b1 [N_BP];
  int exp_q [$];          // expected {valid,first,last,mf0,mf1,x0,x1} per clock
  int takes = 0, back_to_back = 0;
  int last_take = -10, cyc = 0;

  fz_ars dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int interval(int b [N_BP], int v);
    int k = 0;
    for (int j = 0; j < N_BP; j++) if (v >= b[j]) k = j + 1;
    return k;
  endfunction

  initial begin
    int sets_done = 0, gap = 0;
    bit pending = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ascending boundaries
    for (int v = 0; v < 2; v++) begin
      automatic int b = 0;
      for (int j = 0; j < N_BP; j++) begin
        b = b + 1 + int'($urandom_range(0, 20));
        @(negedge clk);
        bp_we0 = (v == 0); bp_we1 = (v == 1); bp_waddr = 3'(j); bp_wdata = X_W'(b);
        if (v == 0) b0[j] = b; else b1[j] = b;
      end
    end
    @(negedge clk);
    bp_we0 = 1'b0; bp_we1 = 1'b0;
    while (sets_done < 300 || exp_q.size() > 0) begin
      @(negedge clk);
      // the set seen as taken at the last negedge went in at the posedge
      if (pending) begin
        pending = 1'b0;
        set_valid = 1'b0;
        sets_done++;
        gap = (sets_done % 7 == 0) ? int'($urandom_range(1, 6)) : 0;
      end
      // outputs of this clock
      if (tag.valid || exp_q.size() > 0) begin
        automatic int got = int'(tag.first) << 26 | int'(tag.last) << 25 | int'(mf0) << 20 |
                  int'(mf1) << 16 | int'(x0) << 8 | int'(x1);
        checks++;
        if (!tag.valid || exp_q.size() == 0 || got != exp_q[0]) begin
          failures++;
          $display("ERROR at %0d: got %h expected %h", cyc, got, exp_q.size() ? exp_q[0] : -1);
        end
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      // offer the next set
      if (!set_valid && sets_done < 300) begin
        if (gap > 0) gap--;
        else begin
          set_valid = 1'b1; x0_in = X_W'($urandom); x1_in = X_W'($urandom);
          #1;
        end
      end
      // a take happens at the coming posedge
      if (set_valid && set_take) begin
        automatic int k0 = interval(b0, int'(x0_in)), k1 = interval(b1, int'(x1_in));
        if (cyc - last_take == 4) back_to_back++;
        last_take = cyc;
        takes++;
        pending = 1'b1;
        for (int r = 0; r < 4; r++)
          exp_q.push_back((r == 0) << 26 | (r == 3) << 25 | (k0 + r / 2) << 20 |
                          (k1 + r % 2) << 16 | int'(x0_in) << 8 | int'(x1_in));
      end
      if (cyc > 19000) break;
    end
    checks++;
    if (exp_q.size() != 0 || back_to_back == 0 || takes != 300) begin
      failures++;
      $display("ERROR %0d rules not issued, %0d takes, %0d back-to-back", exp_q.size(), takes, back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
