// tb_fuzzy_approx - function approximation with the fuzzy processor at its
// default size.
//
// The chip is loaded with 8 triangular MFs per input, peaks at evenly
// spaced points c_j (0, 18, 36, 54, 73, 91, 109, 127), and with the 64
// rules "if X0 is MF i and X1 is MF j then Z = f(c_i, c_j)", so that the
// Sugeno output interpolates f between the grid points. Inputs sweep a
// grid over the whole 0..127 x 0..127 plane, streamed through the
// Input_Ready / Load_Input handshake, for two functions and both t-norms.
// Every Zo is checked exactly against a behavioural model of the
// inference; the error against the real function is reported, and in
// product mode (bilinear interpolation) the mean error must stay below 1%
// of the output range and the maximum below 3.5% (the maximum is set by
// the curvature of f between grid points 18 apart, not by the datapath).
module tb_fuzzy_approx;
  import fuzzy_pkg::*;
  localparam int STEP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_input = 1'b0;
  logic [X_W-1:0] x0_in = '0, x1_in = '0;
  logic input_ready;
  logic tnorm_sel = 1'b1;
  logic [Z_W-1:0] zo;
  logic output_ready;
  logic cfg_we = 1'b0;
  cfg_target_e cfg_target = CFG_BP0;
  logic [X_W-1:0] cfg_addr = '0;
  logic [RULE_W-1:0] cfg_wdata = '0;

  fuzzy_chip dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int bnd [N_BP];
  int ctr [N_MF];
  logic [LUT_W-1:0] lut [1 << X_W];
  logic [RULE_W-1:0] rules [N_RULES];
  int exp_q [$];
  real ideal_q [$];
  real err_sum, err_max;
  int n_out;
  int fsel;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f(int sel, real a, real b);
    if (sel == 0) return a * b / 127.0;                                   // bilinear
    return 63.5 + 50.0 * $sin(3.14159265 * a / 127.0) * $cos(3.14159265 * b / 127.0);
  endfunction

  function automatic int interval(int x);
    int k = 0;
    for (int j = 0; j < N_BP; j++) if (x >= bnd[j]) k = j + 1;
    return k;
  endfunction

  function automatic int infer(int x0, int x1, bit prod);
    int k0 = interval(x0), k1 = interval(x1);
    int st = 0, szt = 0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        int m0 = k0 + i, m1 = k1 + j;
        int w = int'(rules[m0 * N_MF + m1]);
        int z = w % (1 << Z_W);
        int a0 = (m0 % 2) ? int'(lut[x0][7:4]) : int'(lut[x0][3:0]);
        int a1 = (m1 % 2) ? int'(lut[x1][7:4]) : int'(lut[x1][3:0]);
        int th = prod ? (a0 * a1 + 15) / 16 : ((a0 < a1) ? a0 : a1);
        st += th; szt += th * z;
      end
    if (st == 0) return 0;
    return szt / st;
  endfunction

  task automatic cfg_write(cfg_target_e t, int a, int d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_target = t; cfg_addr = X_W'(a); cfg_wdata = RULE_W'(d);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // the same MFs for both inputs
  task automatic load_mfs();
    for (int j = 0; j < N_BP; j++) begin
      bnd[j] = ((j + 1) * 128) / 7;
      cfg_write(CFG_BP0, j, bnd[j]);
      cfg_write(CFG_BP1, j, bnd[j]);
    end
    ctr[0] = 0; ctr[N_MF-1] = 127;
    for (int j = 1; j < N_MF - 1; j++) ctr[j] = bnd[j-1];
    for (int x = 0; x < (1 << X_W); x++) begin
      int k = interval(x);
      int lo = ctr[k], hi = ctr[k+1];
      int up = ((x - lo) * 15 + (hi - lo) / 2) / (hi - lo);
      int dn = 15 - up;
      if (k % 2 == 0) lut[x] = {A_W'(up), A_W'(dn)};
      else            lut[x] = {A_W'(dn), A_W'(up)};
      cfg_write(CFG_LUT0, x, int'(lut[x]));
      cfg_write(CFG_LUT1, x, int'(lut[x]));
    end
  endtask

  task automatic load_rules(int sel);
    for (int i = 0; i < N_MF; i++)
      for (int j = 0; j < N_MF; j++) begin
        int z = int'(f(sel, real'(ctr[i]), real'(ctr[j])));   // rounds to nearest
        rules[i * N_MF + j] = RULE_W'(3 << Z_W | z);
        cfg_write(CFG_RULE, i * N_MF + j, int'(rules[i * N_MF + j]));
      end
  endtask

  task automatic write_set(int x0, int x1);
    while (!input_ready) @(negedge clk);
    load_input = 1'b1; x0_in = X_W'(x0); x1_in = X_W'(x1);
    exp_q.push_back(infer(x0, x1, tnorm_sel));
    ideal_q.push_back(f(fsel, real'(x0), real'(x1)));
    repeat (2) @(negedge clk);
    load_input = 1'b0;
    @(negedge clk);
  endtask

  always @(negedge clk) if (rst_n && output_ready) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("ERROR unexpected Output_Ready");
    end else begin
      automatic int e = exp_q.pop_front();
      automatic real id = ideal_q.pop_front();
      automatic real er = (real'(zo) > id) ? real'(zo) - id : id - real'(zo);
      if (int'(zo) != e) begin
        failures++;
        $display("ERROR zo=%0d expected %0d", zo, e);
      end
      err_sum += er; n_out++;
      if (er > err_max) err_max = er;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_mfs();
    for (int sel = 0; sel < 2; sel++)
      for (int m = 1; m >= 0; m--) begin
        real mean_pct, max_pct;
        fsel = sel;
        tnorm_sel = m[0];
        load_rules(sel);
        err_sum = 0.0; err_max = 0.0; n_out = 0;
        for (int a = 0; a < 128; a += STEP)
          for (int b = 0; b < 128; b += STEP)
            write_set(a, b);
        while (exp_q.size() != 0) @(negedge clk);
        mean_pct = 100.0 * err_sum / n_out / 127.0;
        max_pct  = 100.0 * err_max / 127.0;
        $display("function %0d %s: %0d points, mean error %.2f%%, max error %.2f%% of full scale",
                 sel, m ? "product" : "MIN", n_out, mean_pct, max_pct);
        if (m == 1) begin
          checks++;
          if (mean_pct >= 1.0 || max_pct >= 3.5) begin
            failures++;
            $display("ERROR approximation error too large");
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
