// tb_fuzzy_chip - end-to-end self-checking test of the fuzzy processor at
// its default size.
//
// A fuzzy system is loaded through the cfg port: ascending interval
// boundaries, fuzzification tables (triangular MFs first, then arbitrary
// shapes), and a complete 64-rule set with random premise codes and
// consequents. Input sets are written with the Input_Ready / Load_Input
// handshake (data and Load_Input held two clocks), either as fast as the
// chip accepts them or with random pauses, in MIN and in product mode.
// Each Zo is compared with a behavioural model of the inference that reads
// the same tables. Also checked: the latency from the first clock that
// samples Load_Input to Output_Ready (21 clocks), a result every 4 clocks
// when streaming (the 30 ns processing rate), and that every mechanism
// occurred (both t-norms, all premise codes, no rule fired, waiting for
// Input_Ready, reloading the rules, back-to-back results).
module tb_fuzzy_chip;
  import fuzzy_pkg::*;
  localparam int LATENCY = 21;
  localparam int RATE    = ACT_RULES;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_input = 1'b0;
  logic [X_W-1:0] x0_in = '0, x1_in = '0;
  logic input_ready;
  logic tnorm_sel = 1'b0;
  logic [Z_W-1:0] zo;
  logic output_ready;
  logic cfg_we = 1'b0;
  cfg_target_e cfg_target = CFG_BP0;
  logic [X_W-1:0] cfg_addr = '0;
  logic [RULE_W-1:0] cfg_wdata = '0;

  fuzzy_chip dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // model state: the loaded fuzzy system
  int bnd [2][N_BP];
  logic [LUT_W-1:0] lut [2][1 << X_W];
  logic [RULE_W-1:0] rules [N_RULES];

  // mechanism counters
  int n_min = 0, n_prod = 0, n_zero_den = 0, n_wait = 0;
  int n_rate = 0, n_reload = 0;
  int n_pc [4] = '{0, 0, 0, 0};

  // expected results in order
  int exp_q [$], t_q [$];
  int last_out = -100;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  function automatic int interval(int v, int x);
    int k = 0;
    for (int j = 0; j < N_BP; j++) if (x >= bnd[v][j]) k = j + 1;
    return k;
  endfunction

  function automatic int alpha(int v, int x, int mf);
    return (mf % 2) ? int'(lut[v][x][7:4]) : int'(lut[v][x][3:0]);
  endfunction

  function automatic int infer(int x0, int x1, bit prod, bit count);
    int k0 = interval(0, x0), k1 = interval(1, x1);
    int st = 0, szt = 0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        int m0 = k0 + i, m1 = k1 + j;
        int w = int'(rules[m0 * N_MF + m1]);
        int pc = w >> Z_W, z = w % (1 << Z_W);
        int a0 = (pc & 2) ? alpha(0, x0, m0) : 15;
        int a1 = (pc & 1) ? alpha(1, x1, m1) : 15;
        int th;
        if (pc == 0)   th = 0;
        else if (prod) th = (a0 * a1 + 15) / 16;   // 4-bit product, 15 neutral
        else           th = (a0 < a1) ? a0 : a1;
        if (count) n_pc[pc]++;
        st += th; szt += th * z;
      end
    if (count && st == 0) n_zero_den++;
    if (st == 0) return 0;
    return szt / st;
  endfunction

  // ---------------------------------------------------------- loading
  task automatic cfg_write(cfg_target_e t, int a, int d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_target = t; cfg_addr = X_W'(a); cfg_wdata = RULE_W'(d);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic load_bounds();
    for (int v = 0; v < 2; v++) begin
      int b = 0;
      for (int j = 0; j < N_BP; j++) begin
        b = b + 4 + int'($urandom_range(0, 14));
        bnd[v][j] = b;
        cfg_write(v == 0 ? CFG_BP0 : CFG_BP1, j, b);
      end
    end
  endtask

  // triangular MFs: in interval k, MF k falls from 15 and MF k+1 rises
  task automatic load_triangles();
    for (int v = 0; v < 2; v++)
      for (int x = 0; x < (1 << X_W); x++) begin
        int k = interval(v, x);
        int lo = (k == 0) ? 0 : bnd[v][k-1];
        int hi = (k == N_BP) ? (1 << X_W) - 1 : bnd[v][k];
        int up = (hi == lo) ? 15 : ((x - lo) * 15 + (hi - lo) / 2) / (hi - lo);
        int dn = 15 - up;
        logic [LUT_W-1:0] w;
        if (k % 2 == 0) w = {A_W'(up), A_W'(dn)};   // MF k even, k+1 odd
        else            w = {A_W'(dn), A_W'(up)};
        lut[v][x] = w;
        cfg_write(v == 0 ? CFG_LUT0 : CFG_LUT1, x, int'(w));
      end
  endtask

  task automatic load_random_luts();
    for (int v = 0; v < 2; v++)
      for (int x = 0; x < (1 << X_W); x++) begin
        lut[v][x] = LUT_W'($urandom);
        cfg_write(v == 0 ? CFG_LUT0 : CFG_LUT1, x, int'(lut[v][x]));
      end
  endtask

  // complete rule set; the four rules of MFs 0/1 x 0/1 are absent ("00"),
  // so inputs in the first interval of both variables fire no rule
  task automatic load_rules();
    for (int a = 0; a < N_RULES; a++) begin
      int pc = $urandom_range(0, 3);
      if (a == 0 || a == 1 || a == N_MF || a == N_MF + 1) pc = 0;
      rules[a] = RULE_W'(pc << Z_W | $urandom_range(0, 127));
      cfg_write(CFG_RULE, a, int'(rules[a]));
    end
    n_reload++;
  endtask

  // ---------------------------------------------------------- input side
  // one input set with the handshake; returns after Load_Input is released
  task automatic write_set(int x0, int x1);
    int e;
    if (!input_ready) n_wait++;
    while (!input_ready) @(negedge clk);
    load_input = 1'b1; x0_in = X_W'(x0); x1_in = X_W'(x1);
    e = infer(x0, x1, tnorm_sel, 1'b1);
    exp_q.push_back(e);
    t_q.push_back(cyc);
    if (tnorm_sel) n_prod++; else n_min++;
    repeat (2) @(negedge clk);
    load_input = 1'b0; x0_in = ~x0_in; x1_in = ~x1_in;
    @(negedge clk);
  endtask

  task automatic drain();
    while (exp_q.size() != 0 && cyc < 59000) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  task automatic run_sets(int n, bit gaps);
    for (int i = 0; i < n; i++) begin
      if (i % 25 == 3) write_set(int'($urandom_range(0, bnd[0][0] - 1)),
                                 int'($urandom_range(0, bnd[1][0] - 1)));
      else             write_set(int'($urandom_range(0, 127)), int'($urandom_range(0, 127)));
      if (gaps) repeat ($urandom_range(0, 9)) @(negedge clk);
    end
    drain();
  endtask

  // ---------------------------------------------------------- output side
  always @(negedge clk) if (rst_n && output_ready) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("ERROR unexpected Output_Ready at %0d", cyc);
    end else begin
      automatic int e = exp_q.pop_front(), t0 = t_q.pop_front();
      if (int'(zo) != e) begin
        failures++;
        $display("ERROR zo=%0d expected %0d at %0d", zo, e, cyc);
      end
      if (cyc - t0 < LATENCY) begin
        failures++;
        $display("ERROR latency %0d below %0d", cyc - t0, LATENCY);
      end
      if (cyc - last_out < RATE) begin
        failures++;
        $display("ERROR results %0d clocks apart", cyc - last_out);
      end
      if (cyc - last_out == RATE) n_rate++;
    end
    last_out = cyc;
  end

  // latency of a lone set
  task automatic check_latency();
    int t0;
    drain();
    t0 = cyc;
    write_set(40, 90);
    while (!output_ready && cyc < 59000) @(negedge clk);
    checks++;
    if (cyc - t0 != LATENCY) begin
      failures++;
      $display("ERROR latency %0d expected %0d", cyc - t0, LATENCY);
    end
    @(negedge clk);
  endtask

  // ---------------------------------------------------------- sequence
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!input_ready || output_ready) begin
      failures++;
      $display("ERROR handshake outputs after reset");
    end
    load_bounds();
    load_triangles();
    load_rules();

    tnorm_sel = 1'b0;
    check_latency();
    run_sets(150, 1'b0);          // streaming, MIN
    run_sets(60, 1'b1);           // with pauses
    tnorm_sel = 1'b1;
    check_latency();
    run_sets(150, 1'b0);          // streaming, product

    // new rules and arbitrary MF shapes, same chip
    load_rules();
    load_random_luts();
    tnorm_sel = 1'b0;
    run_sets(100, 1'b0);
    tnorm_sel = 1'b1;
    run_sets(100, 1'b1);
    drain();

    // every mechanism must have happened
    begin
      string names [10] = '{"MIN", "product", "premise 00", "premise 01", "premise 10",
                            "premise 11", "no rule fired", "Input_Ready wait",
                            "rule memory reload", "4-clock result rate"};
      int counts [10];
      counts = '{n_min, n_prod, n_pc[0], n_pc[1], n_pc[2], n_pc[3], n_zero_den,
                 n_wait, n_reload - 1, n_rate};
      for (int i = 0; i < 10; i++) begin
        checks++;
        $display("mechanism %-20s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin
          failures++;
          $display("ERROR mechanism %s never happened", names[i]);
        end
      end
      checks++;
      if (exp_q.size() != 0) begin
        failures++;
        $display("ERROR %0d results missing", exp_q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
