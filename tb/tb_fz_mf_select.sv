// tb_fz_mf_select - self-checking test of the active MF selector: random
// ascending boundaries, every input value, interval compared with a scan of
// the boundaries.
module tb_fz_mf_select;
  import fuzzy_pkg::*;
  logic [X_W-1:0]  x;
  logic [X_W-1:0]  bound [N_BP];
  logic [MF_W-1:0] k;
  int checks = 0, failures = 0;
  int exp_k;
  int hist [N_MF];

  fz_mf_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      automatic int b = 0;
      // ascending boundaries, possibly equal
      for (int j = 0; j < N_BP; j++) begin
        b = b + int'($urandom_range(0, 127 - b) / 3);
        bound[j] = X_W'(b);
      end
      for (int v = 0; v < (1 << X_W); v++) begin
        x = X_W'(v);
        #1;
        // interval = last boundary not above x, plus one
        exp_k = 0;
        for (int j = N_BP - 1; j >= 0; j--)
          if (v >= int'(bound[j])) begin exp_k = j + 1; break; end
        hist[exp_k]++;
        checks++;
        if (int'(k) != exp_k) begin
          failures++;
          $display("ERROR x=%0d k=%0d expected %0d", v, k, exp_k);
        end
      end
    end
    for (int i = 0; i < N_MF - 1; i++)
      if (hist[i] == 0) begin
        failures++;
        $display("ERROR interval %0d never seen", i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
