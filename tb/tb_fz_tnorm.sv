// tb_fz_tnorm - self-checking exhaustive test of the alpha selectors and
// MIN / product operator: all alphas, premise codes and modes, one clock
// latency, tag and Z pass-through.
module tb_fz_tnorm;
  import fuzzy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  tnorm_e mode = TNORM_MIN;
  ptag_t tag_in = '0, tag_out;
  logic [A_W-1:0] alpha0 = '0, alpha1 = '0, theta;
  logic [PC_W-1:0] premise = '0;
  logic [Z_W-1:0] z_in = '0, z_out;
  int checks = 0, failures = 0;

  fz_tnorm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_theta(int m, int a0, int a1, int pc);
    int s0, s1;
    if (pc == 0) return 0;
    s0 = pc[1] ? a0 : 15;
    s1 = pc[0] ? a1 : 15;
    if (m == 0) return (s0 < s1) ? s0 : s1;
    // product rescaled to 4 bits: round(s0*s1/15) is within 1 of this
    return (s0 * s1 + 15) / 16;
  endfunction

  initial begin
    int e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++)
      for (int pc = 0; pc < 4; pc++)
        for (int a0 = 0; a0 < 16; a0++)
          for (int a1 = 0; a1 < 16; a1++) begin
            @(negedge clk);
            mode = tnorm_e'(m); premise = PC_W'(pc);
            alpha0 = A_W'(a0); alpha1 = A_W'(a1);
            z_in = Z_W'($urandom); tag_in = ptag_t'($urandom);
            @(negedge clk);
            e = ref_theta(m, a0, a1, pc);
            checks++;
            if (int'(theta) != e || z_out != z_in || tag_out != tag_in) begin
              failures++;
              $display("ERROR m=%0d pc=%0d a0=%0d a1=%0d theta=%0d exp %0d", m, pc, a0, a1, theta, e);
            end
            // identities of the product mode
            if (m == 1 && pc == 3 && (a1 == 15) && int'(theta) != a0) begin
              failures++;
              $display("ERROR product with 15 is not neutral for %0d", a0);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
