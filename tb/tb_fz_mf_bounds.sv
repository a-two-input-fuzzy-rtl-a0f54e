// tb_fz_mf_bounds - self-checking test of the boundary register file:
// evenly spaced reset values, writes to words 0..5, writes to 6 and 7
// ignored.
module tb_fz_mf_bounds;
  import fuzzy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0] waddr = '0;
  logic [X_W-1:0] wdata = '0;
  logic [X_W-1:0] bound [N_BP];
  logic [X_W-1:0] model [N_BP];
  int checks = 0, failures = 0;

  fz_mf_bounds dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int j = 0; j < N_BP; j++) begin
      checks++;
      if (bound[j] !== model[j]) begin
        failures++;
        $display("ERROR bound[%0d] = %0d expected %0d", j, bound[j], model[j]);
      end
    end
  endtask

  initial begin
    // 128 * (j+1) / 7
    model = '{18, 36, 54, 73, 91, 109};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'($urandom); wdata = X_W'($urandom);
      if (waddr < 3'(N_BP)) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
