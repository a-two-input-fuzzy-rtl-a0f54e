// tb_fz_input_sync - self-checking test of the Input_Ready / Load_Input
// handshake: a write held for two clocks is captured on the second edge,
// Input_Ready drops while the set waits, a write while not ready is
// ignored, and taking the set frees the register.
module tb_fz_input_sync;
  import fuzzy_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load_input = 1'b0, set_take = 1'b0;
  logic [X_W-1:0] x0_in = '0, x1_in = '0, x0, x1;
  logic input_ready, set_valid;
  int checks = 0, failures = 0;
  int ignored = 0;

  fz_input_sync dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR %s at %0t", what, $time);
    end
  endtask

  // write a set: data and Load_Input held for two clocks, then released
  task automatic write_set(input logic [X_W-1:0] a, input logic [X_W-1:0] b);
    bit was_ready;
    @(negedge clk);
    was_ready = input_ready;
    load_input = 1'b1; x0_in = a; x1_in = b;
    @(negedge clk);                       // first edge: synchroniser
    if (was_ready) expect_(!set_valid, "captured too early");
    @(negedge clk);                       // second edge: capture
    load_input = 1'b0; x0_in = ~a; x1_in = ~b;
  endtask

  initial begin
    logic [X_W-1:0] a, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_(input_ready && !set_valid, "ready after reset");
    for (int i = 0; i < 100; i++) begin
      a = X_W'($urandom); b = X_W'($urandom);
      write_set(a, b);
      expect_(set_valid && !input_ready, "set captured, not ready");
      expect_(x0 == a && x1 == b, "captured data");
      // a write attempt while not ready must be ignored
      if (i % 3 == 0) begin
        write_set(~a, ~b);
        ignored++;
        expect_(x0 == a && x1 == b, "write while not ready ignored");
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      expect_(set_valid, "set held until taken");
      set_take = 1'b1;
      @(negedge clk);
      set_take = 1'b0;
      expect_(!set_valid && input_ready, "freed by take");
    end
    expect_(ignored > 0, "ignored write exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
