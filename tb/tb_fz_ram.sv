// tb_fz_ram - self-checking test of the synchronous RAM: random writes,
// registered reads (one clock latency), read-during-write returns old data.
module tb_fz_ram;
  localparam int unsigned DEPTH = 64, WIDTH = 9, AW = 6;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  fz_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] exp);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("ERROR addr %0d: got %h expected %h", raddr, rdata, exp);
    end
  endtask

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = WIDTH'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // random reads
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); raddr = AW'($urandom);
      @(negedge clk); check(model[raddr]);
    end
    // read during write of the same address returns the old word
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      raddr = AW'($urandom); waddr = raddr; we = 1'b1; wdata = WIDTH'($urandom);
      @(negedge clk);
      we = 1'b0;
      check(model[raddr]);
      model[waddr] = wdata;
      @(negedge clk); check(model[raddr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
