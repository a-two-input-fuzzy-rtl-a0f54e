// fz_fuzzifier - look-up-table fuzzification of both inputs.
//
// Each input variable has a 128-word table addressed by the input value.
// Since at any input at most two adjacent MFs are non-zero, and adjacent
// MFs have indices of opposite parity, one 8-bit word holds both degrees of
// truth: bits [3:0] are the alpha of the even-numbered active MF and bits
// [7:4] the alpha of the odd-numbered one. Any MF shape can be loaded. The
// low bit of the MF index given by the active rule selector picks the half.
// (The even/odd word layout is this design's choice: the original chip uses a
// look-up table kept small by the two-MF overlap limit.)
//
// Timing: STAGES clocks from rule address to alpha (the original chip's pipeline
// steps 2 to 9, STAGES = 8). Clock 1 reads the tables, clock 2 selects the
// halves; the remaining STAGES-2 registers only align the result with the
// original step numbering. The tag is delayed by the same amount.
module fz_fuzzifier
  import fuzzy_pkg::*;
#(
  parameter int unsigned STAGES = FUZZ_STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  // table loading
  input  logic             lut_we0,
  input  logic             lut_we1,
  input  logic [X_W-1:0]   lut_waddr,
  input  logic [LUT_W-1:0] lut_wdata,
  // one active rule per clock
  input  ptag_t            tag_in,
  input  logic [X_W-1:0]   x0,
  input  logic [X_W-1:0]   x1,
  input  logic             odd0,     // MF index of X0 is odd
  input  logic             odd1,     // MF index of X1 is odd
  // degrees of truth of the rule's two premises
  output ptag_t            tag_out,
  output logic [A_W-1:0]   alpha0,
  output logic [A_W-1:0]   alpha1
);
  logic [LUT_W-1:0] w0, w1;
  ptag_t            tag_a, tag_b;
  logic             odd0_a, odd1_a;
  logic [A_W-1:0]   a0_b, a1_b;

  fz_ram #(.DEPTH(1 << X_W), .WIDTH(LUT_W)) u_lut0 (
    .clk, .we(lut_we0), .waddr(lut_waddr), .wdata(lut_wdata), .raddr(x0), .rdata(w0));
  fz_ram #(.DEPTH(1 << X_W), .WIDTH(LUT_W)) u_lut1 (
    .clk, .we(lut_we1), .waddr(lut_waddr), .wdata(lut_wdata), .raddr(x1), .rdata(w1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_a  <= '0;
      odd0_a <= 1'b0;
      odd1_a <= 1'b0;
      tag_b  <= '0;
      a0_b   <= '0;
      a1_b   <= '0;
    end else begin
      tag_a  <= tag_in;
      odd0_a <= odd0;
      odd1_a <= odd1;
      tag_b  <= tag_a;
      a0_b   <= odd0_a ? w0[LUT_W-1:A_W] : w0[A_W-1:0];
      a1_b   <= odd1_a ? w1[LUT_W-1:A_W] : w1[A_W-1:0];
    end
  end

  fz_delay #(.WIDTH($bits(ptag_t) + 2 * A_W), .DEPTH(STAGES - 2)) u_align (
    .clk, .rst_n,
    .d({tag_b, a0_b, a1_b}),
    .q({tag_out, alpha0, alpha1}));
endmodule
