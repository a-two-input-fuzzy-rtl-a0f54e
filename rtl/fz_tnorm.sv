// fz_tnorm - alpha selectors and MIN / product operator (pipeline step 10).
//
// The premise code of the rule being processed says which input variables
// the rule of the original fuzzy system really uses: bit 1 stands for X0,
// bit 0 for X1 ("10" = only X0 present). For an absent variable the alpha
// selector substitutes 1111, the neutral value of both t-norms. Code "00"
// means the rule did not exist in the original system, so theta is forced
// to 0. The mode pin picks the t-norm: minimum, or product. The product of
// two 4-bit degrees is scaled back to 4 bits as (a*b + 15) >> 4, which keeps
// 15 as the neutral value and 0 as the zero (the scaling is this design's
// choice; the original chip's scaling is not published). One clock, registered output;
// the tag and the 7-bit consequent Z pass through alongside.
module fz_tnorm
  import fuzzy_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  tnorm_e          mode,
  input  ptag_t           tag_in,
  input  logic [A_W-1:0]  alpha0,
  input  logic [A_W-1:0]  alpha1,
  input  logic [PC_W-1:0] premise,
  input  logic [Z_W-1:0]  z_in,
  output ptag_t           tag_out,
  output logic [A_W-1:0]  theta,
  output logic [Z_W-1:0]  z_out
);
  logic [A_W-1:0]   s0, s1, th;
  logic [2*A_W-1:0] prod;

  always_comb begin
    s0   = premise[1] ? alpha0 : A_W'(ALPHA_MAX);
    s1   = premise[0] ? alpha1 : A_W'(ALPHA_MAX);
    prod = s0 * s1 + (2*A_W)'(ALPHA_MAX);
    if (premise == '0)
      th = '0;
    else if (mode == TNORM_MIN)
      th = (s0 < s1) ? s0 : s1;
    else
      th = prod[2*A_W-1:A_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_out <= '0;
      theta   <= '0;
      z_out   <= '0;
    end else begin
      tag_out <= tag_in;
      theta   <= th;
      z_out   <= z_in;
    end
  end
endmodule
