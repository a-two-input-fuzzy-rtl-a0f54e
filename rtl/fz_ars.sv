// fz_ars - Active Rule Selector.
//
// The rule memory holds the complete rule set (64 rules), and a rule's
// address is its antecedent {MF index of X0, MF index of X1}. Because no
// more than two MFs overlap, an input set makes exactly four rules active:
// those built from MFs k0, k0+1 of X0 and k1, k1+1 of X1, where k is the
// interval found by the active MF selector.
//
// Timing: in the clock where a set is taken from the input register, both
// selectors compare the inputs with the boundary memories MF0 / MF1 and the
// intervals are registered (pipeline step 1). In the following four clocks
// the selector presents the addresses {k0,k1}, {k0,k1+1}, {k0+1,k1},
// {k0+1,k1+1}, one per clock, together with the inputs (for the
// fuzzification tables) and a tag marking the first and last rule. On the
// fourth one it can already take the next set, so sets are processed
// back to back, one rule per clock. The rule order and this look-ahead take
// are this design's choices.
module fz_ars
  import fuzzy_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // boundary memory loading
  input  logic            bp_we0,
  input  logic            bp_we1,
  input  logic [2:0]      bp_waddr,
  input  logic [X_W-1:0]  bp_wdata,
  // from the input register
  input  logic            set_valid,
  input  logic [X_W-1:0]  x0_in,
  input  logic [X_W-1:0]  x1_in,
  output logic            set_take,
  // to the rule memory and the fuzzifier
  output ptag_t           tag,
  output logic [MF_W-1:0] mf0,
  output logic [MF_W-1:0] mf1,
  output logic [X_W-1:0]  x0,
  output logic [X_W-1:0]  x1
);
  logic [X_W-1:0]  bound0 [N_BP];
  logic [X_W-1:0]  bound1 [N_BP];
  logic [MF_W-1:0] ksel0, ksel1;
  logic [MF_W-1:0] k0, k1;
  logic [1:0]      r;
  logic            busy;

  fz_mf_bounds u_mf0 (.clk, .rst_n, .we(bp_we0), .waddr(bp_waddr), .wdata(bp_wdata), .bound(bound0));
  fz_mf_bounds u_mf1 (.clk, .rst_n, .we(bp_we1), .waddr(bp_waddr), .wdata(bp_wdata), .bound(bound1));

  fz_mf_select u_sel0 (.x(x0_in), .bound(bound0), .k(ksel0));
  fz_mf_select u_sel1 (.x(x1_in), .bound(bound1), .k(ksel1));

  assign set_take = set_valid && (!busy || r == 2'(ACT_RULES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      r    <= '0;
      k0   <= '0;
      k1   <= '0;
      x0   <= '0;
      x1   <= '0;
    end else if (set_take) begin
      busy <= 1'b1;
      r    <= '0;
      k0   <= ksel0;
      k1   <= ksel1;
      x0   <= x0_in;
      x1   <= x1_in;
    end else if (busy) begin
      r <= r + 2'd1;
      if (r == 2'(ACT_RULES - 1)) busy <= 1'b0;
    end
  end

  assign mf0       = k0 + MF_W'(r[1]);
  assign mf1       = k1 + MF_W'(r[0]);
  assign tag.valid = busy;
  assign tag.first = busy && r == 2'd0;
  assign tag.last  = busy && r == 2'(ACT_RULES - 1);

  // the two active MFs of each variable exist: the interval is at most 6
  a_interval_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (k0 <= MF_W'(N_MF - 2) && k1 <= MF_W'(N_MF - 2)));
endmodule
