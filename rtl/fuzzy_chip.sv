// fuzzy_chip - two-input, one-output Sugeno order-zero fuzzy processor.
//
// The fuzzy system (8 MFs per input with no more than two overlapping, and
// a complete set of 64 rules whose address is their antecedent) is loaded
// through the cfg port. For every input set only the four active rules are
// processed, one per clock, so a new input set can enter every four clocks
// (30 ns at 133 MHz) whatever the fuzzy system.
//
// Pipeline, one rule per clock (step numbers as in the original chip):
//   input register  Input_Ready / Load_Input handshake (fz_input_sync)
//   step 1          active MFs from the boundary memories (fz_ars), then the
//                   four rule addresses in four consecutive clocks
//   steps 2..9      rule memory read, fuzzification tables (fz_fuzzifier);
//                   the rule word is delayed to stay beside its alphas
//   step 10         alpha selectors and MIN / product (fz_tnorm)
//   steps 11,12     sum(theta), 2-stage theta*Z, sum(theta*Z) (fz_defuzz)
//   division        4 clocks in parallel with the pipeline (fz_divider),
//                   ends with zo and a one-clock Output_Ready pulse
// Latency: 21 clocks from the first clock edge that samples Load_Input high
// to the edge that raises output_ready: 1 synchroniser edge, 1 capture
// edge, steps 1..12 of the first rule, 3 more rule clocks, and 4 division
// clocks. The original chip quotes the same total as 1 synchronisation +
// 12 pipeline + 4 rule + 4 division clocks (157.5 ns at 7.5 ns).
//
// cfg port (this design's own; the original chip is loaded through its
// input data pins or a serial pin, whose protocol is not published): cfg_we
// writes cfg_wdata at cfg_addr of the memory chosen by cfg_target. Boundary
// words use wdata[6:0], table words wdata[7:0], rule words wdata[8:0] =
// {premise code[1:0], Z[6:0]}. Loading is meant to happen while idle.
module fuzzy_chip
  import fuzzy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // input handshake
  input  logic              load_input,
  input  logic [X_W-1:0]    x0_in,
  input  logic [X_W-1:0]    x1_in,
  output logic              input_ready,
  // t-norm mode pin: 0 = MIN, 1 = product
  input  logic              tnorm_sel,
  // output handshake
  output logic [Z_W-1:0]    zo,
  output logic              output_ready,
  // loading of the fuzzy system
  input  logic              cfg_we,
  input  cfg_target_e       cfg_target,
  input  logic [X_W-1:0]    cfg_addr,
  input  logic [RULE_W-1:0] cfg_wdata
);
  // input register
  logic           set_valid, set_take;
  logic [X_W-1:0] in_x0, in_x1;

  fz_input_sync u_in (
    .clk, .rst_n, .load_input, .x0_in, .x1_in, .input_ready,
    .set_valid, .x0(in_x0), .x1(in_x1), .set_take);

  // step 1: active rule selector
  ptag_t           tag1;
  logic [MF_W-1:0] mf0, mf1;
  logic [X_W-1:0]  ars_x0, ars_x1;

  fz_ars u_ars (
    .clk, .rst_n,
    .bp_we0  (cfg_we && cfg_target == CFG_BP0),
    .bp_we1  (cfg_we && cfg_target == CFG_BP1),
    .bp_waddr(cfg_addr[2:0]),
    .bp_wdata(cfg_wdata[X_W-1:0]),
    .set_valid, .x0_in(in_x0), .x1_in(in_x1), .set_take,
    .tag(tag1), .mf0, .mf1, .x0(ars_x0), .x1(ars_x1));

  // steps 2..9: rule memory and fuzzification
  logic [RULE_W-1:0] rule_rd, rule9;
  ptag_t             tag9;
  logic [A_W-1:0]    alpha0, alpha1;

  fz_ram #(.DEPTH(N_RULES), .WIDTH(RULE_W)) u_rules (
    .clk,
    .we   (cfg_we && cfg_target == CFG_RULE),
    .waddr(cfg_addr[RA_W-1:0]),
    .wdata(cfg_wdata),
    .raddr({mf0, mf1}),
    .rdata(rule_rd));

  fz_delay #(.WIDTH(RULE_W), .DEPTH(FUZZ_STAGES - 1)) u_rule_align (
    .clk, .rst_n, .d(rule_rd), .q(rule9));

  fz_fuzzifier #(.STAGES(FUZZ_STAGES)) u_fuzz (
    .clk, .rst_n,
    .lut_we0  (cfg_we && cfg_target == CFG_LUT0),
    .lut_we1  (cfg_we && cfg_target == CFG_LUT1),
    .lut_waddr(cfg_addr),
    .lut_wdata(cfg_wdata[LUT_W-1:0]),
    .tag_in(tag1), .x0(ars_x0), .x1(ars_x1), .odd0(mf0[0]), .odd1(mf1[0]),
    .tag_out(tag9), .alpha0, .alpha1);

  // step 10: MIN / product
  ptag_t          tag10;
  logic [A_W-1:0] theta;
  logic [Z_W-1:0] z10;

  fz_tnorm u_tnorm (
    .clk, .rst_n, .mode(tnorm_e'(tnorm_sel)),
    .tag_in(tag9), .alpha0, .alpha1,
    .premise(rule9[RULE_W-1 -: PC_W]), .z_in(rule9[Z_W-1:0]),
    .tag_out(tag10), .theta, .z_out(z10));

  // steps 11, 12: defuzzification sums
  logic             sums_done;
  logic [ST_W-1:0]  sum_theta;
  logic [SZT_W-1:0] sum_ztheta;

  fz_defuzz u_defuzz (
    .clk, .rst_n, .tag_in(tag10), .theta, .z(z10),
    .done(sums_done), .sum_theta, .sum_ztheta);

  // division and output handshake
  fz_divider u_div (
    .clk, .rst_n, .start(sums_done), .num(sum_ztheta), .den(sum_theta),
    .output_ready, .zo);
endmodule
