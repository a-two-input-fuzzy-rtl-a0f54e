// fuzzy_pkg - widths, sizes and shared types of the two-input fuzzy processor.
//
// The processor evaluates a two-input, one-output Sugeno order-zero fuzzy
// system. Each input is 7 bits wide and has 8 membership functions (MFs), of
// which at most two overlap at any point, so every input set fires exactly
// four rules out of 64. Degrees of truth (alpha for one premise, theta for a
// whole rule) are 4-bit numbers, the crisp consequent Z is 7 bits.
// These numbers are those of the original chip. The derived accumulator widths, the
// pipeline tag and the configuration target encoding are this design's own.
package fuzzy_pkg;

  localparam int unsigned X_W       = 7;            // input word width
  localparam int unsigned Z_W       = 7;            // output / consequent width
  localparam int unsigned A_W       = 4;            // alpha and theta width
  localparam int unsigned N_MF      = 8;            // MFs per input variable
  localparam int unsigned MF_W      = 3;            // MF index width
  localparam int unsigned N_BP      = N_MF - 2;     // stored interval boundaries (6)
  localparam int unsigned N_RULES   = N_MF * N_MF;  // rules in the complete system (64)
  localparam int unsigned RA_W      = 2 * MF_W;     // rule address width
  localparam int unsigned PC_W      = 2;            // premise code width
  localparam int unsigned RULE_W    = PC_W + Z_W;   // rule memory word
  localparam int unsigned LUT_W     = 2 * A_W;      // fuzzification LUT word
  localparam int unsigned ACT_RULES = 4;            // active rules per input set
  localparam int unsigned FUZZ_STAGES = 8;          // fuzzification latency (steps 2..9)
  localparam int unsigned ALPHA_MAX = (1 << A_W) - 1;

  // sum of 4 thetas <= 60, sum of 4 theta*Z <= 7620
  localparam int unsigned ST_W  = A_W + 2;          // 6
  localparam int unsigned SZT_W = A_W + Z_W + 2;    // 13

  // Configuration write targets (loading of the fuzzy system).
  typedef enum logic [2:0] {
    CFG_BP0  = 3'd0,   // interval boundaries of variable X0 (address 0..5)
    CFG_BP1  = 3'd1,   // interval boundaries of variable X1 (address 0..5)
    CFG_LUT0 = 3'd2,   // fuzzification table of X0 (address = input value)
    CFG_LUT1 = 3'd3,   // fuzzification table of X1
    CFG_RULE = 3'd4    // rule memory (address = rule antecedent {mf0, mf1})
  } cfg_target_e;

  typedef enum logic {
    TNORM_MIN  = 1'b0,
    TNORM_PROD = 1'b1
  } tnorm_e;

  // Tag travelling with every rule through the pipeline.
  typedef struct packed {
    logic valid;   // a rule occupies this stage
    logic first;   // first of the four active rules of an input set
    logic last;    // fourth (last) active rule of an input set
  } ptag_t;

endpackage
