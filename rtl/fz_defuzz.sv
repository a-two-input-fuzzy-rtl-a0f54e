// fz_defuzz - Sugeno defuzzification sums (pipeline steps 11 and 12).
//
// For each input set it accumulates sum(theta) and sum(theta*Z) over the
// four active rules. The 4 x 7 bit product theta*Z is split into two
// pipelined halves, as in the original 133 MHz chip:
//   step 11: sum(theta) is updated, and the partial products
//            theta[1:0]*Z and theta[3:2]*Z are registered;
//   step 12: the partial products are added (theta*Z) and accumulated.
// A rule tagged "first" restarts both sums. When the rule tagged "last"
// is in step 12, done is high for that clock and the final sums are on
// sum_theta and sum_ztheta (the step-12 adder output, not yet registered),
// so the divider loads them on the same clock edge that ends step 12.
module fz_defuzz
  import fuzzy_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ptag_t            tag_in,
  input  logic [A_W-1:0]   theta,
  input  logic [Z_W-1:0]   z,
  output logic             done,
  output logic [ST_W-1:0]  sum_theta,
  output logic [SZT_W-1:0] sum_ztheta
);
  localparam int unsigned PP_W = Z_W + 2;

  ptag_t             tag11;
  logic [ST_W-1:0]   acc_t;
  logic [PP_W-1:0]   pp_lo, pp_hi;
  logic [SZT_W-1:0]  acc_zt;
  logic [SZT_W-1:0]  tz, acc_zt_next;

  // step 11
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag11 <= '0;
      acc_t <= '0;
      pp_lo <= '0;
      pp_hi <= '0;
    end else begin
      tag11 <= tag_in;
      pp_lo <= PP_W'(theta[1:0]) * PP_W'(z);
      pp_hi <= PP_W'(theta[3:2]) * PP_W'(z);
      if (tag_in.valid)
        acc_t <= (tag_in.first ? '0 : acc_t) + ST_W'(theta);
    end
  end

  // step 12
  always_comb begin
    tz          = SZT_W'(pp_lo) + (SZT_W'(pp_hi) << 2);
    acc_zt_next = (tag11.first ? '0 : acc_zt) + tz;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            acc_zt <= '0;
    else if (tag11.valid)  acc_zt <= acc_zt_next;
  end

  assign done       = tag11.valid && tag11.last;
  assign sum_theta  = acc_t;
  assign sum_ztheta = acc_zt_next;
endmodule
