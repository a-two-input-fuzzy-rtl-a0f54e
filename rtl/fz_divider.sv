// fz_divider - output division Zo = sum(theta*Z) / sum(theta) and the
// Output_Ready handshake.
//
// A restoring radix-4 divider: two quotient bits per clock, so the 8-bit
// quotient takes STEPS = 4 clocks, the 30 ns at 7.5 ns of the original
// chip. It runs in parallel with the pipeline: a start every four clocks
// (one input set) is accepted, also in the clock that completes the
// previous division.
// Since Zo is a weighted mean of 7-bit values the quotient never exceeds
// 127; the top NUM_W-2*STEPS dividend bits are therefore loaded straight
// into the partial remainder, and the remaining bits are shifted in two at
// a time. The quotient is truncated, and sum(theta) = 0 (no rule fired)
// gives Zo = 0: both are this design's choices.
// Timing: start is high in the clock of pipeline step 12 of the last rule;
// the edge ending it loads the sums. The four division clocks follow, and zo
// and output_ready (a one-clock pulse) change on the edge ending the fourth
// of them, i.e. five edges after the start clock. zo then holds until the
// next result. A new start may come in the fourth division clock.
module fz_divider
  import fuzzy_pkg::*;
#(
  parameter int unsigned NUM_W = SZT_W,
  parameter int unsigned DEN_W = ST_W,
  parameter int unsigned STEPS = 4,
  parameter int unsigned Q_W   = Z_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             output_ready,  // Output_Ready
  output logic [Q_W-1:0]   zo
);
  localparam int unsigned QB = 2 * STEPS;       // quotient bits produced
  localparam int unsigned CW = $clog2(STEPS + 1);

  logic             busy;
  logic [CW-1:0]    cnt;
  logic [DEN_W-1:0] den_r;
  logic [DEN_W-1:0] rem;
  logic [QB-1:0]    low;       // dividend bits still to shift in
  logic [QB-1:0]    q;
  logic             zero_den;

  logic [DEN_W+1:0] r2, d1, d2, d3, r_next;
  logic [1:0]       digit;
  logic [QB-1:0]    q_next;

  always_comb begin
    r2 = {rem, low[QB-1 -: 2]};
    d1 = (DEN_W+2)'(den_r);
    d2 = d1 << 1;
    d3 = d1 + d2;
    if (r2 >= d3)      begin digit = 2'd3; r_next = r2 - d3; end
    else if (r2 >= d2) begin digit = 2'd2; r_next = r2 - d2; end
    else if (r2 >= d1) begin digit = 2'd1; r_next = r2 - d1; end
    else               begin digit = 2'd0; r_next = r2;      end
    q_next = {q[QB-3:0], digit};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      cnt          <= '0;
      den_r        <= '0;
      rem          <= '0;
      low          <= '0;
      q            <= '0;
      zero_den     <= 1'b0;
      output_ready <= 1'b0;
      zo           <= '0;
    end else begin
      output_ready <= 1'b0;
      if (busy) begin
        rem <= r_next[DEN_W-1:0];
        low <= low << 2;
        q   <= q_next;
        cnt <= cnt + CW'(1);
        if (cnt == CW'(STEPS - 1)) begin
          busy         <= 1'b0;
          output_ready <= 1'b1;
          zo           <= zero_den ? '0 : Q_W'(q_next);
        end
      end
      if (start) begin
        busy     <= 1'b1;
        cnt      <= '0;
        den_r    <= den;
        rem      <= DEN_W'(num >> QB);
        low      <= num[QB-1:0];
        q        <= '0;
        zero_den <= (den == '0);
      end
    end
  end

  // a new division may start only in the last clock of the previous one
  a_start_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (!busy || cnt == CW'(STEPS - 1)));
  // the quotient fits in 2*STEPS bits: the dividend's high part is below the divisor
  a_quotient_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (start && den != '0) |-> (num >> QB) < NUM_W'(den));
endmodule
