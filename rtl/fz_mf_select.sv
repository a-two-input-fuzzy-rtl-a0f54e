// fz_mf_select - active MF selector of one input variable.
//
// Compares the input value with the six ascending interval boundaries in
// parallel and counts how many of them it has reached. The count k (0..6) is
// the interval holding the input, and the two active MFs are k and k+1.
// Purely combinational; the active rule selector registers the result, which
// makes up the single clock the original chip spends on this step.
module fz_mf_select
  import fuzzy_pkg::*;
(
  input  logic [X_W-1:0]  x,
  input  logic [X_W-1:0]  bound [N_BP],
  output logic [MF_W-1:0] k
);
  always_comb begin
    k = '0;
    for (int j = 0; j < N_BP; j++)
      if (x >= bound[j]) k = k + MF_W'(1);
  end
endmodule
