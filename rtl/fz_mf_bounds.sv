// fz_mf_bounds - interval boundaries of the 8 membership functions of one
// input variable (the MF0 / MF1 memories of the active rule selector).
//
// With 8 MFs and no more than two overlapping, the 7-bit input range splits
// into 7 intervals, and in interval k only MFs k and k+1 are non-zero. The
// first interval starts at 0 and the last ends at 127, so six words are
// enough: bound[j] is the first input value of interval j+1 (where MF j has
// ended and MF j+2 begins). The original chip keeps them in RAMs; here
// they are a 6 x 7 register file because the active MF selector compares
// the input with all six at once. The words must be ascending.
// Reset loads evenly spaced boundaries (this design's choice) so that the
// selector is defined before the fuzzy system is loaded. Writes take effect
// on the next clock edge; the read is combinational.
module fz_mf_bounds
  import fuzzy_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [2:0]           waddr,
  input  logic [X_W-1:0]       wdata,
  output logic [X_W-1:0]       bound [N_BP]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_BP; j++)
        bound[j] <= X_W'(((j + 1) * (1 << X_W)) / (N_BP + 1));
    end else if (we && waddr < 3'(N_BP)) begin
      bound[waddr] <= wdata;
    end
  end
endmodule
