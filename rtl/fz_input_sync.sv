// fz_input_sync - input handshake and input data register.
//
// The external device may write an input set only while Input_Ready is high.
// It drives the two 7-bit inputs and Load_Input and holds them for at least
// two clock periods. Load_Input passes through one synchronising flip-flop;
// on the clock edge after that flip-flop has seen the rising edge of
// Load_Input, the data (still held by the device) are captured into the input
// register and Input_Ready drops. The register is a one-set buffer in front
// of the active rule selector: it is freed (Input_Ready high again) on the
// clock in which the selector takes the set, so the next set can be written
// while the current one is still being processed.
// A Load_Input edge while Input_Ready is low is ignored. The one-flop
// synchroniser and the buffer behaviour are this design's choices; the
// handshake rules and the two-period hold follow the original chip.
module fz_input_sync
  import fuzzy_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load_input,   // Load_Input from the external device
  input  logic [X_W-1:0] x0_in,
  input  logic [X_W-1:0] x1_in,
  output logic           input_ready,  // Input_Ready to the external device
  output logic           set_valid,    // the input register holds a set
  output logic [X_W-1:0] x0,
  output logic [X_W-1:0] x1,
  input  logic           set_take      // the active rule selector takes it
);
  logic load_s1, load_s2, full;
  logic capture;

  assign capture = load_s1 && !load_s2 && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_s1 <= 1'b0;
      load_s2 <= 1'b0;
      full    <= 1'b0;
      x0      <= '0;
      x1      <= '0;
    end else begin
      load_s1 <= load_input;
      load_s2 <= load_s1;
      if (capture) begin
        full <= 1'b1;
        x0   <= x0_in;
        x1   <= x1_in;
      end else if (set_take) begin
        full <= 1'b0;
      end
    end
  end

  assign input_ready = !full;
  assign set_valid   = full;
endmodule
