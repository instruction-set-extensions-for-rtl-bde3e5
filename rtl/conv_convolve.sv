// conv_convolve: one VPE's datapath for the convolve operation of
// programmable convolutional encoding.
//
// Each encoded output bit k is the modulo-2 sum of the Current State bits
// selected by tap word k: data_out[k] = ^(state & taps[k]). This is the
// proposed structure: one AND gate per state bit and one wide XOR per output
// bit, replicated once per output bit. The maximum constraint length W = 8
// and maximum output length NOUT = 2 are the sizes of the proposed design;
// a constraint length shorter than W is expressed by zero taps above it.
// Tap word k occupies bits [k*W +: W] of the taps operand. Purely
// combinational.
module conv_convolve #(
  parameter int unsigned W    = 8,   // maximum constraint length
  parameter int unsigned NOUT = 2    // maximum output length
) (
  input  logic [W-1:0]      state_in,  // Current State
  input  logic [NOUT*W-1:0] taps,      // Taps(NOUT-1) .. Taps(0)
  output logic [NOUT-1:0]   data_out   // Data Out(NOUT-1) .. Data Out(0)
);
  for (genvar k = 0; k < NOUT; k++) begin : g_out
    logic [W-1:0] gated;
    assign gated       = state_in & taps[k*W +: W];
    assign data_out[k] = ^gated;
  end
endmodule
