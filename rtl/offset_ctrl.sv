// offset_ctrl: selective offset for the offset-min-sum check nodes.
// The 5G base graphs are very irregular and a single offset on every check
// node costs decoding performance, mostly on the low-degree variable nodes of
// the extension part.  The offset is therefore applied only to the first
// NOFF_LAYERS layers (the kernel rows, whose variable nodes all have a high
// degree): lambda = OFFSET when layer < NOFF_LAYERS, else 0.  The decision is
// made once per layer and broadcast to all Z CNUs.  Combinational.
module offset_ctrl
  import ldpc_pkg::*;
#(
  parameter int NLAYER      = 42,
  parameter int NOFF_LAYERS = 4,
  parameter int OFFSET      = 1
) (
  input  logic [$clog2(NLAYER)-1:0] layer,  // layer index, 0-based
  output mag_t                      lambda
);
  always_comb lambda = (int'(layer) < NOFF_LAYERS) ? mag_t'(OFFSET) : '0;
endmodule
