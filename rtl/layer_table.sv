// layer_table: base-matrix memory.
// One entry per layer (row of the base matrix): the check-node degree, and
// for each of up to DCMAX edges the block column and the cyclic shift (already
// reduced modulo Z).  The host writes it before decoding, which is how a
// particular base graph (BG1/BG2 rows, lifting size) is selected; the decoder
// reads the entry of the current layer combinationally.
module layer_table
  import ldpc_pkg::*;
#(
  parameter int NLAYER = 42,
  parameter int LW     = $clog2(NLAYER)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [LW-1:0] wr_layer,
  input  layer_t        wr_data,
  input  logic [LW-1:0] rd_layer,
  output layer_t        rd_data
);
  layer_t mem [NLAYER];

  always_ff @(posedge clk)
    if (wr_en && int'(wr_layer) < NLAYER) mem[wr_layer] <= wr_data;

  always_comb rd_data = (int'(rd_layer) < NLAYER) ? mem[rd_layer] : '0;
endmodule
