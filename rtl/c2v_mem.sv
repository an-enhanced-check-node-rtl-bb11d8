// c2v_mem: check-node message memory.
// One entry per layer holds the compressed CN->VN messages of the Z check
// nodes of that layer (min1, min2, index of min1, edge signs; see c2v_rec_t),
// from which every edge message is re-expanded when the layer comes round in
// the next iteration.  A per-layer valid bit is cleared by clr at the start
// of a codeword; an entry that has not been written since reads as all-zero
// messages, which is the initial condition of layered decoding.  Read is
// combinational, write at the clock edge (read-before-write in one cycle).
module c2v_mem
  import ldpc_pkg::*;
#(
  parameter int Z      = 52,
  parameter int NLAYER = 42,
  parameter int LW     = $clog2(NLAYER)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic [LW-1:0] rd_layer,
  output c2v_rec_t      rd_data [Z],
  input  logic          wr_en,
  input  logic [LW-1:0] wr_layer,
  input  c2v_rec_t      wr_data [Z]
);
  c2v_rec_t          mem [NLAYER][Z];
  logic [NLAYER-1:0] valid;

  always_ff @(posedge clk)
    if (wr_en && int'(wr_layer) < NLAYER)
      for (int z = 0; z < Z; z++) mem[wr_layer][z] <= wr_data[z];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  valid <= '0;
    else if (clr)                                valid <= '0;
    else if (wr_en && int'(wr_layer) < NLAYER)   valid[wr_layer] <= 1'b1;
  end

  always_comb
    for (int z = 0; z < Z; z++)
      rd_data[z] = (int'(rd_layer) < NLAYER && valid[rd_layer]) ? mem[rd_layer][z] : '0;
endmodule
