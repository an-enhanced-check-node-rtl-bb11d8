// app_mem: a-posteriori (APP) LLR memory of the layered decoder.
// Holds NCOL block columns of Z APP values each, in column (natural) order.
// The decoder reads and writes up to DC block columns per cycle, one per CNU
// input slot; reads are combinational, writes take effect at the clock edge,
// so a column read in the same cycle as it is written returns the old value.
// The columns written in one cycle are distinct (the edges of a layer sit in
// distinct columns).  A host port loads the channel LLRs one column per cycle
// (sign-extended to the APP width) and reads back the hard decisions (the
// sign bits, 1 = bit one) of one column combinationally.  Host loads take
// priority over decoder writes; the host loads only while the decoder is idle.
// Built from flip-flops so that DC columns can be accessed at once.
module app_mem
  import ldpc_pkg::*;
#(
  parameter int Z    = 52,
  parameter int NCOL = 52,
  parameter int DC   = 6
) (
  input  logic                 clk,
  // decoder ports
  input  logic [COLW-1:0]      rd_col [DC],
  output logic [Z-1:0][APPW-1:0] rd_data [DC],
  input  logic [DC-1:0]        wr_en,
  input  logic [COLW-1:0]      wr_col [DC],
  input  logic [Z-1:0][APPW-1:0] wr_data [DC],
  // host ports
  input  logic                 ld_en,
  input  logic [COLW-1:0]      ld_col,
  input  logic [Z-1:0][QW-1:0] ld_data,
  input  logic [COLW-1:0]      hd_col,
  output logic [Z-1:0]         hd_bits
);
  app_t mem [NCOL][Z];

  always_ff @(posedge clk) begin
    for (int s = 0; s < DC; s++)
      if (wr_en[s] && int'(wr_col[s]) < NCOL)
        for (int z = 0; z < Z; z++) mem[wr_col[s]][z] <= wr_data[s][z];
    if (ld_en && int'(ld_col) < NCOL)
      for (int z = 0; z < Z; z++) mem[ld_col][z] <= app_t'(llr_t'(ld_data[z]));
  end

  always_comb begin
    for (int s = 0; s < DC; s++)
      for (int z = 0; z < Z; z++)
        rd_data[s][z] = (int'(rd_col[s]) < NCOL) ? mem[rd_col[s]][z] : '0;
    for (int z = 0; z < Z; z++)
      hd_bits[z] = (int'(hd_col) < NCOL) ? mem[hd_col][z][APPW-1] : 1'b0;
  end
endmodule
