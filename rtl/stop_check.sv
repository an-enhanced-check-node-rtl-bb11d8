// stop_check: early-termination test of the layered decoder.
// Decoding stops as soon as the hard decisions form a codeword.  The check
// is made on the fly, without an extra pass over the parity-check matrix:
//  * during the search cycles of a layer, the XOR of the APP sign bits read
//    for each of the Z rows is accumulated over the phases; at the last phase
//    every row must have even parity;
//  * during the update cycles, no APP hard decision may change sign.
// If both hold for every layer of an iteration, all parity checks were
// evaluated on one unchanged hard-decision vector, so that vector is a
// codeword.  clean_now is the verdict including the current cycle, so the
// controller can stop at the last cycle of an iteration.
// iter_first marks the first cycle of an iteration (restarts the verdict).
// In update cycles s_hd carries the signs read before the update and u_new
// the signs about to be written.  The test and its timing are a choice of
// this design; the architecture only requires stopping on a codeword.
module stop_check
  import ldpc_pkg::*;
#(
  parameter int Z  = 52,
  parameter int DC = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  iter_first,
  input  logic                  s_valid,
  input  logic                  s_first,
  input  logic                  s_last,
  input  logic [DC-1:0]         mask,
  input  logic [DC-1:0][Z-1:0]  s_hd,    // APP signs read (row order), search and update cycles
  input  logic                  u_valid,
  input  logic [DC-1:0][Z-1:0]  u_new,   // APP signs written (row order)
  output logic                  clean_now
);
  logic [Z-1:0] par_q, par_now;
  logic         clean_q, fail;

  always_comb begin
    par_now = s_first ? '0 : par_q;
    fail    = 1'b0;
    for (int s = 0; s < DC; s++)
      if (mask[s]) begin
        par_now = par_now ^ s_hd[s];
        if (u_valid && (s_hd[s] != u_new[s])) fail = 1'b1;
      end
    if (s_valid && s_last && (par_now != '0)) fail = 1'b1;
    clean_now = (iter_first ? 1'b1 : clean_q) & ~fail;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_q   <= '0;
      clean_q <= 1'b0;
    end else begin
      if (s_valid) par_q <= par_now;
      clean_q <= clean_now;
    end
  end
endmodule
