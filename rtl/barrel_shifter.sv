// barrel_shifter: cyclic shifter of a Z-element vector (BS and nBS units).
// Row r of a Z x Z block that is the identity cyclically shifted by s is
// connected to column (r + s) mod Z.  The forward shifter (INVERSE = 0)
// therefore brings APP values from column order into row order:
//   dout[r] = din[(r + s) mod Z]
// and the inverse shifter (INVERSE = 1) returns row-ordered results to
// column order:
//   dout[c] = din[(c - s) mod Z].
// The shift must already be reduced modulo Z.  The lifting size is fixed by
// the parameter Z (52 in the reference configuration).  Combinational: each
// output is a Z-way multiplexer selected by the shift.
module barrel_shifter #(
  parameter int Z = 52,
  parameter int W = ldpc_pkg::APPW,
  parameter bit INVERSE = 1'b0
) (
  input  logic [Z-1:0][W-1:0] din,
  input  logic [ldpc_pkg::SHW-1:0] shift,
  output logic [Z-1:0][W-1:0] dout
);
  always_comb begin
    for (int i = 0; i < Z; i++) begin
      int unsigned k;
      if (INVERSE) k = (i + Z - int'(shift)) % Z;
      else         k = (i + int'(shift)) % Z;
      dout[i] = din[k];
    end
  end
endmodule
