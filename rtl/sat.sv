// sat: saturation unit placed in front of each CNU input.
// Clips a full-precision VN->CN message to the symmetric message range
// -MAG_MAX..+MAG_MAX (-7..+7 for 4-bit messages); the most negative code is
// never produced, so a magnitude always fits in MW-1 bits.
// Purely combinational.
module sat
  import ldpc_pkg::*;
(
  input  vfull_t din,
  output msg_t   dout
);
  localparam vfull_t HI = vfull_t'(MAG_MAX);
  always_comb begin
    if (din > HI)       dout = msg_t'(HI);
    else if (din < -HI) dout = msg_t'(-HI);
    else                dout = msg_t'(din);
  end
endmodule
