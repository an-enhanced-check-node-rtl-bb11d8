// vnu: variable-node unit of the layered decoder, one lane.
// In layered decoding the APP value of a variable node already contains the
// message the current check node sent it last time; the VNU removes it:
//   v2c = app - c2v_old.
// The result keeps one extra bit so it can never wrap; the SAT unit that
// follows clips it to the message width for the CNU, while the APP update
// adds the new CN message to the unclipped value.  Purely combinational.
module vnu
  import ldpc_pkg::*;
(
  input  app_t   app,      // APP value read from the APP memory (shifted)
  input  msg_t   c2v_old,  // CN->VN message of this edge from the last iteration
  output vfull_t v2c       // VN->CN message, full precision
);
  always_comb v2c = vfull_t'(app) - vfull_t'(c2v_old);
endmodule
