// app_update: APP update unit, one lane.
// After the check node has produced its new message, the new a-posteriori
// value of the variable node is the VN->CN message plus the new CN->VN
// message, clipped to the symmetric APP range -(2^(APPW-1)-1)..+(2^(APPW-1)-1).
// The VN->CN message is used at full precision (before the SAT unit), which
// is a choice of this design.  Purely combinational.
module app_update
  import ldpc_pkg::*;
(
  input  vfull_t v2c,      // VN->CN message, unclipped
  input  msg_t   c2v_new,  // new CN->VN message
  output app_t   app_new
);
  localparam int SW = APPW + 2;
  localparam logic signed [SW-1:0] HI = SW'((1 << (APPW - 1)) - 1);
  logic signed [SW-1:0] s;
  always_comb begin
    s = SW'(v2c) + SW'(c2v_new);
    if (s > HI)       app_new = app_t'(HI);
    else if (s < -HI) app_new = app_t'(-HI);
    else              app_new = app_t'(s);
  end
endmodule
