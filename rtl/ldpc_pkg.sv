// ldpc_pkg: widths, types and helper functions shared by the layered
// offset-min-sum (OMS) decoder for 5G NR QC-LDPC codes.
//
// Number formats (all two's complement):
//   channel LLR  QW   = 4 bits, range -7..+7        (design choice)
//   message      MW   = 4 bits, range -7..+7, used for VN->CN and CN->VN
//   APP LLR      APPW = 7 bits, range -63..+63      (design choice)
// A positive LLR means bit 0; the hard decision of a value is its sign bit.
//
// Code structure limits: a layer (one row of the base matrix) has at most
// DCMAX = 10 edges, the largest check-node degree of base graph 2 (BG2).
// Column indices are COLW bits (BG2 has 52 columns), shift values SHW bits
// (enough for any 5G lifting size up to 384); the host stores each shift
// already reduced modulo Z.
package ldpc_pkg;

  localparam int QW    = 4;
  localparam int MW    = 4;
  localparam int MAGW  = MW - 1;
  localparam int APPW  = 7;
  localparam int DCMAX = 10;
  localparam int IDXW  = $clog2(DCMAX);
  localparam int DEGW  = $clog2(DCMAX + 1);
  localparam int COLW  = 6;
  localparam int SHW   = 9;

  localparam logic [MAGW-1:0] MAG_MAX = '1;

  typedef logic signed [QW-1:0]   llr_t;
  typedef logic signed [MW-1:0]   msg_t;
  typedef logic        [MAGW-1:0] mag_t;
  typedef logic signed [APPW-1:0] app_t;
  // VNU output before saturation: APP minus a message needs one extra bit.
  typedef logic signed [APPW:0]   vfull_t;

  // One layer of the base matrix: its degree, and per edge the block column
  // and the cyclic shift of the Z x Z identity block.
  typedef struct packed {
    logic [DEGW-1:0]             deg;
    logic [DCMAX-1:0][COLW-1:0]  col;
    logic [DCMAX-1:0][SHW-1:0]   shift;
  } layer_t;

  // Compressed CN->VN messages of one check node: offset-corrected first and
  // second minimum, position of the first minimum, sign of every edge.
  typedef struct packed {
    mag_t                    m1;
    mag_t                    m2;
    logic [IDXW-1:0]         idx;
    logic [DCMAX-1:0]        sgn;
  } c2v_rec_t;

  // Expand a compressed record into the message of edge e.
  function automatic msg_t c2v_of(c2v_rec_t r, logic [IDXW-1:0] e);
    mag_t m;
    m = (r.idx == e) ? r.m2 : r.m1;
    return r.sgn[e] ? -msg_t'({1'b0, m}) : msg_t'({1'b0, m});
  endfunction

  // Magnitude of a message already saturated to -MAG_MAX..MAG_MAX.
  function automatic mag_t mag_of(msg_t v);
    return v[MW-1] ? mag_t'(-v) : mag_t'(v);
  endfunction

endpackage
