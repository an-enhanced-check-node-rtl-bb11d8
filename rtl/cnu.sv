// cnu: multi-phase offset-min-sum check-node unit with DC inputs.
//
// A check node of degree d (up to DCMAX) is processed in P = ceil(d/DC)
// phases of DC edges each, so a CNU much narrower than the largest degree of
// the code can still serve every layer.  Between phases the unit keeps the
// running first minimum (min1), its edge index, the running second minimum
// (min2), the XOR of all input signs and the sign of every input; when the
// last phase is done these registers hold exactly what a full-width CNU would
// have found.
//
// Each phase takes two pipeline stages:
//   stage A (cycle k)   : min1 and its position among the DC inputs of phase
//                         k, merged with the stored min1/index; signs stored.
//   stage B (cycle k+1) : min2 of the same inputs (all but the local min1),
//                         merged with the stored min1/min2.
// Stage A of phase k+1 overlaps stage B of phase k, so a layer of P phases
// finishes its search after P+1 cycles.  The final min2 is available
// combinationally in the cycle of the last stage B (final_valid = 1) and
// from the registers afterwards, until the next layer's stage A starts.
//
// Outputs: for the phase selected by o_phase the DC new CN->VN messages
//   c2v[s] = sign * max(m - lambda, 0),  m = (edge == index) ? min2 : min1,
//   sign   = (XOR of all input signs) XOR (sign of that edge's input),
// and the compressed record of the whole check node for the message memory.
// lambda is the offset selected for this layer (0 or 1).  Ties between equal
// magnitudes go to the lowest edge index.  Slots with v_mask = 0 (past the
// degree of the layer) take no part.
//
// The phase split, the stored min1/index/min2 and the 1+1 cycle timing follow
// the published architecture; storing the input signs rather than recomputing
// them is a choice of this design.
module cnu
  import ldpc_pkg::*;
#(
  parameter int DC  = 6,
  parameter int NPH = (DCMAX + DC - 1) / DC,
  parameter int PHW = (NPH > 1) ? $clog2(NPH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // stage A: one phase of inputs
  input  logic           a_valid,
  input  logic           a_first,   // first phase of a layer
  input  logic           a_last,    // last phase of a layer
  input  logic [PHW-1:0] a_phase,
  input  msg_t           v2c    [DC],
  input  logic [DC-1:0]  v_mask,
  // output stage
  input  mag_t           lambda,
  input  logic [PHW-1:0] o_phase,
  output msg_t           c2v    [DC],
  output c2v_rec_t       rec,
  output logic           final_valid
);

  // ---------------- stored state (the inter-phase memory) ----------------
  mag_t             m1_q, m2_q;
  logic [IDXW-1:0]  idx_q;
  logic             par_q;
  logic [DCMAX-1:0] vsgn_q;

  // ---------------- stage A ----------------
  mag_t             a_mag [DC];
  mag_t             lm1;
  logic [$clog2(DC+1)-1:0] lidx;
  logic             lpar, found, take;
  logic [IDXW-1:0]  gidx;
  logic [DCMAX-1:0] vsgn_d;

  always_comb begin
    lm1   = MAG_MAX;
    lidx  = '0;
    lpar  = 1'b0;
    found = 1'b0;
    for (int s = 0; s < DC; s++) begin
      a_mag[s] = v_mask[s] ? mag_of(v2c[s]) : MAG_MAX;
      if (v_mask[s]) begin
        lpar = lpar ^ v2c[s][MW-1];
        if (!found || a_mag[s] < lm1) begin
          lm1   = a_mag[s];
          lidx  = ($bits(lidx))'(s);
          found = 1'b1;
        end
      end
    end
    gidx = IDXW'(int'(a_phase) * DC + int'(lidx));
    take = a_first || (lm1 < m1_q);
    vsgn_d = a_first ? '0 : vsgn_q;
    for (int s = 0; s < DC; s++)
      if (v_mask[s] && (int'(a_phase) * DC + s) < DCMAX)
        vsgn_d[int'(a_phase) * DC + s] = v2c[s][MW-1];
  end

  // A -> B pipeline registers
  logic             b_valid_q, b_first_q, b_last_q;
  mag_t             b_mag_q [DC];
  logic [$clog2(DC+1)-1:0] b_lidx_q;
  mag_t             b_lm1_q, b_pm1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_q      <= '0;
      idx_q     <= '0;
      par_q     <= 1'b0;
      vsgn_q    <= '0;
      b_valid_q <= 1'b0;
      b_first_q <= 1'b0;
      b_last_q  <= 1'b0;
      b_lidx_q  <= '0;
      b_lm1_q   <= '0;
      b_pm1_q   <= '0;
      for (int s = 0; s < DC; s++) b_mag_q[s] <= '0;
    end else begin
      b_valid_q <= a_valid;
      if (a_valid) begin
        if (take) begin
          m1_q  <= lm1;
          idx_q <= gidx;
        end
        par_q     <= a_first ? lpar : (par_q ^ lpar);
        vsgn_q    <= vsgn_d;
        b_first_q <= a_first;
        b_last_q  <= a_last;
        b_lidx_q  <= lidx;
        b_lm1_q   <= lm1;
        b_pm1_q   <= m1_q;
        for (int s = 0; s < DC; s++) b_mag_q[s] <= a_mag[s];
      end
    end
  end

  // ---------------- stage B ----------------
  mag_t lm2, nm2;
  always_comb begin
    lm2 = MAG_MAX;
    for (int s = 0; s < DC; s++)
      if (s != int'(b_lidx_q) && b_mag_q[s] < lm2) lm2 = b_mag_q[s];
    if (b_first_q)                nm2 = lm2;
    else if (b_lm1_q < b_pm1_q)   nm2 = (b_pm1_q < lm2) ? b_pm1_q : lm2;
    else                          nm2 = (m2_q < b_lm1_q) ? m2_q : b_lm1_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         m2_q <= '0;
    else if (b_valid_q) m2_q <= nm2;
  end

  // ---------------- output stage ----------------
  mag_t m2_f, m1_o, m2_o;
  always_comb begin
    final_valid = b_valid_q && b_last_q;
    m2_f = final_valid ? nm2 : m2_q;
    m1_o = (m1_q > lambda) ? (m1_q - lambda) : '0;
    m2_o = (m2_f > lambda) ? (m2_f - lambda) : '0;

    rec.m1  = m1_o;
    rec.m2  = m2_o;
    rec.idx = idx_q;
    for (int e = 0; e < DCMAX; e++) rec.sgn[e] = par_q ^ vsgn_q[e];

    for (int s = 0; s < DC; s++) begin
      int e;
      e = int'(o_phase) * DC + s;
      if (e < DCMAX) c2v[s] = c2v_of(rec, IDXW'(e));
      else           c2v[s] = '0;
    end
  end

endmodule
