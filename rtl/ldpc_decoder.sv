// ldpc_decoder: layered offset-min-sum decoder for 5G NR QC-LDPC codes with
// a narrow, multi-phase check-node unit.
//
// The 5G base graphs are very irregular (BG2: check-node degrees 3..10, most
// of them 4 or 5).  Instead of sizing every check-node unit (CNU) and every
// per-edge datapath for the largest degree, the datapath here has DC = 6
// edge slots; a layer with more edges is processed in ceil(d/DC) phases and
// the CNUs carry min1, its index and min2 from phase to phase.
//
// Datapath, per edge slot s (DC of them) and lane z (Z of them):
//   APP memory --> BS (cyclic shift) --> VNU (APP - old CN message)
//     --> SAT --> CNU[z] input s
//   CNU[z] output s + VNU result --> APP update --> nBS --> APP memory
// The old CN messages are re-expanded from the compressed records of the
// CN message memory.  Z CNUs work in parallel, one per row of the lifted
// layer.  The selective offset (offset_ctrl) is decided once per layer and
// broadcast to all CNUs.  Schedule: see decoder_ctrl (2 cycles per layer of
// degree <= DC, 2 extra cycles per extra phase).  Decoding stops at the end
// of the first iteration whose hard decisions form a codeword, or after
// it_max iterations.
//
// Host interface (all synchronous to clk, used while busy = 0):
//   tbl_we/tbl_layer/tbl_data  write one base-matrix row (degree, columns,
//                              shifts mod Z) into the layer table;
//   ld_en/ld_col/ld_data       load Z channel LLRs of one block column;
//   num_layers, it_max, start  start decoding (start is a one-cycle pulse);
//   done (pulse), success, iters  end of decoding;
//   hd_col -> hd_bits          hard decisions of one block column (1 = bit 1).
//
// The phase-split CNU, the per-layer selective offset and the unit list
// (SAT, VNU, BS, nBS, APP units per CNU input) follow the published
// architecture; the number formats, the memory organisation, the schedule of
// the update cycles and the stopping test are choices of this design.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int Z           = 52,
  parameter int DC          = 6,
  parameter int NCOL        = 52,
  parameter int NLAYER      = 42,
  parameter int NOFF_LAYERS = 4,
  parameter int OFFSET      = 1,
  parameter int ITW         = 5,
  parameter int LW          = $clog2(NLAYER),
  parameter int NPH         = (DCMAX + DC - 1) / DC,
  parameter int PHW         = (NPH > 1) ? $clog2(NPH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // base-matrix table
  input  logic                 tbl_we,
  input  logic [LW-1:0]        tbl_layer,
  input  layer_t               tbl_data,
  // channel LLR load and hard-decision read-out
  input  logic                 ld_en,
  input  logic [COLW-1:0]      ld_col,
  input  logic [Z-1:0][QW-1:0] ld_data,
  input  logic [COLW-1:0]      hd_col,
  output logic [Z-1:0]         hd_bits,
  // control
  input  logic [LW:0]          num_layers,
  input  logic [ITW-1:0]       it_max,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 success,
  output logic [ITW-1:0]       iters
);

  // ---------------- control ----------------
  logic           c2v_clr, iter_first, a_valid, a_first, a_last, u_valid, u_last;
  logic           clean_now;
  logic [LW-1:0]  layer;
  logic [PHW-1:0] r_phase;
  logic [DC-1:0]  r_mask;
  layer_t         lt;
  mag_t           lambda;

  decoder_ctrl #(.DC(DC), .NLAYER(NLAYER), .ITW(ITW)) u_ctrl (
    .clk, .rst_n, .start, .num_layers, .it_max,
    .deg(lt.deg), .clean_now,
    .busy, .done, .success, .iters,
    .c2v_clr, .layer, .iter_first,
    .a_valid, .a_first, .a_last, .r_phase, .r_mask, .u_valid, .u_last
  );

  layer_table #(.NLAYER(NLAYER)) u_table (
    .clk, .wr_en(tbl_we), .wr_layer(tbl_layer), .wr_data(tbl_data),
    .rd_layer(layer), .rd_data(lt)
  );

  offset_ctrl #(.NLAYER(NLAYER), .NOFF_LAYERS(NOFF_LAYERS), .OFFSET(OFFSET)) u_offset (
    .layer, .lambda
  );

  // ---------------- edge selection per slot ----------------
  logic [COLW-1:0] s_col   [DC];
  logic [SHW-1:0]  s_shift [DC];
  logic [IDXW-1:0] s_edge  [DC];
  always_comb
    for (int s = 0; s < DC; s++) begin
      int e;
      e = int'(r_phase) * DC + s;
      if (e < DCMAX) begin
        s_col[s]   = lt.col[e];
        s_shift[s] = lt.shift[e];
        s_edge[s]  = IDXW'(e);
      end else begin
        s_col[s]   = '0;
        s_shift[s] = '0;
        s_edge[s]  = '0;
      end
    end

  // ---------------- memories ----------------
  logic [Z-1:0][APPW-1:0] app_rd [DC];
  logic [Z-1:0][APPW-1:0] app_wr [DC];
  logic [DC-1:0]          app_we;

  assign app_we = u_valid ? r_mask : '0;

  app_mem #(.Z(Z), .NCOL(NCOL), .DC(DC)) u_app (
    .clk, .rd_col(s_col), .rd_data(app_rd),
    .wr_en(app_we), .wr_col(s_col), .wr_data(app_wr),
    .ld_en, .ld_col, .ld_data, .hd_col, .hd_bits
  );

  c2v_rec_t c2v_rd  [Z];
  c2v_rec_t c2v_new [Z];

  c2v_mem #(.Z(Z), .NLAYER(NLAYER)) u_c2v (
    .clk, .rst_n, .clr(c2v_clr),
    .rd_layer(layer), .rd_data(c2v_rd),
    .wr_en(u_last), .wr_layer(layer), .wr_data(c2v_new)
  );

  // ---------------- per-slot datapath ----------------
  logic [Z-1:0][APPW-1:0] rows_rd  [DC];
  logic [Z-1:0][APPW-1:0] rows_new [DC];
  msg_t                   v2c_sat  [Z][DC];
  msg_t                   c2v_out  [Z][DC];
  logic [DC-1:0][Z-1:0]   hd_rd, hd_new;

  for (genvar s = 0; s < DC; s++) begin : g_slot
    barrel_shifter #(.Z(Z), .W(APPW), .INVERSE(1'b0)) u_bs (
      .din(app_rd[s]), .shift(s_shift[s]), .dout(rows_rd[s])
    );
    for (genvar z = 0; z < Z; z++) begin : g_lane
      app_t   a, an;
      msg_t   c_old, v_s;
      vfull_t v_f;
      assign a     = app_t'(rows_rd[s][z]);
      assign c_old = r_mask[s] ? c2v_of(c2v_rd[z], s_edge[s]) : '0;
      vnu        u_vnu (.app(a), .c2v_old(c_old), .v2c(v_f));
      sat        u_sat (.din(v_f), .dout(v_s));
      app_update u_upd (.v2c(v_f), .c2v_new(c2v_out[z][s]), .app_new(an));
      assign v2c_sat[z][s]  = v_s;
      assign rows_new[s][z] = an;
      assign hd_rd[s][z]    = a[APPW-1];
      assign hd_new[s][z]   = an[APPW-1];
    end
    barrel_shifter #(.Z(Z), .W(APPW), .INVERSE(1'b1)) u_nbs (
      .din(rows_new[s]), .shift(s_shift[s]), .dout(app_wr[s])
    );
  end

  // ---------------- check-node units ----------------
  logic [Z-1:0] cnu_final;
  for (genvar z = 0; z < Z; z++) begin : g_cnu
    cnu #(.DC(DC)) u_cnu (
      .clk, .rst_n,
      .a_valid, .a_first, .a_last, .a_phase(r_phase),
      .v2c(v2c_sat[z]), .v_mask(r_mask),
      .lambda, .o_phase(r_phase),
      .c2v(c2v_out[z]), .rec(c2v_new[z]), .final_valid(cnu_final[z])
    );
  end

  // ---------------- stopping test ----------------
  stop_check #(.Z(Z), .DC(DC)) u_stop (
    .clk, .rst_n, .iter_first,
    .s_valid(a_valid), .s_first(a_first), .s_last(a_last),
    .mask(r_mask), .s_hd(hd_rd), .u_valid, .u_new(hd_new),
    .clean_now
  );

  // the CNUs complete their search exactly in the first update cycle of a
  // layer, the cycle after its last search cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cnu_final == {Z{u_valid && $past(a_valid)}}));
  // host accesses only while idle
  assert property (@(posedge clk) disable iff (!rst_n) (ld_en || tbl_we) |-> !busy);
endmodule
