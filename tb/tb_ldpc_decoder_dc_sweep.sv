// tb_ldpc_decoder_dc_sweep: the decoder built with five CNU widths, DC = 3,
// 4, 5, 6 and 10, all other parameters at their defaults, decoding the same
// frames of the synthetic 42-layer code with the BG2 degree profile (see
// tb_ldpc_decoder for the code formula).  Splitting a check node into phases
// must not change any result, so every instance must match the same integer
// reference model bit for bit; only the time differs, and each instance's
// busy cycles must equal iterations x (2L + sigma(DC)) with
// sigma(DC) = 2 x sum over layers of (ceil(d/DC) - 1).  The normalised
// throughput 2L / (2L + sigma) and the per-edge hardware ratio DC / 10 are
// printed for each width.
module tb_ldpc_decoder_dc_sweep;
  import ldpc_pkg::*;

  localparam int Z = 52, DC = 6, NCOL = 52, NLAYER = 42, NOFF = 4, ITMAX = 15;
  localparam int LW = $clog2(NLAYER);
  localparam int NFRAMES = 4;
  localparam int NI = 5;
  localparam int DCS [NI] = '{3, 4, 5, 6, 10};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 tbl_we = 1'b0;
  logic [LW-1:0]        tbl_layer = '0;
  layer_t               tbl_data = '0;
  logic                 ld_en = 1'b0;
  logic [COLW-1:0]      ld_col = '0;
  logic [Z-1:0][QW-1:0] ld_data = '0;
  logic [COLW-1:0]      hd_col = '0;
  logic [LW:0]          num_layers = (LW+1)'(NLAYER);
  logic [4:0]           it_max = 5'(ITMAX);
  logic                 start = 1'b0;
  logic [NI-1:0]        busy, done, success;
  logic [4:0]           iters [NI];
  logic [Z-1:0]         hd_bits_i [NI];

  for (genvar i = 0; i < NI; i++) begin : g_dut
    ldpc_decoder #(.DC(DCS[i])) dut (
      .clk, .rst_n, .tbl_we, .tbl_layer, .tbl_data, .ld_en, .ld_col, .ld_data,
      .hd_col, .hd_bits(hd_bits_i[i]), .num_layers, .it_max, .start,
      .busy(busy[i]), .done(done[i]), .success(success[i]), .iters(iters[i])
    );
  end

  int checks = 0, failures = 0;

  // ---------------- code description ----------------
  int deg_of [NLAYER];
  int col_of [NLAYER][DCMAX];
  int sh_of  [NLAYER][DCMAX];

  function automatic void build_code();
    int l = 0;
    int kern [4] = '{8, 10, 8, 10};
    for (int i = 0; i < 4; i++) deg_of[l++] = kern[i];
    for (int i = 0; i < 6; i++)  deg_of[l++] = 3;
    for (int i = 0; i < 20; i++) deg_of[l++] = 4;
    for (int i = 0; i < 9; i++)  deg_of[l++] = 5;
    for (int i = 0; i < 3; i++)  deg_of[l++] = 6;
    for (int k = 0; k < NLAYER; k++)
      for (int j = 0; j < DCMAX; j++) begin
        col_of[k][j] = (j == 0) ? 0 : 1 + (3 * k + 5 * j) % (NCOL - 1);
        sh_of[k][j]  = (17 * k + 11 * j + 3) % Z;
      end
  endfunction

  // ---------------- reference model ----------------
  int app_r [NCOL*Z];
  int c2v_r [NLAYER][Z][DCMAX];
  int n_multiphase = 0, n_offset = 0, n_sat = 0, n_appsat = 0;
  int n_early = 0, n_maxit = 0;

  function automatic int clip(int v, int m);
    return (v > m) ? m : ((v < -m) ? -m : v);
  endfunction

  function automatic void ref_decode(output int it_used, output bit ok);
    for (int l = 0; l < NLAYER; l++)
      for (int r = 0; r < Z; r++)
        for (int j = 0; j < DCMAX; j++) c2v_r[l][r][j] = 0;
    ok = 0;
    it_used = 0;
    for (int it = 0; it < ITMAX; it++) begin
      bit clean = 1;
      it_used = it + 1;
      for (int l = 0; l < NLAYER; l++) begin
        int d = deg_of[l];
        int lam = (l < NOFF) ? 1 : 0;
        if (d > DC) n_multiphase++;
        for (int r = 0; r < Z; r++) begin
          int n [DCMAX];
          int vf [DCMAX];
          int vs [DCMAX];
          int m1 = 99, m2 = 99, ix = 0, par = 0, hpar = 0;
          for (int j = 0; j < d; j++) begin
            n[j]  = col_of[l][j] * Z + (r + sh_of[l][j]) % Z;
            hpar ^= (app_r[n[j]] < 0) ? 1 : 0;
            vf[j] = app_r[n[j]] - c2v_r[l][r][j];
            vs[j] = clip(vf[j], 7);
            if (vs[j] != vf[j]) n_sat++;
            par ^= (vs[j] < 0) ? 1 : 0;
          end
          for (int j = 0; j < d; j++) begin
            int m = (vs[j] < 0) ? -vs[j] : vs[j];
            if (m < m1) begin m2 = m1; m1 = m; ix = j; end
            else if (m < m2) m2 = m;
          end
          if (hpar != 0) clean = 0;
          if (lam != 0 && m1 > 0) n_offset++;
          m1 = (m1 > lam) ? m1 - lam : 0;
          m2 = (m2 > lam) ? m2 - lam : 0;
          for (int j = 0; j < d; j++) begin
            int mg, na, s;
            bit sg;
            mg = (j == ix) ? m2 : m1;
            sg = 1'(par) ^ (vs[j] < 0);
            c2v_r[l][r][j] = sg ? -mg : mg;
            s  = vf[j] + c2v_r[l][r][j];
            na = clip(s, 63);
            if (na != s) n_appsat++;
            if ((na < 0) != (app_r[n[j]] < 0)) clean = 0;
            app_r[n[j]] = na;
          end
        end
      end
      if (clean) begin ok = 1; break; end
    end
  endfunction

  // ---------------- channel ----------------
  function automatic int gauss_llr(real sigma, real mu);
    real g = 0.0;
    real y;
    int  q;
    for (int i = 0; i < 12; i++) g += real'($urandom % 10000) / 10000.0;
    g -= 6.0;
    y = 1.0 + sigma * g;
    q = $rtoi(mu * y + ((mu * y >= 0.0) ? 0.5 : -0.5));
    return clip(q, 7);
  endfunction

  // ---------------- stimulus ----------------
  int cyc_busy [NI];
  for (genvar i = 0; i < NI; i++) begin : g_cnt
    always @(posedge clk) if (busy[i]) cyc_busy[i] <= cyc_busy[i] + 1;
  end

  int cyc_per_iter [NI];
  real sigmas [NFRAMES] = '{0.4, 0.5, 0.55, 0.9};

  initial begin
    int it_ref;
    bit ok_ref;
    build_code();
    for (int i = 0; i < NI; i++) begin
      cyc_per_iter[i] = 0;
      for (int l = 0; l < NLAYER; l++) cyc_per_iter[i] += 2 * ((deg_of[l] + DCS[i] - 1) / DCS[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // write the layer table
    for (int l = 0; l < NLAYER; l++) begin
      @(negedge clk);
      tbl_we = 1'b1;
      tbl_layer = LW'(l);
      tbl_data = '0;
      tbl_data.deg = DEGW'(deg_of[l]);
      for (int j = 0; j < DCMAX; j++) begin
        tbl_data.col[j]   = COLW'(col_of[l][j]);
        tbl_data.shift[j] = SHW'(sh_of[l][j]);
      end
    end
    @(negedge clk) tbl_we = 1'b0;

    for (int f = 0; f < NFRAMES; f++) begin
      // load channel LLRs
      for (int c = 0; c < NCOL; c++) begin
        @(negedge clk);
        ld_en = 1'b1;
        ld_col = COLW'(c);
        for (int z = 0; z < Z; z++) begin
          int v;
          v = gauss_llr(sigmas[f], 2.0);
          app_r[c*Z + z] = v;
          ld_data[z] = QW'(v);
        end
      end
      @(negedge clk) ld_en = 1'b0;
      ref_decode(it_ref, ok_ref);
      if (ok_ref) n_early++; else n_maxit++;
      for (int i = 0; i < NI; i++) cyc_busy[i] = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (busy != '0) @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        checks += 3;
        if (success[i] !== ok_ref) begin
          failures++; $display("DC=%0d frame %0d: success %0b, expected %0b", DCS[i], f, success[i], ok_ref);
        end
        if (int'(iters[i]) != it_ref) begin
          failures++; $display("DC=%0d frame %0d: iters %0d, expected %0d", DCS[i], f, iters[i], it_ref);
        end
        if (cyc_busy[i] != it_ref * cyc_per_iter[i]) begin
          failures++; $display("DC=%0d frame %0d: %0d cycles, expected %0d", DCS[i], f, cyc_busy[i], it_ref * cyc_per_iter[i]);
        end
      end
      // read hard decisions
      for (int c = 0; c < NCOL; c++) begin
        hd_col = COLW'(c);
        #1;
        for (int i = 0; i < NI; i++)
          for (int z = 0; z < Z; z++) begin
            checks++;
            if (hd_bits_i[i][z] != (app_r[c*Z + z] < 0)) begin
              failures++;
              if (failures < 10) $display("DC=%0d frame %0d: col %0d row %0d", DCS[i], f, c, z);
            end
          end
      end
      $display("frame %0d sigma %0.2f: success=%0b iterations=%0d", f, sigmas[f], ok_ref, it_ref);
    end

    for (int i = 0; i < NI; i++)
      $display("DC=%0d: cycles per iteration %0d (sigma %0d), throughput ratio %0.3f, edge hardware ratio %0.2f",
               DCS[i], cyc_per_iter[i], cyc_per_iter[i] - 2 * NLAYER,
               real'(2 * NLAYER) / real'(cyc_per_iter[i]), real'(DCS[i]) / 10.0);
    $display("mechanisms: multiphase=%0d offset=%0d sat=%0d appsat=%0d early_stop=%0d max_iter=%0d",
             n_multiphase, n_offset, n_sat, n_appsat, n_early, n_maxit);
    checks += 6;
    if (n_multiphase == 0) failures++;
    if (n_offset == 0)     failures++;
    if (n_sat == 0)        failures++;
    if (n_appsat == 0)     failures++;
    checks++;
    if (cyc_per_iter[NI-1] != 2 * NLAYER) failures++;   // DC = 10: one phase everywhere
    if (n_early == 0)      failures++;
    if (n_maxit == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
