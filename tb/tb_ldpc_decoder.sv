// tb_ldpc_decoder: end-to-end test of the decoder at its default size
// (Z = 52, DC = 6, 52 block columns, 42 layers, offset on layers 0..3).
//
// Code: a synthetic QC-LDPC base matrix with the check-node degree profile of
// 5G base graph 2 (4 kernel rows of degree 8, 10, 8, 10, then 6 rows of
// degree 3, 20 of degree 4, 9 of degree 5 and 3 of degree 6); its columns and
// shifts follow a simple formula (edge 0 of every layer in column 0, which
// thus has a high degree like the first columns of BG2; edge j > 0 in column
// 1 + (3l + 5j) mod 51; shift (17l + 11j + 3) mod Z), since only the degree
// profile of the real graph matters for the decoder's timing.  The all-zero word is a codeword of any
// such code, so each frame is the all-zero word sent over BPSK/AWGN and
// quantised to 4-bit LLRs at several noise levels.
//
// A reference model inside this testbench runs the same layered offset-min-
// sum algorithm in plain integers (row by row, edge by edge) and predicts the
// hard decisions, the success flag and the number of iterations; the test
// also checks the cycle count of every decode against sum over layers of
// 2*ceil(d/DC) cycles per iteration, and counts the mechanisms exercised
// (multi-phase layers, offset applied, saturation in SAT and APP update,
// early stop, stop at it_max).
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int Z = 52, DC = 6, NCOL = 52, NLAYER = 42, NOFF = 4, ITMAX = 15;
  localparam int LW = $clog2(NLAYER);
  localparam int NFRAMES = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 tbl_we = 1'b0;
  logic [LW-1:0]        tbl_layer = '0;
  layer_t               tbl_data = '0;
  logic                 ld_en = 1'b0;
  logic [COLW-1:0]      ld_col = '0;
  logic [Z-1:0][QW-1:0] ld_data = '0;
  logic [COLW-1:0]      hd_col = '0;
  logic [Z-1:0]         hd_bits;
  logic [LW:0]          num_layers = (LW+1)'(NLAYER);
  logic [4:0]           it_max = 5'(ITMAX);
  logic                 start = 1'b0;
  logic                 busy, done, success;
  logic [4:0]           iters;

  ldpc_decoder dut (.*);

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
  int cyc_busy;
  always @(posedge clk) if (busy) cyc_busy <= cyc_busy + 1;

  int cyc_per_iter;
  real sigmas [NFRAMES] = '{0.35, 0.4, 0.45, 0.5, 0.55, 0.6, 0.9, 1.2};

  initial begin
    int it_ref;
    bit ok_ref;
    build_code();
    cyc_per_iter = 0;
    for (int l = 0; l < NLAYER; l++) cyc_per_iter += 2 * ((deg_of[l] + DC - 1) / DC);
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
      cyc_busy = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      checks += 3;
      if (success !== ok_ref) begin
        failures++; $display("frame %0d: success %0b, expected %0b", f, success, ok_ref);
      end
      if (int'(iters) != it_ref) begin
        failures++; $display("frame %0d: iters %0d, expected %0d", f, iters, it_ref);
      end
      if (cyc_busy != it_ref * cyc_per_iter) begin
        failures++; $display("frame %0d: %0d cycles, expected %0d", f, cyc_busy, it_ref * cyc_per_iter);
      end
      // read hard decisions
      for (int c = 0; c < NCOL; c++) begin
        hd_col = COLW'(c);
        #1;
        for (int z = 0; z < Z; z++) begin
          checks++;
          if (hd_bits[z] != (app_r[c*Z + z] < 0)) begin
            failures++;
            if (failures < 10) $display("frame %0d: col %0d row %0d hd %0b", f, c, z, hd_bits[z]);
          end
        end
      end
      $display("frame %0d sigma %0.2f: success=%0b iterations=%0d cycles=%0d",
               f, sigmas[f], success, iters, cyc_busy);
    end

    $display("cycles per iteration %0d (2L = %0d, sigma = %0d)", cyc_per_iter, 2 * NLAYER,
             cyc_per_iter - 2 * NLAYER);
    $display("mechanisms: multiphase=%0d offset=%0d sat=%0d appsat=%0d early_stop=%0d max_iter=%0d",
             n_multiphase, n_offset, n_sat, n_appsat, n_early, n_maxit);
    checks += 6;
    if (n_multiphase == 0) failures++;
    if (n_offset == 0)     failures++;
    if (n_sat == 0)        failures++;
    if (n_appsat == 0)     failures++;
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
