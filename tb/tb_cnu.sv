// tb_cnu: self-checking test of the multi-phase check-node unit (DC = 6).
// Random check nodes of degree 2..10 with random 4-bit inputs (biased towards
// small magnitudes so that ties and equal minima occur) and a random offset
// of 0 or 1 are fed one phase per cycle.  A plain loop over all edges gives
// the expected min1 (lowest index on ties), min2 and sign of every output.
// Checked: the new messages of every phase, the compressed record, and the
// timing: final_valid exactly P cycles after the first phase, outputs of the
// last phase in that cycle and of the other phases in the P-1 cycles after.
module tb_cnu;
  import ldpc_pkg::*;
  localparam int DC = 6, NPH = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       a_valid = 0, a_first = 0, a_last = 0;
  logic [0:0] a_phase = '0, o_phase = '0;
  msg_t       v2c [DC];
  logic [DC-1:0] v_mask = '0;
  mag_t       lambda = '0;
  msg_t       c2v [DC];
  c2v_rec_t   rec;
  logic       final_valid;

  cnu #(.DC(DC)) dut (.*);

  int checks = 0, failures = 0;
  int in_v [DCMAX];
  int exp_c2v [DCMAX];
  int exp_m1, exp_m2, exp_ix;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_all();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      int d, p, lam, par;
      d   = 2 + $urandom % 9;
      p   = (d + DC - 1) / DC;
      lam = $urandom % 2;
      par = 0;
      for (int j = 0; j < d; j++) begin
        int m = ($urandom % 4 == 0) ? ($urandom % 8) : ($urandom % 3);
        in_v[j] = ($urandom % 2) ? -m : m;
        par ^= (in_v[j] < 0);
      end
      exp_m1 = 99; exp_m2 = 99; exp_ix = 0;
      for (int j = 0; j < d; j++) begin
        int m = (in_v[j] < 0) ? -in_v[j] : in_v[j];
        if (m < exp_m1) begin exp_m2 = exp_m1; exp_m1 = m; exp_ix = j; end
        else if (m < exp_m2) exp_m2 = m;
      end
      exp_m1 = (exp_m1 > lam) ? exp_m1 - lam : 0;
      exp_m2 = (exp_m2 > lam) ? exp_m2 - lam : 0;
      for (int j = 0; j < d; j++) begin
        int mg = (j == exp_ix) ? exp_m2 : exp_m1;
        exp_c2v[j] = (par ^ (in_v[j] < 0)) ? -mg : mg;
      end
      lambda = mag_t'(lam);
      // search phases
      for (int ph = 0; ph < p; ph++) begin
        a_valid = 1; a_first = (ph == 0); a_last = (ph == p - 1);
        a_phase = 1'(ph);
        for (int s = 0; s < DC; s++) begin
          int e = ph * DC + s;
          v_mask[s] = (e < d);
          v2c[s] = (e < d) ? msg_t'(in_v[e]) : msg_t'($urandom);
        end
        @(negedge clk);
        check(final_valid == (ph == p - 1), $sformatf("final_valid timing t=%0d ph=%0d", t, ph));
      end
      a_valid = 0; a_first = 0; a_last = 0;
      v_mask = '0;
      // cycle P: last phase available, then the earlier ones
      for (int k = 0; k < p; k++) begin
        int ph = (k == 0) ? p - 1 : k - 1;
        o_phase = 1'(ph);
        #1;
        check(final_valid == (k == 0), $sformatf("final_valid timing t=%0d k=%0d", t, k));
        for (int s = 0; s < DC; s++) begin
          int e = ph * DC + s;
          if (e < d)
            check(int'(c2v[s]) == exp_c2v[e],
                  $sformatf("t=%0d d=%0d e=%0d c2v=%0d exp=%0d", t, d, e, c2v[s], exp_c2v[e]));
        end
        check(int'(rec.m1) == exp_m1 && int'(rec.m2) == exp_m2 && int'(rec.idx) == exp_ix,
              $sformatf("t=%0d rec %0d %0d %0d exp %0d %0d %0d", t, rec.m1, rec.m2, rec.idx,
                        exp_m1, exp_m2, exp_ix));
        for (int j = 0; j < d; j++)
          check(rec.sgn[j] == (exp_c2v[j] < 0) || exp_c2v[j] == 0, $sformatf("t=%0d sign %0d", t, j));
        @(negedge clk);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < DC; s++) v2c[s] = '0;
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
