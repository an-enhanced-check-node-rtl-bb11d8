// tb_stop_check: drives the stopping test (Z = 8 rows, DC = 2 slots) with
// random layers of one or two phases.  Search cycles carry random APP signs
// whose per-row parity is made even or odd on purpose; update cycles carry
// old and new signs with an occasional flip.  The expected verdict is kept
// by the testbench from the rule itself (every row of every layer even, no
// sign changed since the first cycle of the iteration) and compared with
// clean_now in every cycle.
module tb_stop_check;
  localparam int Z = 8, DC = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iter_first = 0, s_valid = 0, s_first = 0, s_last = 0, u_valid = 0;
  logic [DC-1:0] mask = '0;
  logic [DC-1:0][Z-1:0] s_hd = '0, u_new = '0;
  logic clean_now;
  stop_check #(.Z(Z), .DC(DC)) dut (.*);

  int checks = 0, failures = 0;
  int n_clean_iters = 0, n_dirty_iters = 0;
  bit exp_clean;

  task automatic cycle_check(bit fail_now, bit first);
    exp_clean = (first ? 1'b1 : exp_clean) & ~fail_now;
    #1;
    checks++;
    if (clean_now !== exp_clean) begin
      failures++;
      if (failures < 10) $display("FAIL clean_now=%0b expected %0b", clean_now, exp_clean);
    end
    @(negedge clk);
  endtask

  task automatic run_all();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 200; it++) begin
      int nl;
      nl = 1 + $urandom % 4;
      for (int l = 0; l < nl; l++) begin
        int p;
        logic [Z-1:0] par;
        logic [DC-1:0][Z-1:0] saved [2];
        logic [DC-1:0] masks [2];
        bit want_even, flip;
        p = 1 + $urandom % 2;
        want_even = ($urandom % 8) != 0;
        par = '0;
        for (int ph = 0; ph < p; ph++) begin
          bit fail_now;
          iter_first = (l == 0 && ph == 0);
          s_valid = 1; s_first = (ph == 0); s_last = (ph == p - 1); u_valid = 0;
          masks[ph] = (ph == p - 1) ? DC'(1 + 2 * ($urandom % 2)) : '1;
          mask = masks[ph];
          for (int s = 0; s < DC; s++) s_hd[s] = Z'($urandom);
          if (ph == p - 1) begin
            logic [Z-1:0] rest;
            rest = par;
            for (int s = 1; s < DC; s++) if (mask[s]) rest ^= s_hd[s];
            // slot 0 is always valid: choose it to set the row parities
            s_hd[0] = want_even ? rest : (rest ^ Z'(1 << (p + l) % Z));
          end
          for (int s = 0; s < DC; s++) if (mask[s]) par ^= s_hd[s];
          saved[ph] = s_hd;
          fail_now = (ph == p - 1) && (par != '0);
          cycle_check(fail_now, iter_first);
        end
        s_valid = 0; s_first = 0; s_last = 0; iter_first = 0;
        for (int k = 0; k < p; k++) begin
          int ph;
          bit fail_now;
          int fbit;
          ph = (k == 0) ? p - 1 : k - 1;
          u_valid = 1;
          mask = masks[ph];
          s_hd = saved[ph];
          u_new = s_hd;
          flip = ($urandom % 10) == 0;
          fbit = $urandom % Z;
          if (flip) u_new[0][fbit] = ~u_new[0][fbit];
          fail_now = flip;
          cycle_check(fail_now, 1'b0);
        end
        u_valid = 0;
      end
      if (exp_clean) n_clean_iters++; else n_dirty_iters++;
    end
    checks++;
    if (n_clean_iters == 0 || n_dirty_iters == 0) failures++;
    $display("clean iterations %0d, not clean %0d", n_clean_iters, n_dirty_iters);
  endtask

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
