// tb_decoder_ctrl: checks the schedule produced by the controller (DC = 6)
// for a 7-layer code with degrees 8, 10, 3, 6, 7, 4 and 10 (layers of
// (1 or 2 phases).  In every cycle the testbench predicts from the layer
// degrees alone which phase is searched or updated, the slot mask, the
// first/last flags and iter_first, and compares.  Run 1 reports a clean
// check at the end of iteration 3 (expects success after 3 iterations);
// run 2 never does (expects failure after it_max = 4).  The number of busy
// cycles must be iterations x sum over layers of 2*ceil(d/6).
module tb_decoder_ctrl;
  import ldpc_pkg::*;
  localparam int DC = 6, NLAYER = 42, NL = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, clean_now = 0;
  logic [6:0] num_layers = 7'(NL);
  logic [4:0] it_max = 5'd4;
  logic [DEGW-1:0] deg;
  logic busy, done, success, c2v_clr, iter_first, a_valid, a_first, a_last, u_valid, u_last;
  logic [4:0] iters;
  logic [5:0] layer;
  logic [0:0] r_phase;
  logic [DC-1:0] r_mask;

  decoder_ctrl #(.DC(DC), .NLAYER(NLAYER)) dut (.*);

  int degs [NL] = '{8, 10, 3, 6, 7, 4, 10};
  assign deg = DEGW'(degs[layer < NL ? layer : 0]);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic run(int clean_iter, int exp_iters, bit exp_ok);
    int cycles = 0, per_iter = 0;
    for (int l = 0; l < NL; l++) per_iter += 2 * ((degs[l] + DC - 1) / DC);
    @(negedge clk) start = 1;
    #1 check(c2v_clr, "c2v_clr with start");
    @(negedge clk) start = 0;
    for (int it = 0; it < exp_iters; it++)
      for (int l = 0; l < NL; l++) begin
        int p;
        p = (degs[l] + DC - 1) / DC;
        for (int c = 0; c < 2 * p; c++) begin
          int ph;
          logic [DC-1:0] m;
          ph = (c < p) ? c : ((c == p) ? p - 1 : c - p - 1);
          for (int s = 0; s < DC; s++) m[s] = (ph * DC + s < degs[l]);
          clean_now = (it + 1 == clean_iter);
          #1;
          check(busy && int'(layer) == l, $sformatf("layer %0d expected %0d", layer, l));
          check(a_valid == (c < p) && u_valid == (c >= p), $sformatf("l%0d c%0d valid", l, c));
          check(int'(r_phase) == ph && r_mask == m, $sformatf("l%0d c%0d phase %0d mask %b", l, c, r_phase, r_mask));
          check(a_first == (c == 0) && a_last == (c == p - 1) && u_last == (c == 2 * p - 1),
                $sformatf("l%0d c%0d flags", l, c));
          check(iter_first == (l == 0 && c == 0), "iter_first");
          cycles++;
          @(negedge clk);
        end
      end
    clean_now = 0;
    check(done && !busy, "done after the last cycle");
    check(success == exp_ok && int'(iters) == exp_iters,
          $sformatf("success %0b iters %0d", success, iters));
    check(cycles == exp_iters * per_iter, "cycle count");
    @(negedge clk);
    check(!done, "done is a pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 3, 1'b1);
    run(99, 4, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
