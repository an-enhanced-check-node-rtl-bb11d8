// tb_vnu: exhaustive test of the VNU (APP minus old CN message) over every
// APP value and every message value; the expected difference is computed
// in plain integers.
module tb_vnu;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  app_t app; msg_t c2v_old; vfull_t v2c;
  vnu dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int a = -63; a <= 63; a++)
      for (int c = -7; c <= 7; c++) begin
        app = app_t'(a); c2v_old = msg_t'(c);
        #1;
        checks++;
        if (int'(v2c) != a - c) begin
          failures++;
          if (failures < 10) $display("FAIL app=%0d c2v=%0d v2c=%0d", a, c, v2c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
