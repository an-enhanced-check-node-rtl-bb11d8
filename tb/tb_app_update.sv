// tb_app_update: exhaustive test of the APP update unit: every VNU output
// value with every new CN message; expected value = the sum clipped to
// -63..+63.
module tb_app_update;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  vfull_t v2c; msg_t c2v_new; app_t app_new;
  app_update dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int v = -128; v <= 127; v++)
      for (int c = -7; c <= 7; c++) begin
        int e;
        v2c = vfull_t'(v); c2v_new = msg_t'(c);
        e = v + c;
        e = (e > 63) ? 63 : ((e < -63) ? -63 : e);
        #1;
        checks++;
        if (int'(app_new) != e) begin
          failures++;
          if (failures < 10) $display("FAIL v2c=%0d c2v=%0d app=%0d", v, c, app_new);
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
