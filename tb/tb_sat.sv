// tb_sat: exhaustive test of the message saturation unit over the whole
// VNU output range; expected value = the input clipped to -7..+7.
module tb_sat;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  vfull_t din; msg_t dout;
  sat dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int v = -128; v <= 127; v++) begin
      int e;
      din = vfull_t'(v);
      e = (v > 7) ? 7 : ((v < -7) ? -7 : v);
      #1;
      checks++;
      if (int'(dout) != e) begin
        failures++;
        if (failures < 10) $display("FAIL din=%0d dout=%0d", v, dout);
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
