// tb_offset_ctrl: the selective offset must be 1 on layers 0..3 (the kernel
// rows) and 0 on all other layers of a 42-layer code.
module tb_offset_ctrl;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [5:0] layer; mag_t lambda;
  offset_ctrl dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int l = 0; l < 42; l++) begin
      layer = 6'(l);
      #1;
      checks++;
      if (int'(lambda) != ((l < 4) ? 1 : 0)) begin
        failures++;
        $display("FAIL layer %0d lambda %0d", l, lambda);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
