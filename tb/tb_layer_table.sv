// tb_layer_table: writes random base-matrix rows into all 42 entries in a
// random order, overwrites some, and reads every entry back.
module tb_layer_table;
  import ldpc_pkg::*;
  localparam int NLAYER = 42;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0;
  logic [5:0] wr_layer = '0, rd_layer = '0;
  layer_t wr_data = '0, rd_data;
  layer_table #(.NLAYER(NLAYER)) dut (.*);
  layer_t shadow [NLAYER];
  int checks = 0, failures = 0;

  function automatic layer_t rand_layer();
    layer_t r;
    r.deg = DEGW'(3 + $urandom % 8);
    for (int j = 0; j < DCMAX; j++) begin
      r.col[j]   = COLW'($urandom % 52);
      r.shift[j] = SHW'($urandom % 52);
    end
    return r;
  endfunction

  task automatic run_all();
    for (int pass = 0; pass < 3; pass++)
      for (int l = 0; l < NLAYER; l++) begin
        int k;
        k = (pass == 0) ? l : $urandom % NLAYER;
        @(negedge clk);
        wr_en = 1'b1; wr_layer = 6'(k); wr_data = rand_layer();
        shadow[k] = wr_data;
      end
    @(negedge clk) wr_en = 1'b0;
    for (int l = 0; l < NLAYER; l++) begin
      rd_layer = 6'(l);
      #1;
      checks++;
      if (rd_data != shadow[l]) begin
        failures++;
        $display("FAIL layer %0d", l);
      end
    end
  endtask

  initial begin
    run_all();
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
