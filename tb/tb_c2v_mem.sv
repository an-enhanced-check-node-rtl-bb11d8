// tb_c2v_mem: CN message memory at its default size (42 layers x 52 rows).
// Checks that unwritten layers read as zero messages, that written records
// read back (read-before-write within a cycle), and that clr returns every
// layer to zero messages.
module tb_c2v_mem;
  import ldpc_pkg::*;
  localparam int Z = 52, NLAYER = 42;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr = 1'b0, wr_en = 1'b0;
  logic [5:0] rd_layer = '0, wr_layer = '0;
  c2v_rec_t rd_data [Z];
  c2v_rec_t wr_data [Z];
  c2v_mem #(.Z(Z), .NLAYER(NLAYER)) dut (.*);

  c2v_rec_t shadow [NLAYER][Z];
  bit       written [NLAYER];
  int checks = 0, failures = 0;

  task automatic check_layer(int l);
    rd_layer = 6'(l);
    #1;
    for (int z = 0; z < Z; z++) begin
      checks++;
      if (rd_data[z] != (written[l] ? shadow[l][z] : c2v_rec_t'('0))) begin
        failures++;
        if (failures < 10) $display("FAIL layer %0d row %0d", l, z);
      end
    end
  endtask

  task automatic run_all();
    for (int z = 0; z < Z; z++) wr_data[z] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < NLAYER; l++) written[l] = 0;
    for (int l = 0; l < NLAYER; l++) check_layer(l);
    for (int round = 0; round < 2; round++) begin
      for (int t = 0; t < 60; t++) begin
        int l;
        l = $urandom % NLAYER;
        wr_en = 1'b1; wr_layer = 6'(l);
        for (int z = 0; z < Z; z++) wr_data[z] = c2v_rec_t'($urandom);
        check_layer(l);           // still the old contents
        @(negedge clk);
        wr_en = 1'b0;
        for (int z = 0; z < Z; z++) shadow[l][z] = wr_data[z];
        written[l] = 1;
        check_layer(l);
      end
      for (int l = 0; l < NLAYER; l++) check_layer(l);
      clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      for (int l = 0; l < NLAYER; l++) written[l] = 0;
      for (int l = 0; l < NLAYER; l++) check_layer(l);
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
