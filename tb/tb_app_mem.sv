// tb_app_mem: APP memory at its default size (52 columns of 52 values,
// 6 decoder ports).  The host loads every column with random channel LLRs,
// then random cycles write random distinct columns through the decoder
// ports while reading others.  A shadow array predicts every read port, the
// hard-decision port, sign extension of loaded LLRs, and read-before-write
// behaviour within a cycle.
module tb_app_mem;
  import ldpc_pkg::*;
  localparam int Z = 52, NCOL = 52, DC = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [COLW-1:0]        rd_col [DC];
  logic [Z-1:0][APPW-1:0] rd_data [DC];
  logic [DC-1:0]          wr_en = '0;
  logic [COLW-1:0]        wr_col [DC];
  logic [Z-1:0][APPW-1:0] wr_data [DC];
  logic                   ld_en = 1'b0;
  logic [COLW-1:0]        ld_col = '0;
  logic [Z-1:0][QW-1:0]   ld_data = '0;
  logic [COLW-1:0]        hd_col = '0;
  logic [Z-1:0]           hd_bits;

  app_mem #(.Z(Z), .NCOL(NCOL), .DC(DC)) dut (.*);

  int shadow [NCOL][Z];
  int checks = 0, failures = 0;

  task automatic check_reads();
    for (int s = 0; s < DC; s++)
      for (int z = 0; z < Z; z++) begin
        checks++;
        if (int'(app_t'(rd_data[s][z])) != shadow[rd_col[s]][z]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d col %0d z %0d", s, rd_col[s], z);
        end
      end
    for (int z = 0; z < Z; z++) begin
      checks++;
      if (hd_bits[z] != (shadow[hd_col][z] < 0)) failures++;
    end
  endtask

  task automatic run_all();
    for (int s = 0; s < DC; s++) begin rd_col[s] = '0; wr_col[s] = '0; wr_data[s] = '0; end
    for (int c = 0; c < NCOL; c++) begin
      @(negedge clk);
      ld_en = 1'b1; ld_col = COLW'(c);
      for (int z = 0; z < Z; z++) begin
        int v;
        v = int'($urandom % 15) - 7;
        ld_data[z] = QW'(v);
        shadow[c][z] = v;
      end
    end
    @(negedge clk) ld_en = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int used [NCOL];
      for (int c = 0; c < NCOL; c++) used[c] = 0;
      hd_col = COLW'($urandom % NCOL);
      for (int s = 0; s < DC; s++) begin
        int c;
        rd_col[s] = COLW'($urandom % NCOL);
        do c = $urandom % NCOL; while (used[c]);
        used[c] = 1;
        wr_col[s] = COLW'(c);
        wr_en[s] = $urandom % 2;
        for (int z = 0; z < Z; z++) wr_data[s][z] = APPW'(int'($urandom % 127) - 63);
      end
      #1;
      check_reads();              // old contents before the clock edge
      @(negedge clk);
      for (int s = 0; s < DC; s++)
        if (wr_en[s])
          for (int z = 0; z < Z; z++) shadow[wr_col[s]][z] = int'(app_t'(wr_data[s][z]));
      wr_en = '0;
      #1;
      check_reads();
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
