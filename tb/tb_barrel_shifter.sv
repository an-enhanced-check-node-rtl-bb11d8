// tb_barrel_shifter: checks the forward shifter (BS) and the inverse shifter
// (nBS) at Z = 52 for every shift value with random data: BS output row r
// must equal input (r + s) mod Z, and nBS(BS(x)) must give x back.
module tb_barrel_shifter;
  import ldpc_pkg::*;
  localparam int Z = 52, W = APPW;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [Z-1:0][W-1:0] din, mid, dout;
  logic [SHW-1:0] shift;
  barrel_shifter #(.Z(Z), .W(W), .INVERSE(1'b0)) u_bs  (.din(din), .shift(shift), .dout(mid));
  barrel_shifter #(.Z(Z), .W(W), .INVERSE(1'b1)) u_nbs (.din(mid), .shift(shift), .dout(dout));
  int checks = 0, failures = 0;
  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int s = 0; s < Z; s++) begin
        for (int i = 0; i < Z; i++) din[i] = W'($urandom);
        shift = SHW'(s);
        #1;
        for (int r = 0; r < Z; r++) begin
          checks += 2;
          if (mid[r] != din[(r + s) % Z]) begin
            failures++;
            if (failures < 10) $display("FAIL bs s=%0d r=%0d", s, r);
          end
          if (dout[r] != din[r]) begin
            failures++;
            if (failures < 10) $display("FAIL nbs s=%0d r=%0d", s, r);
          end
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
